// tb_apl_top_full: the design at its real rates through a whole gain window.
//
// All parameters are the defaults: 50 MHz clock, 0.5 s silence requirement,
// 0.5 s level-shift and potentiometer intervals, 2.5 s gain window.  The
// converter model takes 46..50 cycles, i.e. about 1 MS/s.  The channels sit
// off mid-scale by 80 codes per channel step; a 25 kHz ping of 4 ms arrives at
// 1.12 s and again at 3.12 s (a 2 s period), 7 cycles later on each further
// channel, each followed 20 ms later by a half-amplitude echo.  Wiper codes are
// decoded from the I2C traffic and fed back to the analog model, so both
// control loops run closed.  The first level-shift correction moves the signal
// of the four off-centre channels by more than the silence threshold, so those
// channels restart their silence timer and arm about 0.5 s later than channel
// 2; the first ping is placed after that.  The run ends 3.126 s in (156.3 M
// cycles).
//
// Checks: channel 2 arms just after 0.5 s and every channel before the ping;
// every channel reports exactly one ping per burst, within 40 us of the burst
// reaching it, and none for the echoes; six potentiometer rounds of eight well-formed messages; each channel's
// level-shift wiper is corrected by (dc - 2048)/16 at the first update and the
// DC level ends within 40 codes of 2048; the sample rate counted over one
// second agrees with the sample spacing; the gain window at 2.5 s, which held
// a ping of span below 1536, raises the common gain by one step and that gain
// reaches the chips; status packets name all five channels for each burst.
module tb_apl_top_full;
  import apl_pkg::*;
  localparam longint FIRST = 56_000_000, PERIOD = 100_000_000, PLEN = 200_000;
  localparam longint STOP = FIRST + PERIOD + 300_000;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;   // 50 MHz
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic adc_start;
  logic [NUM_ADC-1:0] adc_done;
  sample_t adc_data [NUM_ADC][2];
  logic i2c_req, i2c_done, i2c_nack;
  i2c_cmd_t i2c_cmd;
  logic [7:0] rx_data, tx_data, bad_packets;
  logic rx_rda, rx_rd, tx_wr, tx_tbe;
  logic [4:0] filt_f;
  logic [6:0] filt_q;
  logic filt_clk, i2c_nack_seen, dpot_round_done;
  logic [NUM_CH-1:0] ping, armed;
  logic [GAIN_W-1:0] gain_idx;
  logic [15:0] sample_period;
  logic [23:0] sample_rate;
  sample_t dc [NUM_CH];
  pot_t pots [NUM_POTS];
  int nack_at = -1, amp_extra = 0;

  apl_top dut (.*);

  adc_array_model #(.FIRST_PING(FIRST), .PING_PERIOD(PERIOD), .PING_LEN(PLEN),
                    .TONE_PERIOD(2000), .AMP0(600), .ECHO(1), .ECHO_AT(1_000_000),
                    .CONV_MIN(46)) adc (
    .clk, .rst, .adc_start, .adc_done, .adc_data, .pots, .amp_extra);
  i2c_byte_model i2c (.clk, .rst, .i2c_req, .i2c_cmd, .i2c_done, .i2c_nack, .nack_at);
  uart_byte_model uart (.clk, .rst, .rx_data, .rx_rda, .rx_rd, .tx_data, .tx_wr, .tx_tbe,
                        .rx_gap(2), .tx_busy(4340));   // 115200 baud, 10 bits per byte

  // ---- decode I2C traffic into wiper codes ----
  int byte_no = 0, chip = 0, messages = 0;
  pot_t w0;
  pot_t first_offset [NUM_CH];
  always @(posedge clk) begin
    while (i2c.log_q.size() > 0) begin
      i2c_cmd_t c; c = i2c.log_q.pop_front();
      if (c.sta) begin
        byte_no = 0;
        check(c.txd[7:4] == 4'b0101 && c.txd[0] == 0 && int'(c.txd[3:1]) == chip, "address byte, chips in order");
        chip = (int'(c.txd[3:1]) + 1) % NUM_CHIPS;
      end
      if (c.wr) begin
        int k; k = (chip + NUM_CHIPS - 1) % NUM_CHIPS;
        if (byte_no == 1) check(c.txd == 8'hAF, "write-both command");
        if (byte_no == 2) w0 = c.txd;
        if (byte_no == 3) begin
          check(c.sto, "STOP after the last wiper");
          pots[2*k] = w0; pots[2*k+1] = c.txd;
          messages++;
        end
        byte_no++;
      end
    end
  end

  longint cyc = 0, first_arm [NUM_CH];
  longint ping_cyc [NUM_CH][2];
  int n_ping [NUM_CH];
  int rounds = 0, last_start = -1, min_sp = 1 << 30, max_sp = 0, gain_updates = 0;
  logic [GAIN_W-1:0] gain_q = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (adc_start) begin
      if (last_start >= 0) begin
        if (int'(cyc) - last_start < min_sp) min_sp = int'(cyc) - last_start;
        if (int'(cyc) - last_start > max_sp) max_sp = int'(cyc) - last_start;
      end
      last_start = int'(cyc);
    end
    for (int c = 0; c < NUM_CH; c++) begin
      if (armed[c] && first_arm[c] < 0) first_arm[c] = cyc;
      if (ping[c]) begin
        if (n_ping[c] < 2) ping_cyc[c][n_ping[c]] = cyc;
        n_ping[c]++;
      end
    end
    if (dpot_round_done) begin
      rounds++;
      if (rounds == 1) for (int c = 0; c < NUM_CH; c++) first_offset[c] = dut.offset_pot[c];
    end
    if (gain_idx != gain_q) gain_updates++;
    gain_q <= gain_idx;
  end

  // split the transmitted bytes into status packets; collect masks per burst
  logic [7:0] mask_burst [2];
  int packets = 0;
  always @(posedge clk) begin
    while (uart.tx_q.size() >= 11) begin
      logic [7:0] x; logic [7:0] p [11];
      x = 0;
      for (int i = 0; i < 11; i++) p[i] = uart.tx_q.pop_front();
      for (int i = 0; i < 10; i++) x ^= p[i];
      check(p[0] == 8'hA5 && p[1] == 8'h81 && p[10] == x, "status packet framing");
      packets++;
      mask_burst[(cyc > FIRST + PERIOD) ? 1 : 0] |= p[2];
    end
  end

  initial begin
    for (int i = 0; i < NUM_POTS; i++) pots[i] = (i % 3 == 2) ? 8'd128 : 8'd0;
    for (int c = 0; c < NUM_CH; c++) begin first_arm[c] = -1; n_ping[c] = 0; end
    mask_burst[0] = 0; mask_burst[1] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (cyc == STOP);
    #1;
    check(rounds == 6 && messages == 6 * NUM_CHIPS, $sformatf("rounds %0d, messages %0d", rounds, messages));
    for (int c = 0; c < NUM_CH; c++) begin
      check(first_arm[c] >= 25_000_000 && first_arm[c] < (c == 2 ? 25_100_000 : FIRST), $sformatf("channel %0d first armed at %0d", c, first_arm[c]));
      check(n_ping[c] == 2, $sformatf("channel %0d pings %0d", c, n_ping[c]));
      for (int b = 0; b < 2 && b < n_ping[c]; b++)
        check(ping_cyc[c][b] > FIRST + b * PERIOD + 7 * c && ping_cyc[c][b] < FIRST + b * PERIOD + 7 * c + 2000,
              $sformatf("channel %0d burst %0d ping at %0d", c, b, ping_cyc[c][b]));
      // channel c sits 80*(c-2) codes off centre: first correction is -5*(c-2)
      check(int'(first_offset[c]) == 128 - 5 * (c - 2), $sformatf("channel %0d first offset wiper %0d", c, first_offset[c]));
      check(dc[c] >= 2008 && dc[c] <= 2088, $sformatf("channel %0d centred: dc %0d", c, dc[c]));
    end
    check(int'(sample_rate) >= 50_000_000 / max_sp && int'(sample_rate) <= 50_000_000 / min_sp + 1,
          $sformatf("sample rate %0d for spacing %0d..%0d", sample_rate, min_sp, max_sp));
    check(sample_period >= 16'(min_sp) && sample_period <= 16'(max_sp), "sample period");
    check(gain_idx == 4 && gain_updates == 1, $sformatf("one gain step up at 2.5 s: gain %0d", gain_idx));
    check(pots[0] == 8'd4 && pots[1] == 8'd0 && pots[3] == 8'd4, "new gain written to the chips");
    check(mask_burst[0] == 8'h1F && mask_burst[1] == 8'h1F,
          $sformatf("status masks %h %h", mask_burst[0], mask_burst[1]));
    $display("full run: arm times %0d %0d %0d %0d %0d", first_arm[0], first_arm[1], first_arm[2], first_arm[3], first_arm[4]);
    $display("full run: %0d samples/s, period %0d cycles, %0d status packets, first pings at %0d %0d %0d %0d %0d",
             sample_rate, sample_period, packets,
             ping_cyc[0][0], ping_cyc[1][0], ping_cyc[2][0], ping_cyc[3][0], ping_cyc[4][0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (STOP + 1_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
