// tb_apl_top: the whole design, closed loop, with shortened time constants.
//
// adc_array_model plays the hydrophones, analog board and converters; the
// wiper codes it uses are decoded by this bench from the I2C traffic of the
// design, so the gain and level-shift loops run through the I2C path.  Pings
// repeat every 2500 cycles with a channel-to-channel delay and an echo.  A
// host script over the UART model sets the filter frequency and Q, sends a
// bad packet and asks for status.  The design runs with a 5000-cycle
// "second" and 1000..3000-cycle update intervals instead of 0.5..2.5 s.
//
// Checks: every I2C message is a well-formed DS1803 write to chips 0..7 in
// order; the level-shift loop brings every channel's DC level within 40 codes
// of 2048; the measured sample period matches the converter timing; each
// channel reports at most one ping per burst and at least one in all; the
// filter pins follow the host; status packets are well formed.  Each
// mechanism (sampling, arming, ping, echo rejection, level-shift update, gain
// up, gain down, potentiometer round, NACK, filter change, Q change, bad
// packet, status on request, status on ping) is counted and must occur.
module tb_apl_top;
  import apl_pkg::*;
  localparam longint PERIOD = 2500, FIRST = 3000, PLEN = 250;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
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
  int nack_at = -1;
  int amp_extra = 0;

  apl_top #(
    .RATE_WINDOW(5000), .DC_K(4), .SILENCE_CYCLES(1500), .ADDER_CYCLES(3000),
    .ARB_CYCLES(3000), .DPOT_CYCLES(1000)
  ) dut (.*);

  adc_array_model #(.FIRST_PING(FIRST), .PING_PERIOD(PERIOD), .PING_LEN(PLEN)) adc (
    .clk, .rst, .adc_start, .adc_done, .adc_data, .pots, .amp_extra);
  i2c_byte_model i2c (.clk, .rst, .i2c_req, .i2c_cmd, .i2c_done, .i2c_nack, .nack_at);
  uart_byte_model uart (.clk, .rst, .rx_data, .rx_rda, .rx_rd, .tx_data, .tx_wr, .tx_tbe,
                        .rx_gap(2), .tx_busy(20));

  // ---- mechanism counters ----
  int n_samples = 0, n_arm = 0, n_echo = 0, n_offset = 0, n_gain_up = 0, n_gain_down = 0;
  int n_round = 0, n_ping_total = 0, n_status_req = 0, n_status_ping = 0;
  int n_ping [NUM_CH];
  longint cyc = 0;
  logic [NUM_CH-1:0] armed_q = 0;
  logic [GAIN_W-1:0] gain_q = 0;
  int last_start = -1, min_sp = 1 << 30, max_sp = 0;
  int burst_pings [NUM_CH];
  longint burst_no [NUM_CH];

  // ---- decode I2C traffic into wiper codes ----
  int byte_no = 0, chip = 0;
  pot_t w0;
  always @(posedge clk) begin
    while (i2c.log_q.size() > 0) begin
      i2c_cmd_t c; c = i2c.log_q.pop_front();
      if (c.sta) begin
        byte_no = 0;
        check(c.txd[7:4] == 4'b0101 && c.txd[0] == 0, "DS1803 address byte");
        check(int'(c.txd[3:1]) == chip, $sformatf("chip order: %0d after %0d", c.txd[3:1], chip));
        chip = (int'(c.txd[3:1]) + 1) % NUM_CHIPS;
      end
      if (c.wr) begin
        int k; k = (chip + NUM_CHIPS - 1) % NUM_CHIPS;
        if (byte_no == 1) check(c.txd == 8'hAF, "write-both command");
        if (byte_no == 2) w0 = c.txd;
        if (byte_no == 3) begin
          for (int ch = 0; ch < NUM_CH; ch++)
            if ((2*k == 3*ch+2 && w0 != pots[2*k]) || (2*k+1 == 3*ch+2 && c.txd != pots[2*k+1])) n_offset++;
          pots[2*k] = w0; pots[2*k+1] = c.txd;
          check(c.sto, "STOP after last wiper");
        end
        byte_no++;
      end
    end
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (adc_start) begin
      n_samples++;
      if (last_start >= 0 && cyc > 100) begin
        if (int'(cyc) - last_start < min_sp) min_sp = int'(cyc) - last_start;
        if (int'(cyc) - last_start > max_sp) max_sp = int'(cyc) - last_start;
      end
      last_start = int'(cyc);
    end
    for (int c = 0; c < NUM_CH; c++) begin
      longint b;
      if (armed[c] && !armed_q[c]) n_arm++;
      b = (cyc > FIRST) ? (cyc - FIRST) / PERIOD : -1;
      if (b != burst_no[c]) begin burst_no[c] = b; burst_pings[c] = 0; end
      if (ping[c]) begin
        n_ping[c]++; n_ping_total++; burst_pings[c]++;
        check(burst_pings[c] <= 1, $sformatf("channel %0d: one ping per burst", c));
        check(cyc >= FIRST, "no ping before the first burst");
      end
    end
    // a loud echo starts 400 cycles into a burst period
    if (cyc > FIRST && (cyc - FIRST) % PERIOD == 400 &&
        (100 + amp_extra + 8 * (int'(pots[0]) + int'(pots[1]))) > 600) n_echo++;
    armed_q <= armed;
    if (gain_idx > gain_q) n_gain_up++;
    if (gain_idx < gain_q) n_gain_down++;
    gain_q <= gain_idx;
    if (dpot_round_done) n_round++;
  end

  // ---- host side ----
  task automatic send_pkt(logic [7:0] cmd, logic [7:0] arg, bit good = 1);
    uart.rx_q.push_back(8'hA5); uart.rx_q.push_back(cmd); uart.rx_q.push_back(arg);
    uart.rx_q.push_back(8'hA5 ^ cmd ^ arg ^ (good ? 8'h00 : 8'hFF));
  endtask

  // split the transmitted byte stream into status packets
  always @(posedge clk) begin
    while (uart.tx_q.size() >= 11) begin
      logic [7:0] x; logic [7:0] p [11];
      x = 0;
      for (int i = 0; i < 11; i++) p[i] = uart.tx_q.pop_front();
      for (int i = 0; i < 10; i++) x ^= p[i];
      check(p[0] == 8'hA5 && p[1] == 8'h81 && p[10] == x, "status packet framing");
      if (p[2] == 0) n_status_req++; else n_status_ping++;
    end
  end

  int c0, c1;
  initial begin
    for (int i = 0; i < NUM_POTS; i++) pots[i] = (i % 3 == 2) ? 8'd128 : 8'd0;
    for (int c = 0; c < NUM_CH; c++) begin n_ping[c] = 0; burst_no[c] = -2; burst_pings[c] = 0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    // host: filter to 30 kHz (index 10), Q code 100, one bad packet
    repeat (200) @(posedge clk);
    send_pkt(8'h01, 8'd10);
    send_pkt(8'h02, 8'd100);
    send_pkt(8'h02, 8'd7, 0);
    repeat (200) @(posedge clk); #1;
    check(filt_f == 5'd25 && filt_q == 7'd100, $sformatf("filter pins F=%0d Q=%0d", filt_f, filt_q));
    @(posedge filt_clk); c0 = int'(cyc); @(posedge filt_clk); c1 = int'(cyc);
    check(c1 - c0 == 14, $sformatf("filter clock period %0d (30 kHz: 2 x 7 cycles) hp %0d", c1 - c0, dut.u_filt.half_period));
    check(bad_packets == 1, "bad packet counted");
    send_pkt(8'h03, 8'd0);
    // a refused byte during one round
    repeat (20000) @(posedge clk);
    nack_at = 2;
    @(posedge clk iff dpot_round_done);
    nack_at = -1;
    check(i2c_nack_seen, "refused byte reported");
    repeat (150000) @(posedge clk);
    #1;
    for (int c = 0; c < NUM_CH; c++)
      check(dc[c] >= 2008 && dc[c] <= 2088, $sformatf("channel %0d centred: dc %0d", c, dc[c]));
    amp_extra = 1500;                       // the pinger is now much closer
    repeat (80000) @(posedge clk);
    send_pkt(8'h03, 8'd0);
    repeat (2000) @(posedge clk); #1;
    // ---- end checks ----
    for (int c = 0; c < NUM_CH; c++)
      check(n_ping[c] >= 1, $sformatf("channel %0d pings %0d", c, n_ping[c]));
    check(sample_period >= 16'(min_sp) && sample_period <= 16'(max_sp),
          $sformatf("sample period %0d within %0d..%0d", sample_period, min_sp, max_sp));
    check(sample_rate >= 24'(5000 / max_sp) && sample_rate <= 24'(5000 / min_sp + 1),
          $sformatf("sample rate %0d per 5000 cycles", sample_rate));
    $display("mechanisms: samples=%0d arm=%0d pings=%0d echoes=%0d offset_updates=%0d gain_up=%0d gain_down=%0d rounds=%0d status_req=%0d status_ping=%0d",
             n_samples, n_arm, n_ping_total, n_echo, n_offset, n_gain_up, n_gain_down, n_round, n_status_req, n_status_ping);
    check(n_samples > 1000, "sampling happened");
    check(n_arm > 0, "silence arming happened");
    check(n_ping_total > 0, "ping detection happened");
    check(n_echo > 0, "loud echo rejected");
    check(n_offset > 0, "level-shift update happened");
    check(n_gain_up > 0, "gain increase happened");
    check(n_gain_down > 0, "gain decrease happened");
    check(n_round > 0, "potentiometer round happened");
    check(n_status_req >= 2, "status on request happened");
    check(n_status_ping > 0, "status on ping happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
