// tb_apl_channel: one channel end to end with short time constants.
// The input is silence around an offset of 2300 codes, then a ping burst (a
// 700-code sine), then silence again.  The bench checks that the DC level
// tracks the offset, that the peak window spans the burst, that exactly one
// ping is reported and only after the burst starts, and that the level-shift
// wiper moves down (the signal sits above mid-scale).
module tb_apl_channel;
  import apl_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic sample_valid = 0, pk_clear = 0, armed, ping, offset_update;
  sample_t sample = 2300, dc, pk_max, pk_min;
  pot_t offset_pot;
  apl_channel #(.DC_K(4), .SILENCE_CYCLES(400), .ADDER_CYCLES(1000)) dut (
    .clk, .rst, .sample_valid, .sample, .pk_clear, .dc, .pk_max, .pk_min,
    .armed, .ping, .offset_pot, .offset_update);

  int pings = 0, cyc = 0, burst_start = -1, ping_cycle = -1;
  always @(posedge clk) begin
    cyc++;
    if (!rst && ping) begin pings++; ping_cycle = cyc; end
  end

  task automatic samples_at(int n, int amp, int noise);
    for (int i = 0; i < n; i++) begin
      sample <= sample_t'(2300 + $rtoi(amp * $sin(6.2831853 * i / 8.0)) + int'($urandom_range(2*noise)) - noise);
      sample_valid <= 1; @(posedge clk);
      sample_valid <= 0; repeat (3) @(posedge clk);
    end
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    samples_at(300, 0, 10);                    // 1200 cycles of silence
    check(dc >= 2290 && dc <= 2310, $sformatf("dc tracks offset: %0d", dc));
    check(armed && pings == 0, "armed after silence, no ping yet");
    check(offset_pot < 128, $sformatf("level shift moves down: %0d", offset_pot));
    pk_clear <= 1; @(posedge clk); pk_clear <= 0;
    burst_start = cyc;
    samples_at(40, 700, 0);
    check(pings == 1 && ping_cycle > burst_start, "one ping at the burst");
    check(pk_max >= 2990 && pk_min <= 1610, $sformatf("peak window %0d..%0d", pk_min, pk_max));
    samples_at(40, 0, 10);
    check(pings == 1, "no second ping without new silence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
