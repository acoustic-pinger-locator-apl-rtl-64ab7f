// tb_sample_freq: strobes at a fixed spacing P with a 1000-cycle "second".
// Checks: period equals P; freq is the number of strobes the bench counted in
// the same window; freq_valid comes every 1000 cycles; then P changes and
// both figures follow.
module tb_sample_freq;
  import apl_pkg::*;
  localparam int HZ = 1000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic sample_valid = 0, freq_valid;
  logic [15:0] period;
  logic [23:0] freq;
  sample_freq #(.CLK_HZ(HZ)) dut (.clk, .rst, .sample_valid, .period, .freq, .freq_valid);

  int P = 7, k = 0, win = 0, last_fv = -1, cyc = 0, windows = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    k = (k + 1) % P;
    if (freq_valid) begin
      if (last_fv >= 0) begin
        check(cyc - last_fv == HZ, $sformatf("window length %0d", cyc - last_fv));
        check(freq == 24'(win), $sformatf("freq %0d, counted %0d", freq, win));
        windows++;
      end
      last_fv = cyc;
      win = 0;
    end
    if (sample_valid) win++;
    sample_valid <= (k == 0);
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    repeat (3 * HZ) @(posedge clk);
    #1 check(period == 16'(P), $sformatf("period %0d", period));
    P = 23;
    repeat (3 * HZ) @(posedge clk);
    #1 check(period == 16'(P), $sformatf("period %0d", period));
    check(windows >= 4, "windows seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
