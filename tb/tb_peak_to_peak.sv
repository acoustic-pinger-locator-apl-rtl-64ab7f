// tb_peak_to_peak: random samples and random window clears; the bench keeps
// its own maximum and minimum of each window and compares every cycle.
module tb_peak_to_peak;
  import apl_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic sample_valid = 0, clear = 0;
  sample_t sample = 0, pk_max, pk_min;
  peak_to_peak dut (.clk, .rst, .sample_valid, .sample, .clear, .pk_max, .pk_min);

  int mx, mn;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    mx = 0; mn = 4095;
    @(posedge clk);
    check(pk_max == 0 && pk_min == 4095, "empty window after reset");
    for (int i = 0; i < 2000; i++) begin
      logic v, c; sample_t x;
      v = ($urandom_range(3) != 0); c = ($urandom_range(40) == 0); x = sample_t'($urandom);
      sample_valid <= v; clear <= c; sample <= x;
      @(posedge clk);
      if (c) begin mx = v ? x : 0; mn = v ? x : 4095; end
      else if (v) begin if (x > mx) mx = x; if (x < mn) mn = x; end
      #1;
      check(pk_max == mx && pk_min == mn, $sformatf("max %0d/%0d min %0d/%0d", pk_max, mx, pk_min, mn));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
