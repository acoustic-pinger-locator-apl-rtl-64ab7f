// tb_dc_calc: checks the DC low-pass filter.
// A reference exponential average (acc += x - acc/2^K) is kept in the bench;
// after each random sample the output must equal it.  Then a constant input
// must pull the DC level to within 1 code of that input, and a sine around a
// known offset must give a DC level within 8 codes of the offset.
module tb_dc_calc;
  import apl_pkg::*;
  localparam int K = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic sample_valid = 0;
  sample_t sample = 0, dc;
  dc_calc #(.K(K)) dut (.clk, .rst, .sample_valid, .sample, .dc);

  longint ref_acc;
  task automatic feed(sample_t x);
    sample <= x; sample_valid <= 1;
    @(posedge clk);
    sample_valid <= 0;
    ref_acc = ref_acc + x - (ref_acc >>> K);
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    ref_acc = 2048 * (1 << K);
    @(posedge clk);
    check(dc == 2048, "reset value is mid-scale");
    for (int i = 0; i < 300; i++) begin
      feed(sample_t'($urandom));
      check(dc == sample_t'(ref_acc >>> K), $sformatf("dc %0d vs %0d", dc, ref_acc >>> K));
    end
    for (int i = 0; i < 200; i++) feed(12'd3000);
    check(dc >= 2999 && dc <= 3000, $sformatf("settles on constant: %0d", dc));
    begin
      int sum; sum = 0;
      for (int i = 0; i < 800; i++) begin
        feed(sample_t'(1500 + $rtoi(400.0 * $sin(6.2831853 * i / 16.0))));
        if (i >= 800 - 64) sum += int'(dc);
      end
      check(sum / 64 >= 1490 && sum / 64 <= 1510, $sformatf("mean DC of a sine: %0d", sum / 64));
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
