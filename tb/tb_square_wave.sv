// tb_square_wave: measures high and low phase lengths of the output for
// several half periods, including a change while running and 0 (taken as 1);
// each phase must last exactly half_period cycles.
module tb_square_wave;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic en = 0, sq;
  logic [15:0] hp = 5;
  square_wave dut (.clk, .rst, .en, .half_period(hp), .sq);

  task automatic measure(int h, int phases);
    int n; logic v;
    hp <= 16'(h);
    // let the new value take effect
    @(posedge sq or negedge sq); @(posedge sq or negedge sq);
    for (int p = 0; p < phases; p++) begin
      n = 0; v = sq;
      @(posedge clk); #1;
      n = 1;
      while (sq == v) begin @(posedge clk); #1; n++; end
      check(n == (h == 0 ? 1 : h), $sformatf("half period %0d: phase %0d", h, n));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    #1 check(sq == 0, "held low when disabled");
    en <= 1;
    measure(5, 6);
    measure(3, 6);
    measure(17, 4);
    measure(1, 6);
    measure(0, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
