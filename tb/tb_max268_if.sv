// tb_max268_if: the filter programming table against an independent search.
// For every table entry the bench computes, in floating point, the centre
// frequency the chosen (N, H) really gives, f0' = 50 MHz / (2 H pi (N + 13)),
// and the best any N in 0..31 with a rounded H could give; the table's error
// must be within 0.1 % of that optimum (the table uses pi ~ 355/113).  It also
// measures the filter clock pin against H, checks the Q pins and the clamp of
// an index beyond the table.
module tb_max268_if;
  localparam real CLK = 50.0e6;
  localparam real PI  = 3.14159265358979;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [4:0] freq_sel = 0, f_pins;
  logic [6:0] q_n = 0, q_pins;
  logic fclk;
  logic [15:0] half_period;
  max268_if dut (.clk, .rst, .freq_sel, .q_n, .f_pins, .q_pins, .fclk, .half_period);

  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic real f0_of(int n, int h);
    return CLK / (2.0 * h * PI * (n + 13));
  endfunction
  function automatic real abs_r(real x); return x < 0 ? -x : x; endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 21; i++) begin
      real f0, best, got; int h;
      f0 = 20000.0 + 1000.0 * i;
      freq_sel <= 5'(i); q_n <= 7'($urandom);
      repeat (3) @(posedge clk); #1;
      best = 1.0;
      for (int n = 0; n < 32; n++) begin
        h = $rtoi(CLK / (2.0 * PI * (n + 13) * f0) + 0.5);
        if (h < 1) h = 1;
        if (abs_r(f0_of(n, h) - f0) / f0 < best) best = abs_r(f0_of(n, h) - f0) / f0;
      end
      got = abs_r(f0_of(int'(f_pins), int'(half_period)) - f0) / f0;
      check(got <= best + 0.001, $sformatf("f0 %0.0f: N %0d H %0d err %0.4f best %0.4f", f0, f_pins, half_period, got, best));
      check(q_pins == q_n, "Q pins");
    end
    // clock pin: measure one full period for entry 5 (25 kHz)
    freq_sel <= 5'd5;
    repeat (4) @(posedge clk);
    begin
      int c0, c1;
      @(posedge fclk); c0 = cyc;
      @(posedge fclk); c1 = cyc;
      check(c1 - c0 == 2 * int'(half_period), $sformatf("clock period %0d vs 2*%0d", c1 - c0, half_period));
    end
    begin
      logic [4:0] f20; logic [15:0] h20;
      freq_sel <= 5'd20; repeat (3) @(posedge clk); #1; f20 = f_pins; h20 = half_period;
      freq_sel <= 5'd31; repeat (3) @(posedge clk); #1;
      check(f_pins == f20 && half_period == h20, "index beyond table clamps to last entry");
    end
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
