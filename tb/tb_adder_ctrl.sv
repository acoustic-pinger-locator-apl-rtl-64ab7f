// tb_adder_ctrl: the level-shift loop, UPDATE_CYCLES = 10.
// The bench predicts each wiper value from pot - (dc - 2048)/16 with clamping
// (arithmetic shift, so -1..-15 round towards minus one step), checks the
// update spacing, and saturation at both ends.
module tb_adder_ctrl;
  import apl_pkg::*;
  localparam int U = 10;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  sample_t dc = 2048;
  pot_t pot;
  logic update;
  adder_ctrl #(.UPDATE_CYCLES(U)) dut (.clk, .rst, .dc, .pot, .update);

  int expect_pot, last_upd, cyc;
  always @(posedge clk) cyc++;

  task automatic one_update(int dcv);
    int step;
    dc <= sample_t'(dcv);
    do @(posedge clk); while (!update);
    step = (dcv - 2048) >>> 4;
    expect_pot = expect_pot - step;
    if (expect_pot < 0) expect_pot = 0;
    if (expect_pot > 255) expect_pot = 255;
    check(pot == pot_t'(expect_pot), $sformatf("dc %0d: pot %0d expected %0d", dcv, pot, expect_pot));
    if (last_upd >= 0) check(cyc - last_upd == U, $sformatf("update spacing %0d", cyc - last_upd));
    last_upd = cyc;
  endtask

  initial begin
    cyc = 0; last_upd = -1;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(pot == 128, "reset wiper 128");
    expect_pot = 128;
    one_update(2048);
    one_update(2048 + 160);
    one_update(2048 + 5);
    one_update(2048 - 1);
    one_update(2048 - 333);
    for (int i = 0; i < 6; i++) one_update(4095);     // down to 0
    check(pot == 0, "saturates at 0");
    for (int i = 0; i < 4; i++) one_update(0);        // up to 255
    check(pot == 255, "saturates at 255");
    for (int i = 0; i < 30; i++) one_update(int'($urandom_range(4095)));
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
