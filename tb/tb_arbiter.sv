// tb_arbiter: common gain from the loudest channel, UPDATE_CYCLES = 20.
// Spans are set per channel before each update; the bench predicts the gain
// index (step 4, limits 1536 and 3584, range 0..510), the pre/post wiper split
// and checks the update spacing and that pk_clear comes with every update.
module tb_arbiter;
  import apl_pkg::*;
  localparam int U = 20;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  sample_t pk_max [NUM_CH], pk_min [NUM_CH];
  logic pk_clear, update;
  logic [GAIN_W-1:0] gain_idx;
  pot_t pre_pot, post_pot;
  arbiter #(.UPDATE_CYCLES(U)) dut (.clk, .rst, .pk_max, .pk_min, .pk_clear, .gain_idx, .pre_pot, .post_pot, .update);

  int g = 0, cyc = 0, last = -1;
  always @(posedge clk) cyc++;

  task automatic spans(int loud_ch, int loud_span, int other_span, bit empty_others = 0);
    for (int c = 0; c < NUM_CH; c++) begin
      int sp; sp = (c == loud_ch) ? loud_span : other_span;
      pk_min[c] = sample_t'(2048 - sp / 2);
      pk_max[c] = sample_t'(2048 - sp / 2 + sp);
      if (empty_others && c != loud_ch) begin pk_max[c] = 0; pk_min[c] = 4095; end
    end
  endtask

  task automatic step_check(int loud);
    do begin @(posedge clk); #1; end while (!update);
    if (loud > 3584) g = (g > 4) ? g - 4 : 0;
    else if (loud < 1536) g = (g + 4 < 510) ? g + 4 : 510;
    check(int'(gain_idx) == g, $sformatf("gain %0d expected %0d", gain_idx, g));
    check(pk_clear, "clear with update");
    check(pre_pot == pot_t'(g > 255 ? 255 : g) && post_pot == pot_t'(g > 255 ? g - 255 : 0), "pre/post split");
    if (last >= 0) check(cyc - last == U, "update spacing");
    last = cyc;
  endtask

  initial begin
    spans(0, 100, 100);
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 140; i++) begin spans(i % NUM_CH, 1000, 200); step_check(1000); end  // to 510
    check(gain_idx == 510, "saturates high");
    for (int i = 0; i < 10; i++) begin spans(2, 2000, 100); step_check(2000); end            // hold
    spans(3, 3800, 500); step_check(3800);                                                   // loudest decides
    spans(4, 3700, 100, 1); step_check(3700);                                                // empty windows ignored
    for (int i = 0; i < 140; i++) begin spans(1, 4000, 4000); step_check(4000); end          // to 0
    check(gain_idx == 0, "saturates low");
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
