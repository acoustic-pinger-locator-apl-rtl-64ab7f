// tb_dpot_ctrl: timed refresh of eight DS1803 chips, INTERVAL_CYCLES = 400.
// For several rounds with random wiper codes the bench decodes the I2C
// command log into messages and checks: eight messages per round, chip
// addresses 0..7 in order, wiper codes 2k and 2k+1 of the values set before
// the round, rounds 400 cycles apart, and nack_seen after a refused byte.
module tb_dpot_ctrl;
  import apl_pkg::*;
  localparam int IV = 400;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  pot_t pots [NUM_POTS];
  logic cycle_done, nack_seen, i2c_req, i2c_done, i2c_nack;
  i2c_cmd_t i2c_cmd;
  int nack_at = -1;

  dpot_ctrl #(.INTERVAL_CYCLES(IV)) dut (.clk, .rst, .pots, .cycle_done, .nack_seen, .i2c_req, .i2c_cmd, .i2c_done, .i2c_nack);
  i2c_byte_model mdl (.clk, .rst, .i2c_req, .i2c_cmd, .i2c_done, .i2c_nack, .nack_at);

  int cyc = 0, first_start = -1, start_cyc;
  always @(posedge clk) begin
    cyc++;
    if (!rst && i2c_req && first_start < 0) first_start = cyc;
  end

  initial begin
    for (int i = 0; i < NUM_POTS; i++) pots[i] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int r = 0; r < 4; r++) begin
      pot_t want [NUM_POTS];
      for (int i = 0; i < NUM_POTS; i++) begin want[i] = pot_t'($urandom); pots[i] = want[i]; end
      mdl.log_q.delete();
      first_start = -1;
      do @(posedge clk); while (!cycle_done);
      #1;
      check(mdl.log_q.size() == 4 * NUM_CHIPS, $sformatf("round %0d: %0d commands", r, mdl.log_q.size()));
      for (int k = 0; k < NUM_CHIPS && 4*k+3 < mdl.log_q.size(); k++) begin
        check(mdl.log_q[4*k].sta && mdl.log_q[4*k].txd == {4'b0101, 3'(k), 1'b0}, $sformatf("chip %0d address", k));
        check(mdl.log_q[4*k+1].txd == 8'hAF, "command");
        check(mdl.log_q[4*k+2].txd == want[2*k] && mdl.log_q[4*k+3].txd == want[2*k+1],
              $sformatf("chip %0d wipers", k));
        check(mdl.log_q[4*k+3].sto, "stop");
      end
      if (r > 0) check(first_start - start_cyc == IV, $sformatf("round spacing %0d", first_start - start_cyc));
      start_cyc = first_start;
      check(!nack_seen, "no nack yet");
    end
    nack_at = 2;
    do @(posedge clk); while (!cycle_done);
    #1 check(nack_seen, "nack recorded");
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
