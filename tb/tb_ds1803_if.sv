// tb_ds1803_if: one DS1803 message through the byte-level I2C master model.
// Checks the four commands of a write-both message (START + 0101 A2A1A0 0,
// AF, wiper 0, wiper 1 + STOP) for random addresses and values, and that a
// byte that is not acknowledged aborts the message with a stop-only command
// and sets err.
module tb_ds1803_if;
  import apl_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic go = 0, busy, done, err, i2c_req, i2c_done, i2c_nack;
  logic [2:0] addr = 0;
  pot_t pot0 = 0, pot1 = 0;
  i2c_cmd_t i2c_cmd;
  int nack_at = -1;

  ds1803_if dut (.clk, .rst, .go, .addr, .pot0, .pot1, .busy, .done, .err, .i2c_req, .i2c_cmd, .i2c_done, .i2c_nack);
  i2c_byte_model mdl (.clk, .rst, .i2c_req, .i2c_cmd, .i2c_done, .i2c_nack, .nack_at);

  task automatic send(logic [2:0] a, pot_t p0, pot_t p1);
    addr <= a; pot0 <= p0; pot1 <= p1; go <= 1;
    @(posedge clk); go <= 0;
    do @(posedge clk); while (!done);
    #1;
  endtask

  function automatic bit same(i2c_cmd_t x, logic sta, logic sto, logic wr, logic [7:0] d);
    return x.sta == sta && x.sto == sto && x.wr == wr && (!wr || x.txd == d);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 20; i++) begin
      logic [2:0] a; pot_t p0, p1;
      a = 3'($urandom); p0 = pot_t'($urandom); p1 = pot_t'($urandom);
      mdl.log_q.delete();
      send(a, p0, p1);
      check(!err, "no error");
      check(mdl.log_q.size() == 4, $sformatf("4 commands, got %0d", mdl.log_q.size()));
      if (mdl.log_q.size() == 4) begin
        check(same(mdl.log_q[0], 1, 0, 1, {4'b0101, a, 1'b0}), "address byte with START");
        check(same(mdl.log_q[1], 0, 0, 1, 8'hAF), "write-both command");
        check(same(mdl.log_q[2], 0, 0, 1, p0), "wiper 0");
        check(same(mdl.log_q[3], 0, 1, 1, p1), "wiper 1 with STOP");
      end
    end
    for (int k = 0; k < 3; k++) begin
      nack_at = k;
      mdl.log_q.delete();
      send(3'd5, 8'h11, 8'h22);
      check(err, $sformatf("nack at byte %0d reported", k));
      check(mdl.log_q.size() == k + 2, $sformatf("aborted after byte %0d", k));
      check(same(mdl.log_q[mdl.log_q.size()-1], 0, 1, 0, 0), "stop-only command");
    end
    nack_at = 3;
    mdl.log_q.delete();
    send(3'd1, 8'h33, 8'h44);
    check(err && mdl.log_q.size() == 4, "nack on last byte");
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
