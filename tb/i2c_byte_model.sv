// i2c_byte_model: behavioural model of a byte-level I2C master for testbenches.
// It accepts the command on i2c_cmd when i2c_req is high and it is idle,
// works for a random 2..9 cycles, then pulses i2c_done.  A written byte is
// not acknowledged when its index within the current message equals
// nack_at (-1: always acknowledged).  Every command is appended to a log
// that the testbench reads.
module i2c_byte_model
  import apl_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     i2c_req,
  input  i2c_cmd_t i2c_cmd,
  output logic     i2c_done,
  output logic     i2c_nack,
  input  int       nack_at
);
  i2c_cmd_t log_q [$];
  int busy = 0, byte_in_msg = 0;
  i2c_cmd_t cur;

  always_ff @(posedge clk) begin
    i2c_done <= 1'b0;
    i2c_nack <= 1'b0;
    if (rst) begin
      busy <= 0;
    end else if (busy == 0) begin
      if (i2c_req && !i2c_done) begin
        cur  <= i2c_cmd;
        busy <= 2 + int'($urandom_range(7));
      end
    end else if (busy == 1) begin
      busy     <= 0;
      i2c_done <= 1'b1;
      log_q.push_back(cur);
      if (cur.sta) byte_in_msg = 0;
      i2c_nack <= cur.wr && (byte_in_msg == nack_at);
      if (cur.wr) byte_in_msg++;
    end else begin
      busy <= busy - 1;
    end
  end
endmodule
