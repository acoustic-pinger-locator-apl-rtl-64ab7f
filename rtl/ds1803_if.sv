// ds1803_if: writes both wipers of one DS1803 digital potentiometer.
//
// A `go` pulse captures the chip address (A2..A0) and the two wiper codes and
// sends the part's write-both message as four byte commands to a byte-level
// I2C master:
//     START, 0101 A2 A1 A0 0     slave address, write
//            1010 1111           command: write both potentiometers
//            wiper 0
//            wiper 1, STOP
// If a byte is not acknowledged, the rest of the message is dropped, a
// stop-only command releases the bus and `err` is set with `done`.  Sending
// the potentiometer commands over an I2C master follows the design; the
// message is the DS1803's own format, and the byte-command handshake is
// this implementation's choice.
//
// I2C master handshake: i2c_req stays high with i2c_cmd stable until the
// master answers with a one-cycle i2c_done (with i2c_nack valid in that
// cycle); the next command may be presented in the following cycle.
// Timing: busy from the cycle after go until done, a one-cycle pulse.
module ds1803_if
  import apl_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     go,
  input  logic [2:0] addr,
  input  pot_t     pot0,
  input  pot_t     pot1,
  output logic     busy,
  output logic     done,
  output logic     err,
  output logic     i2c_req,
  output i2c_cmd_t i2c_cmd,
  input  logic     i2c_done,
  input  logic     i2c_nack
);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_STOP} state_t;
  state_t     state;
  logic [1:0] idx;
  logic [2:0] addr_q;
  pot_t       pot0_q, pot1_q;

  always_comb begin
    i2c_cmd = '0;
    unique case (idx)
      2'd0: i2c_cmd = '{sta: 1'b1, sto: 1'b0, wr: 1'b1, txd: {DS1803_ID, addr_q, 1'b0}};
      2'd1: i2c_cmd = '{sta: 1'b0, sto: 1'b0, wr: 1'b1, txd: DS1803_WR_BOTH};
      2'd2: i2c_cmd = '{sta: 1'b0, sto: 1'b0, wr: 1'b1, txd: pot0_q};
      2'd3: i2c_cmd = '{sta: 1'b0, sto: 1'b1, wr: 1'b1, txd: pot1_q};
      default: ;
    endcase
    if (state == S_STOP) i2c_cmd = '{sta: 1'b0, sto: 1'b1, wr: 1'b0, txd: 8'h00};
  end

  assign i2c_req = (state != S_IDLE);
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      idx    <= '0;
      addr_q <= '0;
      pot0_q <= '0;
      pot1_q <= '0;
      done   <= 1'b0;
      err    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (go) begin
          addr_q <= addr;
          pot0_q <= pot0;
          pot1_q <= pot1;
          idx    <= '0;
          err    <= 1'b0;
          state  <= S_SEND;
        end
        S_SEND: if (i2c_done) begin
          if (i2c_nack && idx != 2'd3) begin
            err   <= 1'b1;
            state <= S_STOP;
          end else if (idx == 2'd3) begin
            err   <= i2c_nack;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_STOP: if (i2c_done) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the command must not change while the master is working on it
  property p_cmd_stable;
    @(posedge clk) disable iff (rst) (i2c_req && !i2c_done) |=> (i2c_req && $stable(i2c_cmd));
  endproperty
  assert property (p_cmd_stable);

endmodule
