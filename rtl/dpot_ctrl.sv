// dpot_ctrl: periodic refresh of all DS1803 digital potentiometers.
//
// Every INTERVAL_CYCLES (0.5 s at 50 MHz) the controller takes a snapshot of
// all 2*NUM_CHIPS wiper codes and writes the chips one after another, chip k
// at bus address k receiving codes 2k (wiper 0) and 2k+1 (wiper 1).  Only one
// I2C message can be on the bus at a time, so chips are written in sequence.
// A round that is still running when the next interval expires delays the
// next round.  `nack_seen` records any unacknowledged byte until reset.
// The timed refresh of all chips through a DS1803 interface follows the
// design; the 0.5 s interval and the snapshot are this implementation's
// choices.  I2C handshake: see ds1803_if.
//
// Timing: `cycle_done` pulses for one cycle when the last chip of a round is
// written.
module dpot_ctrl
  import apl_pkg::*;
#(
  parameter int unsigned NUM_CHIPS       = apl_pkg::NUM_CHIPS,
  parameter int unsigned INTERVAL_CYCLES = 25_000_000
) (
  input  logic     clk,
  input  logic     rst,
  input  pot_t     pots [2*NUM_CHIPS],
  output logic     cycle_done,
  output logic     nack_seen,
  output logic     i2c_req,
  output i2c_cmd_t i2c_cmd,
  input  logic     i2c_done,
  input  logic     i2c_nack
);

  initial assert (NUM_CHIPS >= 1 && NUM_CHIPS <= 8) else $error("DS1803 has three address pins");

  localparam int unsigned CNT_W  = $clog2(INTERVAL_CYCLES + 1);
  localparam int unsigned CHIP_W = (NUM_CHIPS > 1) ? $clog2(NUM_CHIPS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_GO, S_WAIT} state_t;
  state_t            state;
  logic [CNT_W-1:0]  cnt;
  logic              due;
  logic [CHIP_W-1:0] chip;
  pot_t              snap [2*NUM_CHIPS];
  logic              go, busy, done, err;

  ds1803_if u_if (
    .clk, .rst, .go,
    .addr(3'(chip)),
    .pot0(snap[2*chip]),
    .pot1(snap[2*chip+1]),
    .busy, .done, .err,
    .i2c_req, .i2c_cmd, .i2c_done, .i2c_nack
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt        <= '0;
      due        <= 1'b0;
      state      <= S_IDLE;
      chip       <= '0;
      go         <= 1'b0;
      cycle_done <= 1'b0;
      nack_seen  <= 1'b0;
      for (int i = 0; i < 2*NUM_CHIPS; i++) snap[i] <= '0;
    end else begin
      go         <= 1'b0;
      cycle_done <= 1'b0;
      if (cnt >= CNT_W'(INTERVAL_CYCLES - 1)) begin
        cnt <= '0;
        due <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
      unique case (state)
        S_IDLE: if (due) begin
          due   <= 1'b0;
          snap  <= pots;
          chip  <= '0;
          state <= S_GO;
        end
        S_GO: begin
          go    <= 1'b1;
          state <= S_WAIT;
        end
        S_WAIT: if (done) begin
          if (err) nack_seen <= 1'b1;
          if (chip == CHIP_W'(NUM_CHIPS - 1)) begin
            cycle_done <= 1'b1;
            state      <= S_IDLE;
          end else begin
            chip  <= chip + 1'b1;
            state <= S_GO;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic unused;
  assign unused = busy;

endmodule
