// ping_detect: decides that a genuine ping has started on one channel.
//
// A ping is accepted only after the channel has been silent for a while, which
// rejects echoes of the previous ping and isolated noise spikes:
//   SILENCE  the channel counts clock cycles while every sample stays within
//            SILENCE_THRESH of the DC level; a louder sample restarts the
//            count.  When SILENCE_CYCLES is reached the block is armed.
//   ARMED    the first sample that departs from the DC level by more than
//            PING_THRESH is the leading edge of a ping: `ping` pulses for one
//            cycle and the block returns to SILENCE.
// The silence-then-edge rule follows the design; the thresholds, the
// 0.5 s silence length (below the pinger's 2 s period) and counting the silence
// in clock cycles are choices of this implementation.
//
// Timing: `ping` is registered, one cycle after the sample_valid that carries
// the edge.  `armed` is high while the block waits for an edge.
module ping_detect
  import apl_pkg::*;
#(
  parameter int unsigned SILENCE_CYCLES = 25_000_000,
  parameter int unsigned SILENCE_THRESH = 64,
  parameter int unsigned PING_THRESH    = 256
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    sample_valid,
  input  sample_t sample,
  input  sample_t dc,
  output logic    armed,
  output logic    ping
);

  localparam int unsigned CNT_W = $clog2(SILENCE_CYCLES + 1);

  logic [CNT_W-1:0] silence_cnt;
  sample_t          dev;          // |sample - dc|

  assign dev = (sample >= dc) ? sample - dc : dc - sample;

  always_ff @(posedge clk) begin
    if (rst) begin
      silence_cnt <= '0;
      armed       <= 1'b0;
      ping        <= 1'b0;
    end else begin
      ping <= 1'b0;
      if (!armed) begin
        if (sample_valid && dev > SAMPLE_W'(SILENCE_THRESH)) begin
          silence_cnt <= '0;
        end else if (silence_cnt >= CNT_W'(SILENCE_CYCLES - 1)) begin
          armed       <= 1'b1;
          silence_cnt <= '0;
        end else begin
          silence_cnt <= silence_cnt + 1'b1;
        end
      end else if (sample_valid && dev > SAMPLE_W'(PING_THRESH)) begin
        ping  <= 1'b1;
        armed <= 1'b0;
      end
    end
  end

endmodule
