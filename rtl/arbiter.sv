// arbiter: one common gain for every channel's two variable-gain amplifiers.
//
// The phase of a channel depends on its gain, so all channels must share the
// same gain or the time differences between hydrophones would be distorted.
// At the end of every window of UPDATE_CYCLES the arbiter takes the largest
// peak-to-peak span of all channels (the loudest channel decides, so that no
// channel saturates), compares it with two limits and moves one common gain
// index:
//     span > HIGH  -> gain_idx -= STEP   (close to clipping)
//     span < LOW   -> gain_idx += STEP   (signal too small)
// and then clears every channel's peak-to-peak window.  The index 0..510 is
// spread over the pre-amplifier wiper first and the post-amplifier wiper after:
//     pre_pot = min(gain_idx, 255),  post_pot = max(gain_idx - 255, 0).
// Equal gains for all channels from their peak values follow the design; the
// limits, the step, the fusion rule, the 2.5 s window (longer than the 2 s
// ping period) and the pre/post split are choices of this implementation.
//
// Timing: gain_idx, the pots, `update` and `pk_clear` change in the same
// cycle, once per window.  After reset gain_idx = 0 (lowest gain).
module arbiter
  import apl_pkg::*;
#(
  parameter int unsigned NUM_CH        = apl_pkg::NUM_CH,
  parameter int unsigned UPDATE_CYCLES = 125_000_000,
  parameter int unsigned HIGH          = 3584,
  parameter int unsigned LOW           = 1536,
  parameter int unsigned STEP          = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  sample_t           pk_max [NUM_CH],
  input  sample_t           pk_min [NUM_CH],
  output logic              pk_clear,
  output logic [GAIN_W-1:0] gain_idx,
  output pot_t              pre_pot,
  output pot_t              post_pot,
  output logic              update
);

  localparam int unsigned CNT_W    = $clog2(UPDATE_CYCLES + 1);
  localparam int unsigned GAIN_MAX = 510;

  logic [CNT_W-1:0] cnt;
  sample_t          span;

  // largest span of all channels; an empty window (max < min) counts as 0
  always_comb begin
    span = '0;
    for (int c = 0; c < NUM_CH; c++)
      if (pk_max[c] >= pk_min[c] && (pk_max[c] - pk_min[c]) > span)
        span = pk_max[c] - pk_min[c];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      gain_idx <= '0;
      pk_clear <= 1'b0;
      update   <= 1'b0;
    end else begin
      pk_clear <= 1'b0;
      update   <= 1'b0;
      if (cnt >= CNT_W'(UPDATE_CYCLES - 1)) begin
        cnt      <= '0;
        pk_clear <= 1'b1;
        update   <= 1'b1;
        if (span > SAMPLE_W'(HIGH))
          gain_idx <= (gain_idx > GAIN_W'(STEP)) ? gain_idx - GAIN_W'(STEP) : '0;
        else if (span < SAMPLE_W'(LOW))
          gain_idx <= ((GAIN_W+1)'(gain_idx) + (GAIN_W+1)'(STEP) < (GAIN_W+1)'(GAIN_MAX))
                      ? gain_idx + GAIN_W'(STEP) : GAIN_W'(GAIN_MAX);
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign pre_pot  = (gain_idx > 9'd255) ? 8'd255 : gain_idx[7:0];
  assign post_pot = (gain_idx > 9'd255) ? 8'(gain_idx - 9'd255) : 8'd0;

endmodule
