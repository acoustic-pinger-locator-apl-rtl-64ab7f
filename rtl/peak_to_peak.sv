// peak_to_peak: largest and smallest sample of one channel within a window.
//
// Every valid sample widens the running maximum and minimum.  A `clear` pulse
// starts a new window: the values restart from the sample arriving in that
// cycle, or from the empty window (max 0, min full scale) if there is none.
// The gain arbiter reads the span max - min of every channel and clears all
// windows together at each gain update.  Keeping max and min is what the design
// calls for; how the window is cleared is this implementation's choice.
//
// Timing: outputs update the cycle after sample_valid or clear.
module peak_to_peak
  import apl_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    sample_valid,
  input  sample_t sample,
  input  logic    clear,
  output sample_t pk_max,
  output sample_t pk_min
);

  always_ff @(posedge clk) begin
    if (rst || (clear && !sample_valid)) begin
      pk_max <= '0;
      pk_min <= '1;
    end else if (clear) begin
      pk_max <= sample;
      pk_min <= sample;
    end else if (sample_valid) begin
      if (sample > pk_max) pk_max <= sample;
      if (sample < pk_min) pk_min <= sample;
    end
  end

endmodule
