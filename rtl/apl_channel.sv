// apl_channel: the digital processing of one hydrophone channel.
//
// Pure structure: it wires together the DC low-pass filter, the peak-to-peak
// window, the ping detector (which uses the DC level as its silence reference)
// and the level-shift controller (which steers the DC level to mid-scale).
// Grouping them per channel, so that a channel can be repeated, follows the
// design.  Timing is that of the sub-blocks: dc, pk_max, pk_min and ping react
// one cycle after sample_valid; offset_pot changes once per adder interval.
module apl_channel
  import apl_pkg::*;
#(
  parameter int unsigned DC_K           = 8,
  parameter int unsigned SILENCE_CYCLES = 25_000_000,
  parameter int unsigned SILENCE_THRESH = 64,
  parameter int unsigned PING_THRESH    = 256,
  parameter int unsigned ADDER_CYCLES   = 25_000_000
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    sample_valid,
  input  sample_t sample,
  input  logic    pk_clear,
  output sample_t dc,
  output sample_t pk_max,
  output sample_t pk_min,
  output logic    armed,
  output logic    ping,
  output pot_t    offset_pot,
  output logic    offset_update
);

  dc_calc #(.K(DC_K)) u_dc (
    .clk, .rst, .sample_valid, .sample, .dc
  );

  peak_to_peak u_pk (
    .clk, .rst, .sample_valid, .sample, .clear(pk_clear), .pk_max, .pk_min
  );

  ping_detect #(
    .SILENCE_CYCLES(SILENCE_CYCLES),
    .SILENCE_THRESH(SILENCE_THRESH),
    .PING_THRESH   (PING_THRESH)
  ) u_ping (
    .clk, .rst, .sample_valid, .sample, .dc, .armed, .ping
  );

  adder_ctrl #(.UPDATE_CYCLES(ADDER_CYCLES)) u_add (
    .clk, .rst, .dc, .pot(offset_pot), .update(offset_update)
  );

endmodule
