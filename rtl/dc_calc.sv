// dc_calc: DC level of one channel by a first-order digital low-pass filter.
//
// On every valid sample the accumulator moves by (sample - acc / 2^K), the
// integer form of an exponential moving average with time constant of about
// 2^K samples; dc is acc / 2^K.  The DC level tells the adder block how far
// the signal sits from mid-scale and gives the ping detector its "silence"
// reference.  A low-pass filter is what the design calls for; the exponential
// form, K = 8 and the mid-scale start value are choices of this implementation.
//
// Timing: dc changes the cycle after a sample_valid.  After reset dc = 2048.
module dc_calc
  import apl_pkg::*;
#(
  parameter int unsigned K = 8
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    sample_valid,
  input  sample_t sample,
  output sample_t dc
);

  localparam int unsigned ACC_W = SAMPLE_W + K;
  logic [ACC_W-1:0] acc;

  // acc + sample - acc/2^K stays within 0 .. (2^SAMPLE_W - 1) * 2^K
  always_ff @(posedge clk) begin
    if (rst)               acc <= ACC_W'(ADC_MID) << K;
    else if (sample_valid) acc <= acc + ACC_W'(sample) - (acc >> K);
  end

  assign dc = acc[ACC_W-1 -: SAMPLE_W];

endmodule
