// sample_freq: measures the rate of the sample synchronization strobe.
//
// The sampling block runs free, so its rate has to be measured before the
// samples can be analysed in time.  Two figures are kept, both in terms of
// the 50 MHz clock:
//   period  clock cycles between the last two strobes (saturates at 65535);
//   freq    strobes counted in the last window of CLK_HZ cycles, i.e. samples
//           per second, refreshed once per second with a `freq_valid` pulse.
// Counting in a one-second window gives the frequency without a divider.
// Measuring period and frequency against the 50 MHz clock follows the design;
// the counting method is this implementation's choice.
module sample_freq
  import apl_pkg::*;
#(
  parameter int unsigned CLK_HZ = apl_pkg::CLK_HZ
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sample_valid,
  output logic [15:0] period,
  output logic [23:0] freq,
  output logic        freq_valid
);

  localparam int unsigned WIN_W = $clog2(CLK_HZ + 1);

  logic [15:0]      per_cnt;
  logic [WIN_W-1:0] win_cnt;
  logic [23:0]      strobes;

  always_ff @(posedge clk) begin
    if (rst) begin
      per_cnt    <= 16'd1;
      period     <= '0;
      win_cnt    <= '0;
      strobes    <= '0;
      freq       <= '0;
      freq_valid <= 1'b0;
    end else begin
      freq_valid <= 1'b0;
      // period
      if (sample_valid) begin
        period  <= per_cnt;
        per_cnt <= 16'd1;
      end else if (per_cnt != 16'hFFFF) begin
        per_cnt <= per_cnt + 1'b1;
      end
      // frequency window
      if (win_cnt >= WIN_W'(CLK_HZ - 1)) begin
        win_cnt    <= '0;
        freq       <= strobes + 24'(sample_valid);
        strobes    <= '0;
        freq_valid <= 1'b1;
      end else begin
        win_cnt <= win_cnt + 1'b1;
        if (sample_valid && strobes != 24'hFF_FFFF) strobes <= strobes + 1'b1;
      end
    end
  end

endmodule
