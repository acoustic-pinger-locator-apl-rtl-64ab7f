// adder_ctrl: keeps one channel centred at mid-scale of the converter.
//
// On the analog board an op-amp adder adds a DC voltage from a DS1803 wiper to
// the conditioned signal.  Every UPDATE_CYCLES (0.5 s at 50 MHz, "about twice a
// second", which leaves the analog side time to settle) this block compares
// the channel's DC level with CENTER (2048, i.e. 1.65 V) and moves the wiper
// against the error:
//     pot <= clamp(pot - (dc - CENTER) / 2^SHIFT, 0, 255)
// With the wiper spanning 0..3.3 V in 256 steps and the converter 0..3.3 V in
// 4096 codes, one wiper step is 16 codes, hence SHIFT = 4 (unity adder gain
// assumed).  The update interval and the 1.65 V target follow the design; the
// control law is this implementation's choice.
//
// Timing: pot and the one-cycle `update` pulse change together, once per
// interval.  After reset pot = 128 (about 1.65 V).
module adder_ctrl
  import apl_pkg::*;
#(
  parameter int unsigned UPDATE_CYCLES = 25_000_000,
  parameter int unsigned CENTER        = 2048,
  parameter int unsigned SHIFT         = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t dc,
  output pot_t    pot,
  output logic    update
);

  localparam int unsigned CNT_W = $clog2(UPDATE_CYCLES + 1);

  logic [CNT_W-1:0]        cnt;
  logic signed [SAMPLE_W:0] err;      // dc - CENTER
  logic signed [SAMPLE_W:0] step;     // err / 2^SHIFT
  logic signed [SAMPLE_W+1:0] next;   // pot - step before clamping

  assign err  = $signed({1'b0, dc}) - $signed((SAMPLE_W+1)'(CENTER));
  assign step = err >>> SHIFT;
  assign next = $signed({6'b0, pot}) - (SAMPLE_W+2)'(step);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      pot    <= 8'd128;
      update <= 1'b0;
    end else begin
      update <= 1'b0;
      if (cnt >= CNT_W'(UPDATE_CYCLES - 1)) begin
        cnt    <= '0;
        update <= 1'b1;
        if (next < 0)        pot <= '0;
        else if (next > 255) pot <= '1;
        else                 pot <= pot_t'(next);
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
