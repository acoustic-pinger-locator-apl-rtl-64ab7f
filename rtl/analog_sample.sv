// analog_sample: simultaneous sampling of all hydrophone channels.
//
// Three dual-input converter interfaces are started together with one start
// pulse.  Each answers with a one-cycle done pulse when its two 12-bit
// results are valid.  The block remembers which interfaces have finished;
// once all have, it copies the channel results to `samples` and raises
// `sample_valid` for one cycle (the synchronization signal), then starts the
// next conversion at once.  Conversions therefore run as fast as the slowest
// converter allows; the resulting rate is measured by sample_freq.
//
// Channel c is input (c % 2) of converter (c / 2); with five channels the
// second input of the third converter is not used.
//
// Timing: start is issued the cycle after the block leaves reset (with
// enable high) and the cycle after each sample_valid.  sample_valid follows the
// last done pulse by one cycle.  The simultaneous start and the sync strobe are
// what the design calls for; the handshake and the free-running pacing are
// this implementation's choice.
module analog_sample
  import apl_pkg::*;
#(
  parameter int unsigned NUM_ADC = apl_pkg::NUM_ADC,
  parameter int unsigned NUM_CH  = apl_pkg::NUM_CH
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 enable,
  output logic                 adc_start,
  input  logic [NUM_ADC-1:0]   adc_done,
  input  sample_t              adc_data [NUM_ADC][2],
  output sample_t              samples  [NUM_CH],
  output logic                 sample_valid
);

  initial assert (NUM_CH <= 2 * NUM_ADC) else $error("too many channels for the converters");

  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT} state_t;
  state_t state;
  logic [NUM_ADC-1:0] got;
  logic [NUM_ADC-1:0] got_next;

  assign got_next = got | adc_done;

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      got          <= '0;
      adc_start    <= 1'b0;
      sample_valid <= 1'b0;
      for (int c = 0; c < NUM_CH; c++) samples[c] <= '0;
    end else begin
      adc_start    <= 1'b0;
      sample_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (enable) state <= S_START;
        S_START: begin
          adc_start <= 1'b1;
          got       <= '0;
          state     <= S_WAIT;
        end
        S_WAIT: begin
          got <= got_next;
          if (&got_next) begin
            for (int c = 0; c < NUM_CH; c++) samples[c] <= adc_data[c/2][c%2];
            sample_valid <= 1'b1;
            state        <= enable ? S_START : S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
