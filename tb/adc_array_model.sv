// adc_array_model: behavioural model of the analog front end and the three
// dual converters, for testbenches of the whole design.
//
// Each converter answers a start pulse with a done pulse and two 12-bit codes
// after CONV_MIN..CONV_MIN+4 cycles.  Channel c carries
//   dc_c + burst + noise, clipped to 0..4095 (the op-amp rails), where
//   dc_c   = 2048 + DELTA*(c-2) + 16*(offset wiper - 128)   (level-shift adder)
//   burst  = A * sin(2 pi k / TONE_PERIOD) during a ping, with
//   A      = AMP0 + amp_extra + AMP_PER_GAIN * (pre + post wiper)  (the two VGAs;
//            amp_extra lets a testbench bring the pinger closer)
// Pings start at FIRST_PING + c*DELAY_PER_CH (the hydrophones hear the ping at
// different times) and repeat every PING_PERIOD cycles for PING_LEN cycles;
// if ECHO is set a half-amplitude echo follows each ping after ECHO_AT cycles.
// The wiper codes come from the testbench, which decodes them from the I2C
// traffic, so the gain and level-shift loops are closed through the model.
module adc_array_model
  import apl_pkg::*;
#(
  parameter longint FIRST_PING   = 3000,
  parameter longint PING_PERIOD  = 2500,
  parameter longint PING_LEN     = 250,
  parameter int     TONE_PERIOD  = 40,
  parameter int     DELAY_PER_CH = 7,
  parameter int     DELTA        = 80,
  parameter int     AMP0         = 100,
  parameter int     AMP_PER_GAIN = 8,
  parameter int     NOISE        = 8,
  parameter bit     ECHO         = 1,
  parameter longint ECHO_AT      = 400,
  parameter int     CONV_MIN     = 10
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               adc_start,
  output logic [NUM_ADC-1:0] adc_done,
  output sample_t            adc_data [NUM_ADC][2],
  input  pot_t               pots [NUM_POTS],
  input  int                 amp_extra
);
  longint t = 0;
  int left [NUM_ADC];
  int bursts_started = 0;

  function automatic sample_t value(int c);
    longint tp; real a, s; int v;
    s = 0.0;
    a = AMP0 + amp_extra + AMP_PER_GAIN * (int'(pots[3*c]) + int'(pots[3*c+1]));
    if (t >= FIRST_PING + c * DELAY_PER_CH) begin
      tp = (t - FIRST_PING - c * DELAY_PER_CH) % PING_PERIOD;
      if (tp < PING_LEN) s = a * $sin(6.2831853 * real'(tp) / TONE_PERIOD);
      else if (ECHO && tp >= ECHO_AT && tp < ECHO_AT + PING_LEN / 2)
        s = 0.5 * a * $sin(6.2831853 * real'(tp) / TONE_PERIOD);
    end
    v = 2048 + DELTA * (c - 2) + 16 * (int'(pots[3*c+2]) - 128) + $rtoi(s)
        + int'($urandom_range(2 * NOISE)) - NOISE;
    if (v < 0) v = 0;
    if (v > 4095) v = 4095;
    return sample_t'(v);
  endfunction

  always_ff @(posedge clk) begin
    t <= t + 1;
    for (int a = 0; a < NUM_ADC; a++) begin
      adc_done[a] <= 1'b0;
      if (rst) left[a] <= 0;
      else if (adc_start) left[a] <= CONV_MIN + int'($urandom_range(4));
      else if (left[a] == 1) begin
        left[a] <= 0;
        adc_done[a] <= 1'b1;
        adc_data[a][0] <= value(2 * a);
        adc_data[a][1] <= (2 * a + 1 < NUM_CH) ? value(2 * a + 1) : '0;
      end else if (left[a] > 1) left[a] <= left[a] - 1;
    end
  end
endmodule
