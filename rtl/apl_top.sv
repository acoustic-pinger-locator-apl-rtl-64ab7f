// apl_top: FPGA design of the acoustic pinger locator.
//
// Five hydrophone channels arrive, already amplified, band-pass filtered and
// shifted into 0..3.3 V, at three dual 12-bit converters.  This top
//   - samples all channels simultaneously (analog_sample) and measures the
//     resulting sample rate (sample_freq);
//   - processes each channel (apl_channel): DC level, peak-to-peak window,
//     ping detection and the level-shift loop that keeps the signal centred;
//   - sets one common gain for all channels from their peak-to-peak values
//     (arbiter) so that the channels stay phase-matched;
//   - writes the gain and level-shift values into the board's eight DS1803
//     digital potentiometers over I2C at a fixed interval (dpot_ctrl);
//   - programs the MAX268 band-pass filters for the selected pinger frequency
//     (max268_if);
//   - exchanges command and status packets with the host (mcu_packet).
// The converter serial interfaces, the I2C bus master and the UART are
// separate vendor/library cores; this top connects to them through their
// word/byte-level interfaces, which are its ports.
//
// Potentiometer map (3 wipers per channel, 15 of the 16 used):
//   wiper 3c   = pre-amplifier gain of channel c   (common gain, arbiter)
//   wiper 3c+1 = post-amplifier gain of channel c  (common gain, arbiter)
//   wiper 3c+2 = level-shift voltage of channel c  (adder loop of channel c)
//   wiper 15   = spare, written as 0.
// Wiper w lives on chip w/2 (bus address w/2), potentiometer w%2.
//
// Parameters are the design's rates at a 50 MHz clock; simulations shorten
// them.  CLK_HZ sets the filter clock table; RATE_WINDOW is the window, in
// cycles, over which samples are counted for the sample rate (one second).
module apl_top
  import apl_pkg::*;
#(
  parameter int unsigned CLK_HZ         = apl_pkg::CLK_HZ,
  parameter int unsigned RATE_WINDOW    = CLK_HZ,
  parameter int unsigned DC_K           = 8,
  parameter int unsigned SILENCE_CYCLES = 25_000_000,
  parameter int unsigned SILENCE_THRESH = 64,
  parameter int unsigned PING_THRESH    = 256,
  parameter int unsigned ADDER_CYCLES   = 25_000_000,
  parameter int unsigned ARB_CYCLES     = 125_000_000,
  parameter int unsigned DPOT_CYCLES    = 25_000_000
) (
  input  logic              clk,
  input  logic              rst,
  // converter interfaces
  output logic              adc_start,
  input  logic [NUM_ADC-1:0] adc_done,
  input  sample_t           adc_data [NUM_ADC][2],
  // I2C master, byte level
  output logic              i2c_req,
  output i2c_cmd_t          i2c_cmd,
  input  logic              i2c_done,
  input  logic              i2c_nack,
  // UART, byte level
  input  logic [7:0]        rx_data,
  input  logic              rx_rda,
  output logic              rx_rd,
  output logic [7:0]        tx_data,
  output logic              tx_wr,
  input  logic              tx_tbe,
  // MAX268 filter pins (through the level translators)
  output logic [4:0]        filt_f,
  output logic [6:0]        filt_q,
  output logic              filt_clk,
  // status
  output logic [NUM_CH-1:0] ping,
  output logic [NUM_CH-1:0] armed,
  output logic              i2c_nack_seen,
  output logic              dpot_round_done,
  output logic [GAIN_W-1:0] gain_idx,
  output logic [15:0]       sample_period,
  output logic [23:0]       sample_rate,
  output logic [7:0]        bad_packets,
  output sample_t           dc [NUM_CH]
);

  initial assert (3 * NUM_CH <= NUM_POTS) else $error("not enough potentiometers");

  sample_t           samples [NUM_CH];
  logic              sample_valid;
  sample_t           pk_max  [NUM_CH];
  sample_t           pk_min  [NUM_CH];
  pot_t              offset_pot [NUM_CH];
  logic              pk_clear;
  pot_t              pre_pot, post_pot;
  pot_t              pots [NUM_POTS];
  logic [4:0]        freq_sel;
  logic [6:0]        q_n;

  analog_sample u_sample (
    .clk, .rst, .enable(1'b1), .adc_start, .adc_done, .adc_data,
    .samples, .sample_valid
  );

  sample_freq #(.CLK_HZ(RATE_WINDOW)) u_freq (
    .clk, .rst, .sample_valid, .period(sample_period), .freq(sample_rate), .freq_valid()
  );

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    apl_channel #(
      .DC_K(DC_K), .SILENCE_CYCLES(SILENCE_CYCLES), .SILENCE_THRESH(SILENCE_THRESH),
      .PING_THRESH(PING_THRESH), .ADDER_CYCLES(ADDER_CYCLES)
    ) u_ch (
      .clk, .rst, .sample_valid, .sample(samples[c]), .pk_clear,
      .dc(dc[c]), .pk_max(pk_max[c]), .pk_min(pk_min[c]),
      .armed(armed[c]), .ping(ping[c]),
      .offset_pot(offset_pot[c]), .offset_update()
    );
  end

  arbiter #(.NUM_CH(NUM_CH), .UPDATE_CYCLES(ARB_CYCLES)) u_arb (
    .clk, .rst, .pk_max, .pk_min, .pk_clear, .gain_idx, .pre_pot, .post_pot,
    .update()
  );

  always_comb begin
    for (int w = 0; w < NUM_POTS; w++) pots[w] = '0;
    for (int c = 0; c < NUM_CH; c++) begin
      pots[3*c]   = pre_pot;
      pots[3*c+1] = post_pot;
      pots[3*c+2] = offset_pot[c];
    end
  end

  dpot_ctrl #(.NUM_CHIPS(NUM_CHIPS), .INTERVAL_CYCLES(DPOT_CYCLES)) u_dpot (
    .clk, .rst, .pots, .cycle_done(dpot_round_done), .nack_seen(i2c_nack_seen),
    .i2c_req, .i2c_cmd, .i2c_done, .i2c_nack
  );

  max268_if #(.CLK_HZ(CLK_HZ)) u_filt (
    .clk, .rst, .freq_sel, .q_n, .f_pins(filt_f), .q_pins(filt_q),
    .fclk(filt_clk), .half_period()
  );

  mcu_packet #(.NUM_CH(NUM_CH)) u_mcu (
    .clk, .rst, .rx_data, .rx_rda, .rx_rd, .tx_data, .tx_wr, .tx_tbe,
    .ping, .period(sample_period), .freq(sample_rate), .gain_idx, .freq_sel, .q_n, .bad_packets
  );

endmodule
