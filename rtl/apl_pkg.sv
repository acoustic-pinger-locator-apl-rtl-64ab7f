// apl_pkg: types and constants shared by the acoustic pinger locator FPGA design.
//
// The design samples five hydrophone channels through three dual 12-bit
// converters, conditions each channel digitally (DC level, peak-to-peak, ping
// detection, level-shift control), keeps the gain of all channels equal, writes
// the board's DS1803 digital potentiometers over I2C, programs the MAX268
// band-pass filters and talks to the host over RS-232.  The 50 MHz clock, the
// five channels, the three converters, the 12-bit samples and the eight
// DS1803 chips on one I2C bus are the documented figures; everything else in
// here is a choice of this implementation.
package apl_pkg;

  localparam int unsigned CLK_HZ    = 50_000_000; // board clock
  localparam int unsigned NUM_CH    = 5;          // hydrophone channels
  localparam int unsigned NUM_ADC   = 3;          // dual-input converter modules
  localparam int unsigned SAMPLE_W  = 12;         // converter resolution
  localparam int unsigned POT_W     = 8;          // DS1803 wiper resolution
  localparam int unsigned NUM_CHIPS = 8;          // DS1803 chips on the I2C bus
  localparam int unsigned NUM_POTS  = 2 * NUM_CHIPS;
  localparam int unsigned GAIN_W    = 9;          // common gain index, 0..510

  localparam logic [SAMPLE_W-1:0] ADC_MID = 12'd2048; // 1.65 V of 0..3.3 V

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [POT_W-1:0]    pot_t;

  // One byte-level command to the I2C master: optional START before the
  // byte, optional STOP after it, and whether a byte is written at all
  // (wr = 0 with sto = 1 only releases the bus).
  typedef struct packed {
    logic       sta;
    logic       sto;
    logic       wr;
    logic [7:0] txd;
  } i2c_cmd_t;

  // DS1803 bus protocol (from the part's data sheet)
  localparam logic [3:0] DS1803_ID       = 4'b0101;
  localparam logic [7:0] DS1803_WR_BOTH  = 8'hAF;

  // Host packet framing
  localparam logic [7:0] PKT_SYNC        = 8'hA5;
  localparam logic [7:0] CMD_SET_FREQ    = 8'h01;
  localparam logic [7:0] CMD_SET_Q       = 8'h02;
  localparam logic [7:0] CMD_STATUS      = 8'h03;
  localparam logic [7:0] RSP_STATUS      = 8'h81;
  localparam int unsigned STATUS_LEN     = 11;   // bytes in a status packet

endpackage
