// max268_if: programs the MAX268 band-pass filters for a chosen pinger frequency.
//
// The MAX268 centre frequency f0 follows its clock:  fCLK / f0 = pi (N + 13),
// with N (0..31) on pins F0..F4, and its quality factor is Q = 64 / (128 - N)
// with N (0..127) on pins Q0..Q6.  The user only selects a frequency: a table
// computed at elaboration holds, for each selectable f0, the F-pin code N and
// the half period H (in FPGA clock cycles) of the square wave that clocks the
// filter, fCLK = CLK_HZ / (2 H).  For each f0 all 32 values of N are tried and
// the one whose integer H gives the clock closest to pi (N + 13) f0 wins
// (ties go to the larger N, the finer sampling of the filter):
//     H = round( CLK_HZ * 113 / (710 * (N + 13) * f0) )      (pi ~ 355/113)
// Entry i is f0 = F_MIN_HZ + i * F_STEP_HZ.  Q pins are passed through from
// q_n.  The same clock drives both filter sections (CLKA and CLKB), which are
// in series at one centre frequency.  The two equations, the pin names and the
// pre-computed table follow the design; the 20-40 kHz range in 1 kHz steps and
// the search rule are this implementation's choices.
//
// Timing: pins and half period are registered, one cycle after the inputs;
// an index beyond the table selects the last entry.
module max268_if
  import apl_pkg::*;
#(
  parameter int unsigned CLK_HZ    = apl_pkg::CLK_HZ,
  parameter int unsigned F_MIN_HZ  = 20_000,
  parameter int unsigned F_STEP_HZ = 1_000,
  parameter int unsigned NUM_FREQ  = 21
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  freq_sel,
  input  logic [6:0]  q_n,
  output logic [4:0]  f_pins,
  output logic [6:0]  q_pins,
  output logic        fclk,
  output logic [15:0] half_period
);

  typedef logic [20:0] entry_t;   // {N[4:0], H[15:0]}

  function automatic entry_t best_entry(longint unsigned f0);
    longint unsigned num, den, h, e, best_e, prod;
    entry_t best;
    num    = longint'(CLK_HZ) * 113;
    best   = '0;
    best_e = '1;
    for (int n = 0; n < 32; n++) begin
      den = 710 * (longint'(n) + 13) * f0;
      h   = (num + den / 2) / den;
      if (h < 1) h = 1;
      if (h > 65535) h = 65535;
      prod = h * den;
      e    = (prod > num) ? prod - num : num - prod;
      if (e <= best_e) begin
        best_e = e;
        best   = {5'(n), 16'(h)};
      end
    end
    return best;
  endfunction

  typedef entry_t lut_t [NUM_FREQ];

  function automatic lut_t build_lut();
    lut_t t;
    for (int i = 0; i < NUM_FREQ; i++)
      t[i] = best_entry(longint'(F_MIN_HZ) + longint'(i) * F_STEP_HZ);
    return t;
  endfunction

  localparam lut_t LUT = build_lut();

  entry_t sel_entry;
  always_comb begin
    if (32'(freq_sel) < NUM_FREQ) sel_entry = LUT[freq_sel];
    else                          sel_entry = LUT[NUM_FREQ-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      f_pins      <= '0;
      q_pins      <= '0;
      half_period <= 16'd1;
    end else begin
      f_pins      <= sel_entry[20:16];
      half_period <= sel_entry[15:0];
      q_pins      <= q_n;
    end
  end

  square_wave #(.DIV_W(16)) u_sq (
    .clk, .rst, .en(1'b1), .half_period, .sq(fclk)
  );

endmodule
