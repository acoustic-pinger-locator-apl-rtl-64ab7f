// mcu_packet: command and status packets between the FPGA and the host computer.
//
// Bytes come from and go to an RS-232 UART through a byte handshake
// (receive: rx_rda says a byte is waiting, a one-cycle rx_rd takes it;
// transmit: while tx_tbe is high a one-cycle tx_wr hands over tx_data).
// The UART is expected to drop rx_rda / tx_tbe within one cycle of the
// strobe; the block leaves a cycle's gap after each strobe for that.
//
// Host to FPGA, 4 bytes:   A5  cmd  arg  chk        chk = A5 ^ cmd ^ arg
//     cmd 01  select filter frequency, arg = table index (see max268_if)
//     cmd 02  set filter Q code, arg = N of Q = 64 / (128 - N)
//     cmd 03  request a status packet
// A packet whose checksum or command is wrong is dropped and counted in
// bad_packets; the receiver then waits for the next A5.
//
// FPGA to host, 11 bytes:  A5 81 mask per_hi per_lo frq_2 frq_1 frq_0 gain_hi gain_lo chk
//     mask    channels whose ping detector fired since the last status
//     per     sample period in clock cycles, frq samples per second,
//     gain    common gain index, chk = XOR of the ten bytes before it.
// A status packet is sent on request and whenever a ping has been detected.
// Exchanging packets with the host over RS-232 follows the design; the packet
// layout is this implementation's own.
module mcu_packet
  import apl_pkg::*;
#(
  parameter int unsigned NUM_CH = apl_pkg::NUM_CH
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        rx_data,
  input  logic              rx_rda,
  output logic              rx_rd,
  output logic [7:0]        tx_data,
  output logic              tx_wr,
  input  logic              tx_tbe,
  input  logic [NUM_CH-1:0] ping,
  input  logic [15:0]       period,
  input  logic [23:0]       freq,
  input  logic [GAIN_W-1:0] gain_idx,
  output logic [4:0]        freq_sel,
  output logic [6:0]        q_n,
  output logic [7:0]        bad_packets
);

  initial assert (NUM_CH <= 8) else $error("ping mask is one byte");

  parameter logic [4:0] FREQ_SEL_RESET = 5'd5;   // 25 kHz
  parameter logic [6:0] Q_N_RESET      = 7'd96;  // Q = 2

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {R_SYNC, R_CMD, R_ARG, R_CHK} rstate_t;
  rstate_t    rstate;
  logic       rd_gap;
  logic [7:0] cmd_q, arg_q;
  logic       status_req;
  logic       tx_busy, wr_gap, tx_start;

  always_ff @(posedge clk) begin
    if (rst) begin
      rstate      <= R_SYNC;
      rd_gap      <= 1'b0;
      rx_rd       <= 1'b0;
      cmd_q       <= '0;
      arg_q       <= '0;
      freq_sel    <= FREQ_SEL_RESET;
      q_n         <= Q_N_RESET;
      bad_packets <= '0;
      status_req  <= 1'b0;
    end else begin
      rx_rd  <= 1'b0;
      rd_gap <= 1'b0;
      if (tx_start) status_req <= 1'b0;
      if (rx_rda && !rd_gap && !rx_rd) begin
        rx_rd  <= 1'b1;
        rd_gap <= 1'b1;
        unique case (rstate)
          R_SYNC: if (rx_data == PKT_SYNC) rstate <= R_CMD;
          R_CMD: begin cmd_q <= rx_data; rstate <= R_ARG; end
          R_ARG: begin arg_q <= rx_data; rstate <= R_CHK; end
          R_CHK: begin
            rstate <= R_SYNC;
            if (rx_data != (PKT_SYNC ^ cmd_q ^ arg_q)) begin
              bad_packets <= bad_packets + 1'b1;
            end else begin
              unique case (cmd_q)
                CMD_SET_FREQ: freq_sel   <= arg_q[4:0];
                CMD_SET_Q:    q_n        <= arg_q[6:0];
                CMD_STATUS:   status_req <= 1'b1;
                default:      bad_packets <= bad_packets + 1'b1;
              endcase
            end
          end
          default: rstate <= R_SYNC;
        endcase
      end
    end
  end

  // ---------------- transmitter ----------------
  logic [7:0] buf_q [STATUS_LEN];
  logic [3:0] tx_idx;
  logic [NUM_CH-1:0] ping_mask;
  logic [7:0] snap [STATUS_LEN];

  assign tx_start = !tx_busy && (status_req || ping_mask != '0);

  always_comb begin
    snap[0] = PKT_SYNC;
    snap[1] = RSP_STATUS;
    snap[2] = 8'(ping_mask);
    snap[3] = period[15:8];
    snap[4] = period[7:0];
    snap[5] = freq[23:16];
    snap[6] = freq[15:8];
    snap[7] = freq[7:0];
    snap[8] = 8'(gain_idx >> 8);
    snap[9] = gain_idx[7:0];
    snap[10] = '0;
    for (int i = 0; i < STATUS_LEN - 1; i++) snap[10] = snap[10] ^ snap[i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_busy   <= 1'b0;
      tx_idx    <= '0;
      tx_wr     <= 1'b0;
      tx_data   <= '0;
      wr_gap    <= 1'b0;
      ping_mask <= '0;
      for (int i = 0; i < STATUS_LEN; i++) buf_q[i] <= '0;
    end else begin
      tx_wr  <= 1'b0;
      wr_gap <= 1'b0;
      ping_mask <= ping_mask | ping;
      if (tx_start) begin
        buf_q     <= snap;
        ping_mask <= ping;
        tx_idx    <= '0;
        tx_busy   <= 1'b1;
      end else if (tx_busy && tx_tbe && !wr_gap && !tx_wr) begin
        tx_data <= buf_q[tx_idx];
        tx_wr   <= 1'b1;
        wr_gap  <= 1'b1;
        if (tx_idx == 4'(STATUS_LEN - 1)) tx_busy <= 1'b0;
        else                              tx_idx  <= tx_idx + 1'b1;
      end
    end
  end

endmodule
