// uart_byte_model: behavioural model of a UART's byte interface for testbenches.
// Receive side: bytes pushed into rx_q are offered one at a time on rx_data
// with rx_rda, a gap of `rx_gap` cycles apart; rx_rd takes the byte and clears
// rx_rda on the next edge.  Transmit side: a tx_wr strobe stores tx_data in
// tx_q, drops tx_tbe on the next edge and raises it again after `tx_busy`
// cycles (the time a real UART needs to shift the byte out).
module uart_byte_model (
  input  logic       clk,
  input  logic       rst,
  output logic [7:0] rx_data,
  output logic       rx_rda,
  input  logic       rx_rd,
  input  logic [7:0] tx_data,
  input  logic       tx_wr,
  output logic       tx_tbe,
  input  int         rx_gap,
  input  int         tx_busy
);
  logic [7:0] rx_q [$];
  logic [7:0] tx_q [$];
  int rx_wait = 0, tx_cnt = 0;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_rda <= 1'b0; rx_data <= '0; rx_wait <= 0;
      tx_tbe <= 1'b1; tx_cnt <= 0;
    end else begin
      if (rx_rda) begin
        if (rx_rd) begin rx_rda <= 1'b0; rx_wait <= rx_gap; end
      end else if (rx_wait > 0) rx_wait <= rx_wait - 1;
      else if (rx_q.size() > 0) begin
        rx_data <= rx_q.pop_front();
        rx_rda  <= 1'b1;
      end
      if (tx_wr) begin
        if (!tx_tbe) $display("FAIL: uart model written while busy");
        tx_q.push_back(tx_data);
        tx_tbe <= 1'b0;
        tx_cnt <= tx_busy;
      end else if (tx_cnt > 1) tx_cnt <= tx_cnt - 1;
      else if (tx_cnt == 1) begin tx_cnt <= 0; tx_tbe <= 1'b1; end
    end
  end
endmodule
