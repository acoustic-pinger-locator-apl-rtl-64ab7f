// tb_mcu_packet: host packets through the UART byte-interface model.
// Checks: reset values; set-frequency and set-Q commands take effect; bad
// checksums and unknown commands are counted and ignored; garbage before the
// sync byte is skipped; a status request is answered with an 11-byte packet
// whose fields and XOR checksum match the inputs; a ping pulse sends a status
// packet by itself with that channel's bit set; the UART is never written
// while busy.
module tb_mcu_packet;
  import apl_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [7:0] rx_data, tx_data, bad_packets;
  logic rx_rda, rx_rd, tx_wr, tx_tbe;
  logic [NUM_CH-1:0] ping = 0;
  logic [15:0] period = 16'h1234;
  logic [23:0] freq = 24'h0A_BCDE;
  logic [GAIN_W-1:0] gain_idx = 9'h1F3;
  logic [4:0] freq_sel;
  logic [6:0] q_n;

  mcu_packet dut (.clk, .rst, .rx_data, .rx_rda, .rx_rd, .tx_data, .tx_wr, .tx_tbe,
                  .ping, .period, .freq, .gain_idx, .freq_sel, .q_n, .bad_packets);
  uart_byte_model uart (.clk, .rst, .rx_data, .rx_rda, .rx_rd, .tx_data, .tx_wr, .tx_tbe,
                        .rx_gap(3), .tx_busy(12));

  task automatic send_pkt(logic [7:0] cmd, logic [7:0] arg, bit good = 1);
    uart.rx_q.push_back(8'hA5); uart.rx_q.push_back(cmd); uart.rx_q.push_back(arg);
    uart.rx_q.push_back(8'hA5 ^ cmd ^ arg ^ (good ? 8'h00 : 8'h01));
    while (uart.rx_q.size() > 0 || rx_rda) @(posedge clk);
    repeat (4) @(posedge clk); #1;
  endtask

  task automatic check_status(logic [7:0] mask);
    logic [7:0] x;
    repeat (400) @(posedge clk);
    check(uart.tx_q.size() == 11, $sformatf("status length %0d", uart.tx_q.size()));
    if (uart.tx_q.size() == 11) begin
      x = 0;
      for (int i = 0; i < 10; i++) x ^= uart.tx_q[i];
      check(uart.tx_q[0] == 8'hA5 && uart.tx_q[1] == 8'h81, "status header");
      check(uart.tx_q[2] == mask, $sformatf("ping mask %h", uart.tx_q[2]));
      check({uart.tx_q[3], uart.tx_q[4]} == period, "period field");
      check({uart.tx_q[5], uart.tx_q[6], uart.tx_q[7]} == freq, "frequency field");
      check({uart.tx_q[8], uart.tx_q[9]} == 16'(gain_idx), "gain field");
      check(uart.tx_q[10] == x, "status checksum");
    end
    uart.tx_q.delete();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check(freq_sel == 5 && q_n == 96 && bad_packets == 0, "reset values");
    send_pkt(8'h01, 8'd12);
    check(freq_sel == 12, "set frequency");
    send_pkt(8'h02, 8'd100);
    check(q_n == 100, "set Q");
    send_pkt(8'h01, 8'd3, 0);
    check(freq_sel == 12 && bad_packets == 1, "bad checksum ignored and counted");
    send_pkt(8'h44, 8'd0);
    check(bad_packets == 2, "unknown command counted");
    uart.rx_q.push_back(8'h00); uart.rx_q.push_back(8'h17);
    send_pkt(8'h02, 8'd64);
    check(q_n == 64, "resynchronises on the sync byte");
    check(uart.tx_q.size() == 0, "nothing sent unasked");
    send_pkt(8'h03, 8'd0);
    check_status(8'h00);
    ping <= 5'b00100; @(posedge clk); ping <= 0;
    check_status(8'h04);
    repeat (50) @(posedge clk);
    check(uart.tx_q.size() == 0, "mask cleared after report");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
