// tb_ping_detect: scenarios for the silence-then-edge rule, SILENCE_CYCLES = 100.
//  1. quiet channel: armed exactly SILENCE_CYCLES cycles after reset;
//  2. armed, a wobble between the two thresholds: no ping, stays armed;
//  3. armed, an edge beyond PING_THRESH (above and below DC): one ping pulse;
//  4. echo right after a ping, before a new silence: no ping;
//  5. noise above SILENCE_THRESH every 50 cycles: never armed, no ping.
module tb_ping_detect;
  import apl_pkg::*;
  localparam int S = 100, ST = 64, PT = 256;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic sample_valid = 0, armed, ping;
  sample_t sample = 2000, dc = 2000;
  ping_detect #(.SILENCE_CYCLES(S), .SILENCE_THRESH(ST), .PING_THRESH(PT)) dut (
    .clk, .rst, .sample_valid, .sample, .dc, .armed, .ping);

  int pings = 0;
  always @(posedge clk) if (!rst && ping) pings++;

  // one sample every 4 cycles, value dc + offset
  task automatic run(int cycles, int offset, int every = 4);
    for (int i = 0; i < cycles; i++) begin
      sample_valid <= (i % every == 0);
      sample <= sample_t'(2000 + ((i % every == 0) ? offset : 0));
      @(posedge clk);
    end
    sample_valid <= 0; sample <= 2000;
    #1;
  endtask

  int n;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    n = 0;
    while (!armed && n < 1000) begin @(posedge clk); n++; #1; end
    check(n == S, $sformatf("armed after %0d cycles", n));
    run(40, 200);                       // wobble between thresholds
    check(armed && pings == 0, "wobble is not a ping");
    run(8, 300);                        // leading edge above DC
    check(pings == 1 && !armed, $sformatf("edge above DC detected %0d %0d", pings, armed));
    run(40, -300);                      // echo
    check(pings == 1, $sformatf("echo rejected %0d", pings));
    // wait for new silence, then an edge below DC
    run(S + 10, 10);
    check(armed, "re-armed after silence");
    run(8, -400);
    check(pings == 2, "edge below DC detected");
    // noisy channel: a loud sample every 50 cycles keeps it from arming
    for (int k = 0; k < 10; k++) begin run(49, 0, 4); run(1, 100, 1); end
    check(!armed && pings == 2, "noise keeps it disarmed");
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
