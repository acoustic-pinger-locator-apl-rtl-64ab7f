// tb_analog_sample: checks simultaneous sampling against three converter models.
// Each model answers a start pulse with a done pulse after a random 3..20
// cycles and fresh random data.  The bench checks that every sample set holds
// exactly the data of the latest conversion in the documented channel order,
// that one strobe follows each conversion round, that no start is issued while
// a converter is still busy, and that a new start follows each strobe at once.
module tb_analog_sample;
  import apl_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic adc_start, sample_valid;
  logic [NUM_ADC-1:0] adc_done;
  sample_t adc_data [NUM_ADC][2];
  sample_t samples [NUM_CH];

  analog_sample dut (.clk, .rst, .enable(1'b1), .adc_start, .adc_done, .adc_data, .samples, .sample_valid);

  int busy_left [NUM_ADC];
  sample_t truth [NUM_ADC][2];
  int rounds = 0, starts = 0, last_valid_cycle = -10, cycle = 0;

  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    for (int a = 0; a < NUM_ADC; a++) begin
      adc_done[a] <= 1'b0;
      if (rst) busy_left[a] <= 0;
      else if (adc_start) begin
        if (busy_left[a] != 0) begin failures++; $display("FAIL: start while busy"); end
        busy_left[a] <= 3 + int'($urandom_range(17));
      end else if (busy_left[a] == 1) begin
        adc_done[a] <= 1'b1;
        adc_data[a][0] <= sample_t'($urandom);
        adc_data[a][1] <= sample_t'($urandom);
        busy_left[a] <= 0;
      end else if (busy_left[a] > 1) busy_left[a] <= busy_left[a] - 1;
    end
  end

  // keep what each converter last delivered
  always @(posedge clk) for (int a = 0; a < NUM_ADC; a++) if (adc_done[a]) truth[a] = adc_data[a];

  always @(posedge clk) if (!rst) begin
    if (adc_start) begin
      starts++;
      if (rounds > 0) check(last_valid_cycle == cycle - 1, "start right after strobe");
    end
    if (sample_valid) begin
      rounds++;
      last_valid_cycle = cycle;
      for (int c = 0; c < NUM_CH; c++)
        check(samples[c] == truth[c/2][c%2], $sformatf("channel %0d data", c));
      check(starts == rounds, "one strobe per conversion");
      for (int a = 0; a < NUM_ADC; a++) check(busy_left[a] == 0, "all converters finished");
    end
  end

  initial begin
    for (int a = 0; a < NUM_ADC; a++) begin adc_data[a][0] = 0; adc_data[a][1] = 0; end
    adc_done = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (rounds == 200);
    @(posedge clk);
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
