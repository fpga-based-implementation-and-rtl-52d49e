// tb_envelope_threshold: checks the envelope detector and slicer at their
// defaults (4-sample moving average, threshold 0). Random ADC samples are
// fed, alternating between full-range noise and an OOK-like signal around
// zero; a model in the testbench keeps the last four samples, and every
// cycle the registered envelope must equal their sum shifted right by two
// (arithmetic) and `level` must be 1 exactly when that average is above 0.
module tb_envelope_threshold;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [15:0] adc_sample, envelope;
  logic level;

  envelope_threshold dut (.*);

  int checks = 0, failures = 0;
  int hist [4] = '{0, 0, 0, 0};
  int n_high = 0, n_low = 0;

  initial begin
    adc_sample = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int s, sum, avg;
      if ((n / 1000) % 2 == 0) s = int'($urandom_range(65535)) - 32768;
      else s = (((n / 25) % 2 != 0) ? 9000 : -9000) + int'($urandom_range(4000)) - 2000;
      if (n % 997 == 0) s = 0;
      adc_sample = 16'(s);
      for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = s;
      sum = hist[0] + hist[1] + hist[2] + hist[3];
      avg = sum >>> 2;
      @(negedge clk);
      checks++;
      if (int'(envelope) != avg || level != (avg > 0)) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d envelope %0d level %0d expected %0d %0d",
                                    n, envelope, level, avg, avg > 0);
      end
      if (level) n_high++; else n_low++;
    end
    checks++;
    if (n_high == 0 || n_low == 0) begin failures++; $display("FAIL: level never toggled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
