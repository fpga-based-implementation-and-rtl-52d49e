// tb_ook_modulator: checks the OOK modulator at its defaults (25 samples per
// bit, codes +2460 / -2460). A byte source offers random bytes with random
// gaps; a reference model built from the accepted bytes predicts, sample by
// sample, the DAC code (most significant bit first, each bit 25 samples, one
// cycle of output register) and the output is compared every cycle. A burst
// of back-to-back bytes must take exactly 8 * 25 cycles per byte (4 Mbit/s at
// 100 MHz), and the idle output must sit at the '0' code.
module tb_ook_modulator;
  localparam int SPB  = vlc_pkg::SAMPLES_PER_BIT;
  localparam int ONE  = 2460;
  localparam int ZERO = -2460;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, tx_bit, active;
  logic [7:0] in_data;
  logic signed [13:0] dac_code;

  ook_modulator dut (.*);

  int checks = 0, failures = 0;

  // cycles the modulator is busy during the back-to-back burst
  bit burst = 0;
  int burst_cycles = 0;
  always @(negedge clk) if (burst && active) burst_cycles++;

  // expected sample stream: queue of bits, one entry per sample
  bit exp_q [$];
  bit last_exp = 0;

  always @(posedge clk) if (rst_n && in_valid && in_ready)
    for (int k = 7; k >= 0; k--) repeat (SPB) exp_q.push_back(in_data[k]);

  // The DAC code of cycle t shows the bit sent in cycle t-1.
  bit pending = 0, pend_bit = 0;
  always @(negedge clk) if (rst_n) begin
    int expect_code;
    expect_code = pending ? (pend_bit ? ONE : ZERO) : ZERO;
    checks++;
    if (int'(dac_code) != expect_code) begin
      failures++;
      if (failures < 10) $display("FAIL: t=%0t dac %0d expected %0d", $time, dac_code, expect_code);
    end
  end
  always @(posedge clk) if (rst_n) begin
    // bit on air during the cycle that just ended
    pending  <= active;
    pend_bit <= tx_bit;
    if (active) begin
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: active with nothing to send");
      end else begin
        checks++;
        if (tx_bit != exp_q[0]) begin
          failures++;
          if (failures < 10) $display("FAIL: bit %0d expected %0d", tx_bit, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
    end
  end

  task automatic offer(logic [7:0] b);
    @(negedge clk) begin in_valid = 1; in_data = b; end
    do @(posedge clk); while (!in_ready);
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    int cycles;
    in_valid = 0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    // random bytes with random gaps
    for (int n = 0; n < 40; n++) begin
      offer(8'($urandom));
      repeat ($urandom_range(300)) @(negedge clk);
    end
    while (active) @(negedge clk);
    // back-to-back burst: keep in_valid high
    burst = 1;
    @(negedge clk) begin in_valid = 1; in_data = 8'hDB; end
    for (int n = 0; n < 20; n++) begin
      do @(posedge clk); while (!in_ready);
      @(negedge clk) in_data = 8'($urandom);
    end
    in_valid = 0;
    while (active) @(negedge clk);
    cycles = burst_cycles;
    checks++;
    if (cycles != 20 * 8 * SPB) begin
      failures++;
      $display("FAIL: 20 bytes took %0d cycles, expected %0d", cycles, 20 * 8 * SPB);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d samples never sent", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
