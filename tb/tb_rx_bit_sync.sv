// tb_rx_bit_sync: checks bit recovery at 25 samples per bit. A '1' marker is
// followed by 3000 random bits (runs of equal bits limited to 8), each held
// for 25 samples plus a random -1, 0 or +1 sample of timing jitter, so the
// transmitter's and receiver's bit clocks drift apart and the receiver must
// realign on edges. After the marker every recovered bit must equal the bit
// sent, the number of bits must match, and at least one timing correction
// must have been reported.
module tb_rx_bit_sync;
  localparam int SPB   = vlc_pkg::SAMPLES_PER_BIT;
  localparam int NBITS = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic level, bit_valid, bit_value, resync;

  rx_bit_sync dut (.*);

  int checks = 0, failures = 0;
  bit sent [NBITS];
  bit got  [$];
  int n_resync = 0;
  bit started = 0;

  always @(posedge clk) if (rst_n) begin
    if (resync) n_resync++;
    if (bit_valid) begin
      if (started) got.push_back(bit_value);
      else if (bit_value) started = 1;
    end
  end

  initial begin
    int run;
    run = 0;
    level = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (137) @(negedge clk);
    level = 1;                       // marker bit
    repeat (SPB) @(negedge clk);
    for (int i = 0; i < NBITS; i++) begin
      bit b;
      b = 1'($urandom);
      if (i > 0 && b == sent[i-1]) run++; else run = 1;
      if (run > 8) begin b = !b; run = 1; end
      sent[i] = b;
      level = b;
      repeat (SPB + int'($urandom_range(2)) - 1) @(negedge clk);
    end
    level = 0;
    repeat (3 * SPB) @(negedge clk);
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < NBITS && i < got.size(); i++) if (got[i] != sent[i]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("FAIL: %0d of %0d bits wrong", bad, NBITS); end
      checks++;
      if (got.size() < NBITS || got.size() > NBITS + 3) begin
        failures++; $display("FAIL: %0d bits recovered, expected %0d (+trailing zeros)", got.size(), NBITS);
      end
      checks++;
      if (n_resync == 0) begin failures++; $display("FAIL: no timing correction"); end
    end
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
