// tb_frame_bram: checks the frame RAM at its default depth (1454 bytes).
// Every address is written with a random byte, then all are read back in
// random order through the read port, checking the one-cycle read latency,
// then a second pass of overwrites is checked, including a read of an
// address on the same cycle it is written (the old byte must come back).
module tb_frame_bram;
  localparam int DEPTH = vlc_pkg::MAX_PAYLOAD + vlc_pkg::FRAME_OVERHEAD;
  localparam int AW    = $clog2(DEPTH);

  logic          clk = 0;
  logic          a_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [7:0]    a_wdata, b_rdata;
  always #5 clk = ~clk;

  frame_bram dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] model [DEPTH];

  task automatic read_check(int addr);
    @(negedge clk) b_addr = AW'(addr);
    @(negedge clk);
    checks++;
    if (b_rdata !== model[addr]) begin
      failures++;
      $display("FAIL: addr %0d read %02h expected %02h", addr, b_rdata, model[addr]);
    end
  endtask

  initial begin
    a_we = 0; a_addr = '0; a_wdata = '0; b_addr = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_we = 1; a_addr = AW'(i); a_wdata = 8'($urandom); model[i] = a_wdata;
    end
    @(negedge clk) a_we = 0;
    for (int n = 0; n < DEPTH; n++) read_check(int'($urandom_range(DEPTH - 1)));
    read_check(0);
    read_check(DEPTH - 1);
    // read and write the same address in one cycle: read returns old data
    for (int n = 0; n < 200; n++) begin
      int a;
      logic [7:0] old;
      a = int'($urandom_range(DEPTH - 1));
      old = model[a];
      @(negedge clk);
      a_we = 1; a_addr = AW'(a); a_wdata = 8'($urandom); b_addr = AW'(a);
      model[a] = a_wdata;
      @(negedge clk) a_we = 0;
      checks++;
      if (b_rdata !== old) begin
        failures++;
        $display("FAIL: read-during-write at %0d gave %02h expected old %02h", a, b_rdata, old);
      end
      read_check(a);
    end
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
