// tb_tx_frame_reader: checks the transmit frame reader against a frame RAM
// model (one-cycle read latency) at the default 1450-byte limit. Frames of
// several lengths, up to the largest, are stored; after `start` the bytes
// taken over the valid/ready handshake (with a sink that stalls at random)
// must be exactly header, length, payload and footer, `done` must pulse once
// after the footer is taken, and a length of 1451 must give `len_error` and
// no bytes. A byte on offer must not change while it waits.
module tb_tx_frame_reader;
  import vlc_pkg::*;
  localparam int DEPTH = MAX_PAYLOAD + FRAME_OVERHEAD;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start, busy, done, len_error, out_valid, out_ready;
  logic [AW-1:0] ram_addr;
  logic [7:0]    ram_rdata, out_data;

  tx_frame_reader dut (.*);

  logic [7:0] mem [DEPTH];
  always_ff @(posedge clk) ram_rdata <= mem[ram_addr];

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // sink: random stalls, records bytes
  logic [7:0] got [$];
  int n_done = 0, n_err = 0;
  always @(negedge clk) out_ready = ($urandom_range(3) == 0);
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) got.push_back(out_data);
    if (done) n_done++;
    if (len_error) n_err++;
  end

  task automatic run(int len);
    int d0, e0, total;
    mem[0] = FRAME_HEADER; mem[1] = len[15:8]; mem[2] = len[7:0];
    for (int i = 0; i < len && i < MAX_PAYLOAD; i++) mem[3+i] = 8'($urandom);
    if (len <= MAX_PAYLOAD) mem[3+len] = FRAME_FOOTER;
    got.delete();
    d0 = n_done; e0 = n_err;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    total = (len <= MAX_PAYLOAD) ? len + 4 : 0;
    for (int c = 0; c < 10 * total + 50 && busy; c++) @(negedge clk);
    repeat (3) @(negedge clk);
    if (len > MAX_PAYLOAD) begin
      check(n_err == e0 + 1 && n_done == d0, $sformatf("length %0d not refused", len));
      check(got.size() == 0, "bytes sent for a refused frame");
    end else begin
      int bad = 0;
      check(n_done == d0 + 1 && n_err == e0, $sformatf("length %0d: done not pulsed once", len));
      check(got.size() == total, $sformatf("length %0d: %0d bytes sent, expected %0d", len, got.size(), total));
      for (int i = 0; i < total && i < got.size(); i++) if (got[i] !== mem[i]) bad++;
      check(bad == 0, $sformatf("length %0d: %0d bytes differ", len, bad));
    end
  endtask

  initial begin
    start = 0;
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0);
    run(1);
    run(100);
    run(MAX_PAYLOAD + 1);
    run(300);
    run(MAX_PAYLOAD);
    run(65535);
    run(7);
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
