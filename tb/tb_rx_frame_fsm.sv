// tb_rx_frame_fsm: checks the frame receiver at the default 1450-byte limit
// by feeding it bits directly (one bit every three cycles). Each case is
// preceded by idle zeros and has a known outcome:
//   good frames of 0, 1, 60 and 1450 bytes, one whose payload holds the
//   header pattern            -> frame_valid with the length, and the RAM
//                                holds header, length, payload and footer
//   wrong footer byte         -> drop, reason DROP_FOOTER
//   length 1451 and 0xFFFF    -> drop, reason DROP_LENGTH, right after the
//                                length field, nothing written past it
//   a length 1451 candidate followed at once by a good frame
//                             -> drop, then the good frame is received
// The testbench counts every header detection, good frame and drop and
// compares them with the expected totals.
module tb_rx_frame_fsm;
  import vlc_pkg::*;
  localparam int DEPTH = MAX_PAYLOAD + FRAME_OVERHEAD;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          bit_valid, bit_value, ram_we, header_found, frame_valid, drop;
  logic [AW-1:0] ram_addr;
  logic [7:0]    ram_wdata;
  logic [15:0]   frame_len;
  rx_state_e     state;
  rx_drop_e      drop_reason;

  rx_frame_fsm dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] ram [DEPTH];
  int n_hdr = 0, n_good = 0, n_dlen = 0, n_dfoot = 0, max_wr = 0;
  int last_len = -1;
  always @(posedge clk) if (rst_n) begin
    if (ram_we) begin
      ram[ram_addr] <= ram_wdata;
      if (int'(ram_addr) > max_wr) max_wr = int'(ram_addr);
    end
    if (header_found) n_hdr++;
    if (frame_valid) begin n_good++; last_len = int'(frame_len); end
    if (drop && drop_reason == DROP_LENGTH) n_dlen++;
    if (drop && drop_reason == DROP_FOOTER) n_dfoot++;
  end

  logic [7:0] frame [DEPTH];

  task automatic send_bit(bit b);
    @(negedge clk) begin bit_valid = 1; bit_value = b; end
    @(negedge clk) bit_valid = 0;
    @(negedge clk);
  endtask
  task automatic send_byte(logic [7:0] b);
    for (int k = 7; k >= 0; k--) send_bit(b[k]);
  endtask
  task automatic idle(int n);
    repeat (n) send_bit(0);
  endtask

  // len: length field; nsend: payload bytes actually sent
  task automatic send_frame(int len, int nsend, logic [7:0] footer, bit with_hdr_in_payload);
    frame[0] = FRAME_HEADER; frame[1] = len[15:8]; frame[2] = len[7:0];
    send_byte(frame[0]); send_byte(frame[1]); send_byte(frame[2]);
    for (int i = 0; i < nsend; i++) begin
      logic [7:0] b;
      b = (with_hdr_in_payload && i % 3 == 0) ? FRAME_HEADER : 8'($urandom);
      if (i + 3 < DEPTH) frame[3+i] = b;
      send_byte(b);
    end
    if (nsend + 3 < DEPTH) frame[3+nsend] = footer;
    send_byte(footer);
  endtask

  task automatic expect_good(int len);
    int bad = 0;
    repeat (3) @(negedge clk);
    check(last_len == len, $sformatf("frame of %0d bytes: reported length %0d", len, last_len));
    for (int i = 0; i < len + 4; i++) if (ram[i] !== frame[i]) bad++;
    check(bad == 0, $sformatf("frame of %0d bytes: %0d RAM bytes wrong", len, bad));
  endtask

  initial begin
    int g, dl, df;
    bit_valid = 0; bit_value = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    idle(20);

    g = n_good; send_frame(60, 60, FRAME_FOOTER, 0); idle(5);
    check(n_good == g + 1, "60-byte frame not received"); expect_good(60);

    g = n_good; send_frame(0, 0, FRAME_FOOTER, 0); idle(5);
    check(n_good == g + 1, "empty frame not received"); expect_good(0);

    g = n_good; send_frame(1, 1, FRAME_FOOTER, 0); idle(5);
    check(n_good == g + 1, "1-byte frame not received"); expect_good(1);

    g = n_good; send_frame(30, 30, FRAME_FOOTER, 1); idle(5);
    check(n_good == g + 1, "frame with header bytes in payload not received"); expect_good(30);

    df = n_dfoot; g = n_good; send_frame(20, 20, 8'hA7, 0); idle(5);
    check(n_dfoot == df + 1 && n_good == g, "wrong footer not dropped");

    // byte count shorter than the length field: footer arrives too early
    df = n_dfoot; g = n_good; send_frame(20, 19, FRAME_FOOTER, 0); idle(20);
    check(n_dfoot == df + 1 && n_good == g, "short frame not dropped");

    dl = n_dlen; max_wr = 0;
    send_byte(FRAME_HEADER); send_byte(8'h05); send_byte(8'hAB); idle(2);
    check(n_dlen == dl + 1, "length 1451 not dropped");
    check(max_wr == int'(POS_LEN_LO), $sformatf("wrote up to address %0d after a bad length", max_wr));
    check(state == RX_HUNT, "not hunting after a bad length");
    idle(5);

    dl = n_dlen;
    send_byte(FRAME_HEADER); send_byte(8'hFF); send_byte(8'hFF); idle(2);
    check(n_dlen == dl + 1, "length 0xFFFF not dropped");
    idle(5);

    // bad candidate followed at once by a good frame
    dl = n_dlen; g = n_good;
    send_byte(FRAME_HEADER); send_byte(8'h05); send_byte(8'hAB);
    send_frame(9, 9, FRAME_FOOTER, 0); idle(5);
    check(n_dlen == dl + 1 && n_good == g + 1, "good frame after a dropped candidate lost");
    expect_good(9);

    g = n_good; send_frame(MAX_PAYLOAD, MAX_PAYLOAD, FRAME_FOOTER, 0); idle(5);
    check(n_good == g + 1, "1450-byte frame not received"); expect_good(MAX_PAYLOAD);

    check(n_hdr == 11, $sformatf("%0d headers found, expected 11", n_hdr));
    check(n_good == 6 && n_dfoot == 2 && n_dlen == 3,
          $sformatf("totals good=%0d footer=%0d length=%0d", n_good, n_dfoot, n_dlen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
