// tb_vlc_transceiver: end-to-end test of the whole link at its default
// parameters (25 samples per bit, 1450-byte payload limit).
//
// The DAC output is looped back to the ADC input through the behavioural
// optical channel (optical_channel: gain of 4, a first-order low-pass with a
// corner of about 2 MHz, close to the headlight's bandwidth, and uniform
// noise of +/-NOISE ADC codes). Frames are written into
// the transmit RAM, sent, received and read back from the receive RAM and
// compared byte by byte with what was sent. A bit-level generator in the
// testbench can also drive the ADC directly, to deliver frames the
// transmitter itself refuses to send (a length field above 1450).
//
// Mechanisms that must each occur at least once: a good frame, a full
// 1450-byte frame, an empty frame, a frame refused by the transmitter
// (length error), a receiver drop on a bad footer, a receiver drop on a
// length above the limit, a bit-timing correction in the receiver, and
// back-to-back frames. The transmitter's on-air time for each frame is
// checked against (length + 4) * 8 * 25 cycles, i.e. 4 Mbit/s.
module tb_vlc_transceiver;
  import vlc_pkg::*;

  localparam int SPB   = SAMPLES_PER_BIT;
  localparam int NOISE = 1500;
  localparam int DEPTH = MAX_PAYLOAD + FRAME_OVERHEAD;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;  // 100 MHz

  logic          tx_wr_en;
  logic [AW-1:0] tx_wr_addr;
  logic [7:0]    tx_wr_data;
  logic          tx_start, tx_busy, tx_done, tx_len_error, tx_bit, tx_active;
  logic signed [DAC_W-1:0] dac_code;
  logic signed [ADC_W-1:0] adc_sample;
  logic [AW-1:0] rx_rd_addr;
  logic [7:0]    rx_rd_data;
  logic          rx_frame_valid, rx_header_found, rx_drop, rx_resync, rx_level;
  logic [15:0]   rx_frame_len;
  rx_drop_e      rx_drop_reason;
  rx_state_e     rx_state;
  logic signed [ADC_W-1:0] rx_envelope;

  vlc_transceiver dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- optical channel ----------------
  bit                   use_raw = 0;
  logic signed [DAC_W-1:0] raw_code = -14'sd2460;
  optical_channel u_chan (
    .clk        (clk),
    .dac_code   (use_raw ? raw_code : dac_code),
    .noise      (NOISE),
    .adc_sample (adc_sample)
  );

  // ---------------- event counters ----------------
  int n_tx_done = 0, n_tx_lenerr = 0, n_hdr = 0, n_good = 0;
  int n_drop_footer = 0, n_drop_len = 0, n_resync = 0;
  int active_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (tx_done) n_tx_done++;
    if (tx_len_error) n_tx_lenerr++;
    if (rx_header_found) n_hdr++;
    if (rx_frame_valid) n_good++;
    if (rx_drop && rx_drop_reason == DROP_FOOTER) n_drop_footer++;
    if (rx_drop && rx_drop_reason == DROP_LENGTH) n_drop_len++;
    if (rx_resync) n_resync++;
    if (tx_active) active_cycles++;
  end

  // cycles from the tx_start pulse to the first cycle the modulator sends
  int lat_cnt = -1, max_lat = 0;
  always @(posedge clk) if (rst_n) begin
    if (tx_start) lat_cnt <= 0;
    else if (lat_cnt >= 0) begin
      if (tx_active) begin
        if (lat_cnt > max_lat) max_lat = lat_cnt;
        lat_cnt <= -1;
      end else lat_cnt <= lat_cnt + 1;
    end
  end

  // ---------------- helpers ----------------
  logic [7:0] frame [DEPTH];

  function automatic void build_frame(int len, logic [7:0] footer);
    frame[0] = FRAME_HEADER;
    frame[1] = len[15:8];
    frame[2] = len[7:0];
    for (int i = 0; i < len && i < MAX_PAYLOAD; i++) frame[3+i] = 8'($urandom);
    if (len <= MAX_PAYLOAD) frame[3+len] = footer;
  endfunction

  task automatic load_frame(int nbytes);
    for (int i = 0; i < nbytes; i++) begin
      @(negedge clk);
      tx_wr_en = 1; tx_wr_addr = AW'(i); tx_wr_data = frame[i];
    end
    @(negedge clk) tx_wr_en = 0;
  endtask

  task automatic wait_rx_event(output int kind, input int limit);
    kind = 0;
    for (int c = 0; c < limit && kind == 0; c++) begin
      @(posedge clk);
      #1;
      if (rx_frame_valid) kind = 1;
      else if (rx_drop) kind = 2;
    end
  endtask

  task automatic compare_rx(int len);
    int bad = 0;
    for (int i = 0; i < len + 4; i++) begin
      @(negedge clk) rx_rd_addr = AW'(i);
      @(negedge clk);
      if (rx_rd_data !== frame[i]) bad++;
    end
    check(bad == 0, $sformatf("received frame of %0d bytes differs in %0d bytes", len, bad));
  endtask

  // Send one frame through the whole link and check the outcome.
  task automatic send_frame(int len, bit bad_footer);
    int kind, a0, cyc;
    build_frame(len, bad_footer ? 8'hA4 : FRAME_FOOTER);
    load_frame(len + 4);
    a0 = active_cycles;
    @(negedge clk) tx_start = 1;
    @(negedge clk) tx_start = 0;
    wait_rx_event(kind, (len + 8) * 8 * SPB + 500);
    while (tx_active) @(negedge clk);
    cyc = active_cycles - a0;
    check(cyc == (len + 4) * 8 * SPB,
          $sformatf("on-air time %0d cycles, expected %0d", cyc, (len + 4) * 8 * SPB));
    if (bad_footer) begin
      check(kind == 2 && rx_drop_reason == DROP_FOOTER, "bad footer not dropped");
    end else begin
      check(kind == 1, $sformatf("frame of %0d bytes not received (event %0d)", len, kind));
      check(rx_frame_len == 16'(len), "received length wrong");
      compare_rx(len);
    end
    repeat (50) @(posedge clk);
  endtask

  // Drive raw bits onto the ADC, bypassing the transmitter.
  task automatic send_raw_byte(logic [7:0] b);
    for (int k = 7; k >= 0; k--) begin
      raw_code = b[k] ? 14'sd2460 : -14'sd2460;
      repeat (SPB) @(negedge clk);
    end
  endtask

  initial begin
    int kind, t0;
    tx_wr_en = 0; tx_wr_addr = '0; tx_wr_data = '0; tx_start = 0; rx_rd_addr = '0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (400) @(negedge clk);  // let the channel settle at the '0' level

    send_frame(1, 0);
    send_frame(37, 0);
    send_frame(0, 0);
    send_frame(200, 1);           // corrupted footer
    send_frame(MAX_PAYLOAD, 0);   // largest frame

    // transmitter refuses a length above the limit
    build_frame(MAX_PAYLOAD + 1, FRAME_FOOTER);
    load_frame(4);
    @(negedge clk) tx_start = 1;
    @(negedge clk) tx_start = 0;
    repeat (20) @(negedge clk);
    check(n_tx_lenerr == 1 && !tx_busy && !tx_active, "length error not reported by transmitter");

    // back-to-back: second start given as soon as the first frame is done
    build_frame(12, FRAME_FOOTER);
    load_frame(16);
    @(negedge clk) tx_start = 1;
    @(negedge clk) tx_start = 0;
    wait (tx_done); @(negedge clk);
    wait (!tx_busy); @(negedge clk);
    t0 = n_good;
    tx_start = 1;
    @(negedge clk) tx_start = 0;
    repeat (2 * 16 * 8 * SPB + 500) @(negedge clk);
    check(n_good == t0 + 2, "back-to-back frames not both received");
    compare_rx(12);

    // receiver sees a length field above the limit
    use_raw = 1;
    raw_code = -14'sd2460;
    repeat (100) @(negedge clk);
    fork
      begin
        send_raw_byte(FRAME_HEADER);
        send_raw_byte(8'h05);        // 0x05AB = 1451
        send_raw_byte(8'hAB);
        repeat (8) send_raw_byte(8'h3C);
        raw_code = -14'sd2460;
      end
      wait_rx_event(kind, 20 * 8 * SPB);
    join
    check(kind == 2 && rx_drop_reason == DROP_LENGTH, "oversized length not dropped");
    use_raw = 0;
    repeat (500) @(negedge clk);

    // a last good frame after the errors
    send_frame(5, 0);

    check(n_good >= 1,        "no good frame");
    check(n_drop_footer >= 1, "no footer drop");
    check(n_drop_len >= 1,    "no length drop");
    check(n_tx_lenerr >= 1,   "no transmitter length error");
    check(n_resync >= 1,      "no bit-timing correction");
    check(max_lat > 0 && max_lat < 10, $sformatf("start-to-air latency %0d cycles", max_lat));
    check(n_tx_done == 8,     $sformatf("transmitter finished %0d frames, expected 8", n_tx_done));
    $display("start-to-air latency %0d cycles", max_lat);
    $display("events: tx_done=%0d tx_len_error=%0d header=%0d good=%0d drop_footer=%0d drop_length=%0d resync=%0d",
             n_tx_done, n_tx_lenerr, n_hdr, n_good, n_drop_footer, n_drop_len, n_resync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
