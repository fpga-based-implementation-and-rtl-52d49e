// tb_vlc_packet_stream: the link's measurement workload, scaled down. Streams
// of frames with the largest payload (1450 bytes) are sent through the
// behavioural optical channel (optical_channel: gain 4, about 2 MHz
// low-pass, uniform noise) and received, at three noise levels (+/-3000, +/-9000 and
// +/-12000 ADC codes) that stand in
// for increasing distance. For each frame the processor-side actions are
// modelled: write the frame into the transmit RAM, start, and after
// reception read the payload back from the receive RAM.
//
// For each noise level the testbench reports the packet loss ratio, the bit
// error ratio over the received payloads, the receiver's drops and the
// payload data rate. It checks that
//   - at +/-3000 codes (received swing +/-9840) no packet is lost, no bit is
//     wrong, and the payload rate is above 3.9 Mbit/s (the line rate is
//     4 Mbit/s; header, length, footer and loading the next frame take the
//     rest);
//   - at +/-12000 codes packets are lost and the receiver reports false
//     detections; after the noise, and an idle time as long as the largest
//     frame, the receiver is hunting again and frames arrive again.
module tb_vlc_packet_stream;
  import vlc_pkg::*;

  localparam int SPB   = SAMPLES_PER_BIT;
  localparam int LEN   = MAX_PAYLOAD;
  localparam int DEPTH = MAX_PAYLOAD + FRAME_OVERHEAD;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

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

  int noise = 0;

  vlc_transceiver dut (.*);

  optical_channel u_chan (
    .clk        (clk),
    .dac_code   (dac_code),
    .noise      (noise),
    .adc_sample (adc_sample)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] frame [DEPTH];
  longint cycles = 0;
  int n_drop = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (rx_drop) n_drop++;
  end

  // Send npkt frames at the given noise level.
  task automatic run_point(input int level, input int npkt,
                           output int received, output int bit_errors, output int drops,
                           output real rate);
    int bits, d0;
    longint c0, c1;
    noise = level;
    received = 0; bit_errors = 0; bits = 0;
    d0 = n_drop;
    repeat (200) @(negedge clk);
    c0 = cycles;
    for (int p = 0; p < npkt; p++) begin
      bit got;
      got = 0;
      frame[0] = FRAME_HEADER; frame[1] = 8'(LEN >> 8); frame[2] = 8'(LEN);
      for (int i = 0; i < LEN; i++) frame[3+i] = 8'($urandom);
      frame[3+LEN] = FRAME_FOOTER;
      for (int i = 0; i < LEN + 4; i++) begin
        @(negedge clk);
        tx_wr_en = 1; tx_wr_addr = AW'(i); tx_wr_data = frame[i];
      end
      @(negedge clk) begin tx_wr_en = 0; tx_start = 1; end
      @(negedge clk) tx_start = 0;
      for (int c = 0; c < (LEN + 6) * 8 * SPB && !got; c++) begin
        @(negedge clk);
        if (rx_frame_valid && rx_frame_len == 16'(LEN)) got = 1;
      end
      while (tx_busy) @(negedge clk);
      if (got) begin
        received++;
        for (int i = 3; i < LEN + 3; i++) begin
          rx_rd_addr = AW'(i);
          @(negedge clk);
          for (int k = 0; k < 8; k++) if (rx_rd_data[k] != frame[i][k]) bit_errors++;
          bits += 8;
        end
      end
    end
    c1 = cycles;
    drops = n_drop - d0;
    // the payload read-back (one cycle per byte) is the processor's time,
    // not the link's: leave it out of the rate
    rate = real'(received) * LEN * 8 /
           (real'(c1 - c0 - longint'(received) * LEN) * 10.0e-9) / 1.0e6;
    $display("noise +/-%0d: packets %0d received %0d loss %0.1f%% bit errors %0d of %0d drops %0d payload rate %0.3f Mbit/s",
             level, npkt, received, 100.0 * real'(npkt - received) / real'(npkt),
             bit_errors, bits, drops, rate);
  endtask

  initial begin
    int rcv, errs, drops;
    real rate;
    tx_wr_en = 0; tx_wr_addr = '0; tx_wr_data = '0; tx_start = 0; rx_rd_addr = '0;
    repeat (5) @(negedge clk);
    rst_n = 1;

    run_point(3000, 40, rcv, errs, drops, rate);
    check(rcv == 40, "packets lost at low noise");
    check(errs == 0, "bit errors at low noise");
    check(rate > 3.9 && rate <= 4.0, "payload data rate out of range");

    run_point(9000, 8, rcv, errs, drops, rate);

    run_point(12000, 8, rcv, errs, drops, rate);
    check(rcv < 8, "no packet lost at very high noise");
    check(drops > 0, "no false detection at very high noise");

    // A false frame the receiver locked onto in the noise ends, at the
    // latest, one largest frame later (its footer check fails on the idle
    // '0' bits). After that much idle time clean frames must all arrive.
    noise = 0;
    repeat ((LEN + 4) * 8 * SPB) @(negedge clk);
    check(rx_state == RX_HUNT, "receiver not hunting after a long idle time");
    run_point(0, 3, rcv, errs, drops, rate);
    check(rcv == 3 && errs == 0, "link did not recover after the noisy run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
