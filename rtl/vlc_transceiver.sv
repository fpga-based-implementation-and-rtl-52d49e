// vlc_transceiver: programmable-logic side of a vehicular visible-light link
// that uses on-off keying (OOK) of an LED headlight.
//
// Transmit path: the processor writes a complete frame (header 1101_1011,
// 16-bit payload length, up to MAX_PAYLOAD data bytes, footer 1010_0101)
// into the transmit frame RAM and pulses `tx_start`. tx_frame_reader fetches
// the frame byte by byte and ook_modulator turns each bit into
// SAMPLES_PER_BIT samples of a '1' or '0' code for the 14-bit DAC, which
// drives the headlight through a bias tee. At a 100 MHz clock and 25 samples
// per bit the link runs at 4 Mbit/s.
//
// Receive path: 16-bit photodetector samples from the ADC go through
// envelope_threshold (moving-average envelope, fixed threshold),
// rx_bit_sync (one bit per bit period, sampled mid-bit) and rx_frame_fsm
// (header search, length, payload, footer check), which writes the frame
// into the receive frame RAM. `rx_frame_valid` tells the processor a frame
// is ready to be read through `rx_rd_addr`/`rx_rd_data` (one cycle latency);
// `rx_drop` reports a false detection.
//
// In the field the two paths sit on two boards, one in each vehicle; here
// they are one module with independent ports, so a board can use either path
// and a test can close the optical loop outside. The processor software
// (UDP/Ethernet handling), the DAC and ADC, bias tee, LED and photodetector
// are outside this module. Everything runs on one clock with an active-low
// asynchronous reset.
module vlc_transceiver #(
  parameter int unsigned SAMPLES_PER_BIT = vlc_pkg::SAMPLES_PER_BIT,
  parameter int unsigned MAX_PAYLOAD     = vlc_pkg::MAX_PAYLOAD,
  parameter int          ONE_CODE        = 2460,
  parameter int          ZERO_CODE       = -2460,
  parameter int unsigned AVG_LOG2        = 2,
  parameter int          THRESHOLD       = 0,
  parameter int unsigned DEPTH           = MAX_PAYLOAD + vlc_pkg::FRAME_OVERHEAD,
  parameter int unsigned ADDR_W          = $clog2(DEPTH)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // processor side, transmit
  input  logic                             tx_wr_en,
  input  logic [ADDR_W-1:0]                tx_wr_addr,
  input  logic [7:0]                       tx_wr_data,
  input  logic                             tx_start,
  output logic                             tx_busy,
  output logic                             tx_done,
  output logic                             tx_len_error,
  // DAC, one sample per clock
  output logic signed [vlc_pkg::DAC_W-1:0] dac_code,
  output logic                             tx_bit,
  output logic                             tx_active,
  // ADC, one sample per clock
  input  logic signed [vlc_pkg::ADC_W-1:0] adc_sample,
  // processor side, receive
  input  logic [ADDR_W-1:0]                rx_rd_addr,
  output logic [7:0]                       rx_rd_data,
  output logic                             rx_frame_valid,
  output logic [15:0]                      rx_frame_len,
  output logic                             rx_header_found,
  output logic                             rx_drop,
  output vlc_pkg::rx_drop_e                rx_drop_reason,
  output logic                             rx_resync,
  output logic signed [vlc_pkg::ADC_W-1:0] rx_envelope,
  output logic                             rx_level,
  output vlc_pkg::rx_state_e               rx_state
);

  // ---------------- transmit ----------------
  logic [ADDR_W-1:0] txr_addr;
  logic [7:0]        txr_data;
  logic              tb_valid, tb_ready;
  logic [7:0]        tb_data;

  frame_bram #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_tx_ram (
    .clk     (clk),
    .a_we    (tx_wr_en),
    .a_addr  (tx_wr_addr),
    .a_wdata (tx_wr_data),
    .b_addr  (txr_addr),
    .b_rdata (txr_data)
  );

  tx_frame_reader #(.MAX_PAYLOAD(MAX_PAYLOAD), .DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_reader (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (tx_start),
    .busy      (tx_busy),
    .done      (tx_done),
    .len_error (tx_len_error),
    .ram_addr  (txr_addr),
    .ram_rdata (txr_data),
    .out_valid (tb_valid),
    .out_data  (tb_data),
    .out_ready (tb_ready)
  );

  ook_modulator #(
    .SAMPLES_PER_BIT (SAMPLES_PER_BIT),
    .DAC_W           (vlc_pkg::DAC_W),
    .ONE_CODE        (ONE_CODE),
    .ZERO_CODE       (ZERO_CODE)
  ) u_mod (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (tb_valid),
    .in_data  (tb_data),
    .in_ready (tb_ready),
    .dac_code (dac_code),
    .tx_bit   (tx_bit),
    .active   (tx_active)
  );

  // ---------------- receive ----------------
  logic                             rx_bit_valid, rx_bit_value;
  logic                             rxw_we;
  logic [ADDR_W-1:0]                rxw_addr;
  logic [7:0]                       rxw_data;

  envelope_threshold #(
    .ADC_W     (vlc_pkg::ADC_W),
    .AVG_LOG2  (AVG_LOG2),
    .THRESHOLD (THRESHOLD)
  ) u_env (
    .clk        (clk),
    .rst_n      (rst_n),
    .adc_sample (adc_sample),
    .envelope   (rx_envelope),
    .level      (rx_level)
  );

  rx_bit_sync #(.SAMPLES_PER_BIT(SAMPLES_PER_BIT)) u_sync (
    .clk       (clk),
    .rst_n     (rst_n),
    .level     (rx_level),
    .bit_valid (rx_bit_valid),
    .bit_value (rx_bit_value),
    .resync    (rx_resync)
  );

  rx_frame_fsm #(.MAX_PAYLOAD(MAX_PAYLOAD), .DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_rx (
    .clk          (clk),
    .rst_n        (rst_n),
    .bit_valid    (rx_bit_valid),
    .bit_value    (rx_bit_value),
    .ram_we       (rxw_we),
    .ram_addr     (rxw_addr),
    .ram_wdata    (rxw_data),
    .state        (rx_state),
    .header_found (rx_header_found),
    .frame_valid  (rx_frame_valid),
    .frame_len    (rx_frame_len),
    .drop         (rx_drop),
    .drop_reason  (rx_drop_reason)
  );

  frame_bram #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_rx_ram (
    .clk     (clk),
    .a_we    (rxw_we),
    .a_addr  (rxw_addr),
    .a_wdata (rxw_data),
    .b_addr  (rx_rd_addr),
    .b_rdata (rx_rd_data)
  );

endmodule
