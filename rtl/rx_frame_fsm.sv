// rx_frame_fsm: frame receiver. It takes the recovered bits one at a time,
// finds frames in them and writes every received byte of a frame to the
// receive block RAM for the processor.
//
// States:
//   RX_HUNT     every bit is shifted into an 8-bit window; when the window
//               equals the header 1101_1011 the header is written at address
//               0 and the receiver moves on (`header_found` pulses).
//   RX_LEN      16 bits form the payload length, most significant bit first;
//               the two bytes go to addresses 1 and 2. A length above
//               MAX_PAYLOAD is a false detection (drop, reason DROP_LENGTH).
//   RX_PAYLOAD  `length` bytes are collected and written from address 3 on.
//   RX_FOOTER   the next byte, written after the payload, must be the footer
//               1010_0101. If it is, `frame_valid` pulses and `frame_len`
//               holds the payload length; if not, the byte count did not
//               match the length field or the frame was corrupted, and the
//               candidate is dropped (reason DROP_FOOTER).
// After a frame or a drop the receiver returns to RX_HUNT with a cleared
// window, so the search restarts on the bits that follow.
//
// Timing: each state acts on the cycle `bit_valid` is high; a completed byte
// is written to the RAM on the cycle after its last bit. `frame_valid` and
// `drop` are one-cycle pulses one cycle after the last footer bit. A new
// frame overwrites the RAM, so the processor must read a frame before the
// next one arrives (at 4 Mbit/s a header takes 2 us to arrive).
//
// The header search, bit-by-bit reception, byte writes to block RAM, footer
// check and the two false-detection rules follow the published receiver;
// the state encoding, RAM layout (the whole frame, header first) and the
// status signals are this design's.
module rx_frame_fsm #(
  parameter int unsigned MAX_PAYLOAD = vlc_pkg::MAX_PAYLOAD,
  parameter int unsigned DEPTH       = MAX_PAYLOAD + vlc_pkg::FRAME_OVERHEAD,
  parameter int unsigned ADDR_W      = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bit_valid,
  input  logic                bit_value,
  // receive RAM write port
  output logic                ram_we,
  output logic [ADDR_W-1:0]   ram_addr,
  output logic [7:0]          ram_wdata,
  // status
  output vlc_pkg::rx_state_e  state,
  output logic                header_found,
  output logic                frame_valid,
  output logic [15:0]         frame_len,
  output logic                drop,
  output vlc_pkg::rx_drop_e   drop_reason
);
  import vlc_pkg::*;

  logic [14:0] sr;        // last 15 bits shifted in, newest in bit 0
  logic [15:0] sr_next;
  logic [3:0]  bit_cnt;   // bits collected in the current field
  logic [15:0] length;
  logic [15:0] byte_idx;  // RAM address of the byte being collected

  assign sr_next = {sr[14:0], bit_value};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= RX_HUNT;
      sr           <= '0;
      bit_cnt      <= '0;
      length       <= '0;
      byte_idx     <= '0;
      ram_we       <= 1'b0;
      ram_addr     <= '0;
      ram_wdata    <= '0;
      header_found <= 1'b0;
      frame_valid  <= 1'b0;
      frame_len    <= '0;
      drop         <= 1'b0;
      drop_reason  <= DROP_NONE;
    end else begin
      ram_we       <= 1'b0;
      header_found <= 1'b0;
      frame_valid  <= 1'b0;
      drop         <= 1'b0;
      if (bit_valid) begin
        sr      <= sr_next[14:0];
        bit_cnt <= bit_cnt + 4'd1;
        unique case (state)
          RX_HUNT: begin
            if (sr_next[7:0] == FRAME_HEADER) begin
              ram_we       <= 1'b1;
              ram_addr     <= ADDR_W'(POS_HEADER);
              ram_wdata    <= FRAME_HEADER;
              header_found <= 1'b1;
              bit_cnt      <= '0;
              state        <= RX_LEN;
            end
          end
          RX_LEN: begin
            if (bit_cnt == 4'd7) begin
              ram_we    <= 1'b1;
              ram_addr  <= ADDR_W'(POS_LEN_HI);
              ram_wdata <= sr_next[7:0];
            end else if (bit_cnt == 4'd15) begin
              ram_we    <= 1'b1;
              ram_addr  <= ADDR_W'(POS_LEN_LO);
              ram_wdata <= sr_next[7:0];
              length    <= sr_next;
              byte_idx  <= 16'(POS_PAYLOAD);
              bit_cnt   <= '0;
              if (32'(sr_next) > MAX_PAYLOAD) begin
                drop        <= 1'b1;
                drop_reason <= DROP_LENGTH;
                sr          <= '0;
                state       <= RX_HUNT;
              end else if (sr_next == 16'd0) begin
                state <= RX_FOOTER;
              end else begin
                state <= RX_PAYLOAD;
              end
            end
          end
          RX_PAYLOAD: begin
            if (bit_cnt == 4'd7) begin
              ram_we    <= 1'b1;
              ram_addr  <= byte_idx[ADDR_W-1:0];
              ram_wdata <= sr_next[7:0];
              bit_cnt   <= '0;
              byte_idx  <= byte_idx + 16'd1;
              if (byte_idx == length + 16'(POS_PAYLOAD - 1)) state <= RX_FOOTER;
            end
          end
          RX_FOOTER: begin
            if (bit_cnt == 4'd7) begin
              ram_we    <= 1'b1;
              ram_addr  <= byte_idx[ADDR_W-1:0];
              ram_wdata <= sr_next[7:0];
              bit_cnt   <= '0;
              sr        <= '0;
              state     <= RX_HUNT;
              if (sr_next[7:0] == FRAME_FOOTER) begin
                frame_valid <= 1'b1;
                frame_len   <= length;
                drop_reason <= DROP_NONE;
              end else begin
                drop        <= 1'b1;
                drop_reason <= DROP_FOOTER;
              end
            end
          end
          default: state <= RX_HUNT;
        endcase
      end
    end
  end

  // Nothing is written past the end of the frame buffer.
  a_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    ram_we |-> (32'(ram_addr) < DEPTH));

endmodule
