// tx_frame_reader: fetches a stored frame from the transmit block RAM one byte
// at a time and hands the bytes, in order, to the OOK modulator.
//
// The processor builds the whole frame in the RAM (header, 16-bit length,
// payload, footer) and pulses `start`. The reader first reads the two length
// bytes (addresses 1 and 2, most significant byte first) to learn how many
// bytes the frame has, rejects a length above MAX_PAYLOAD with a one-cycle
// `len_error` pulse, and otherwise streams bytes 0 .. length+3 over a
// valid/ready handshake. `done`
// pulses when the footer has been accepted. A byte is fetched as soon as the
// previous one is accepted, so the next byte waits at the modulator's input
// long before it is needed and the bit stream has no gaps. `start` while busy
// is ignored.
//
// Reading byte by byte from block RAM follows the published design; fetching
// the length first, the length check on the transmit side and the handshake
// are this design's own choices.
module tx_frame_reader #(
  parameter int unsigned MAX_PAYLOAD = vlc_pkg::MAX_PAYLOAD,
  parameter int unsigned DEPTH       = MAX_PAYLOAD + vlc_pkg::FRAME_OVERHEAD,
  parameter int unsigned ADDR_W      = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              len_error,
  // block RAM read port, data valid one cycle after the address
  output logic [ADDR_W-1:0] ram_addr,
  input  logic [7:0]        ram_rdata,
  // byte stream toward the modulator
  output logic              out_valid,
  output logic [7:0]        out_data,
  input  logic              out_ready
);

  typedef enum logic [2:0] {
    S_IDLE,   // waiting for start
    S_LEN1,   // address of length high byte on the RAM
    S_LEN2,   // address of length low byte on the RAM, high byte returning
    S_LEN3,   // low byte returning
    S_CHECK,  // compare the length with the limit
    S_FETCH,  // address of the next frame byte on the RAM
    S_LOAD,   // frame byte returning
    S_SEND    // byte offered to the modulator
  } state_e;

  state_e      state;
  logic [15:0] length;
  logic [15:0] idx;       // index of the byte being fetched or sent
  logic [15:0] last_idx;  // index of the footer

  always_comb begin
    unique case (state)
      S_LEN1:  ram_addr = ADDR_W'(vlc_pkg::POS_LEN_HI);
      S_LEN2:  ram_addr = ADDR_W'(vlc_pkg::POS_LEN_LO);
      default: ram_addr = idx[ADDR_W-1:0];
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      length    <= '0;
      idx       <= '0;
      last_idx  <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      done      <= 1'b0;
      len_error <= 1'b0;
    end else begin
      done      <= 1'b0;
      len_error <= 1'b0;
      unique case (state)
        S_IDLE:  if (start) state <= S_LEN1;
        S_LEN1:  state <= S_LEN2;
        S_LEN2:  begin length[15:8] <= ram_rdata; state <= S_LEN3; end
        S_LEN3:  begin length[7:0]  <= ram_rdata; state <= S_CHECK; end
        S_CHECK: begin
          if (32'(length) > MAX_PAYLOAD) begin
            len_error <= 1'b1;
            state     <= S_IDLE;
          end else begin
            idx      <= '0;
            last_idx <= length + 16'(vlc_pkg::FRAME_OVERHEAD - 1);
            state    <= S_FETCH;
          end
        end
        S_FETCH: state <= S_LOAD;
        S_LOAD: begin
          out_valid <= 1'b1;
          out_data  <= ram_rdata;
          state     <= S_SEND;
        end
        S_SEND: begin
          if (out_ready) begin
            out_valid <= 1'b0;
                  if (idx == last_idx) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              idx   <= idx + 16'd1;
              state <= S_FETCH;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A byte on offer stays on offer, unchanged, until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (out_valid && !out_ready) |=> (out_valid && $stable(out_data));
  endproperty
  a_hold: assert property (p_hold);

endmodule
