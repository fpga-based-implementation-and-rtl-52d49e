// frame_bram: byte-wide simple dual-port block RAM that holds one frame.
// Two instances are used by the link: on the transmit side the processor
// writes a frame through port A and the frame reader fetches it through port
// B; on the receive side the frame receiver writes port A and the processor
// reads port B. Port A is write-only, port B is read-only with one cycle of
// read latency (registered output, as a block RAM has). Both ports share one
// clock. The default depth is the largest frame: 1450 payload bytes plus
// header, two length bytes and footer (1454 bytes). The memory contents are
// not reset; a reader only looks at bytes that were written.
module frame_bram #(
  parameter int unsigned DEPTH  = vlc_pkg::MAX_PAYLOAD + vlc_pkg::FRAME_OVERHEAD,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  // port A: write
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [7:0]        a_wdata,
  // port B: read, data valid the cycle after b_addr
  input  logic [ADDR_W-1:0] b_addr,
  output logic [7:0]        b_rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we && (32'(a_addr) < DEPTH)) mem[a_addr] <= a_wdata;
  end

  always_ff @(posedge clk) begin
    b_rdata <= (32'(b_addr) < DEPTH) ? mem[b_addr] : 8'h00;
  end

endmodule
