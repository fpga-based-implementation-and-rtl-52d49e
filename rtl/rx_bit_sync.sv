// rx_bit_sync: recovers the bit stream from the thresholded sample stream.
//
// The transmitter holds each bit for SAMPLES_PER_BIT samples. This block
// keeps a phase counter that runs 0 .. SAMPLES_PER_BIT-1 and restarts at 0 on
// every change of `level`, so bit boundaries in the received signal keep it
// aligned with the transmitter. When the counter reaches the middle of a bit
// (SAMPLES_PER_BIT/2) the current level is delivered as one bit with a
// one-cycle `bit_valid` pulse; a run of equal bits therefore yields one bit
// per SAMPLES_PER_BIT samples. `resync` pulses when a level change arrives
// at any phase other than the expected bit boundary, i.e. when the timing is
// corrected.
//
// The published receiver turns samples into bits at the transmitter's 25
// samples per bit but does not say how it finds the bit boundaries; this
// edge-aligned mid-bit sampler is this design's choice.
module rx_bit_sync #(
  parameter int unsigned SAMPLES_PER_BIT = vlc_pkg::SAMPLES_PER_BIT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic level,
  output logic bit_valid,
  output logic bit_value,
  output logic resync
);

  localparam int unsigned PH_W = (SAMPLES_PER_BIT > 1) ? $clog2(SAMPLES_PER_BIT) : 1;
  localparam int unsigned MID  = SAMPLES_PER_BIT / 2;

  logic            prev_level;
  logic [PH_W-1:0] phase;      // phase of the current sample when no edge is seen
  logic            edge_now;
  logic [PH_W-1:0] cur_phase;  // phase of the current sample

  assign edge_now  = (level != prev_level);
  assign cur_phase = edge_now ? '0 : phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_level <= 1'b0;
      phase      <= '0;
      bit_valid  <= 1'b0;
      bit_value  <= 1'b0;
      resync     <= 1'b0;
    end else begin
      prev_level <= level;
      phase      <= (32'(cur_phase) == SAMPLES_PER_BIT - 1) ? '0 : cur_phase + PH_W'(1);
      bit_valid  <= (32'(cur_phase) == MID);
      bit_value  <= level;
      resync     <= edge_now && (phase != '0);
    end
  end

endmodule
