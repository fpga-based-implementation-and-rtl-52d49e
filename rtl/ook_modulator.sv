// ook_modulator: on-off keying modulator feeding the 14-bit DAC.
//
// Each accepted byte is sent most significant bit first. Every bit is held
// for SAMPLES_PER_BIT consecutive clock cycles (one DAC sample per cycle), so
// at a 100 MHz clock and 100 Msps DAC the bit rate is 100e6 / SAMPLES_PER_BIT:
// 4 Mbit/s at the default of 25 (5 samples per bit would give 20 Mbit/s, 10
// would give 10 Mbit/s). A '1' sample is the signed code ONE_CODE and a '0'
// sample the code ZERO_CODE. The LED's DC bias is added after the DAC, by
// the bias tee, so the codes swing around zero.
//
// Interface: bytes arrive over valid/ready. `in_ready` is high while the
// modulator is idle and in the last sample of the last bit of a byte, so a
// byte waiting at the input follows the previous one with no gap. The DAC
// code is registered: it changes one cycle after the bit it belongs to
// starts. `active` is high while a byte is being sent. When idle the output
// sits at ZERO_CODE.
//
// Samples per bit, the 14-bit code width and the code ranges (820 to 4100 for
// '1', -820 to -4100 for '0', about +/-0.5 V to +/-2.5 V) follow the published
// link; the exact levels inside those ranges, the bit order and the idle
// level are this design's choice.
module ook_modulator #(
  parameter int unsigned SAMPLES_PER_BIT = vlc_pkg::SAMPLES_PER_BIT,
  parameter int unsigned DAC_W           = vlc_pkg::DAC_W,
  parameter int          ONE_CODE        = 2460,
  parameter int          ZERO_CODE       = -2460
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [7:0]              in_data,
  output logic                    in_ready,
  output logic signed [DAC_W-1:0] dac_code,
  output logic                    tx_bit,
  output logic                    active
);

  localparam int unsigned SCNT_W = (SAMPLES_PER_BIT > 1) ? $clog2(SAMPLES_PER_BIT) : 1;

  logic [7:0]        shreg;
  logic [2:0]        bit_cnt;
  logic [SCNT_W-1:0] sample_cnt;
  logic              last_sample;

  assign last_sample = (32'(sample_cnt) == SAMPLES_PER_BIT - 1);
  assign in_ready    = !active || (last_sample && bit_cnt == 3'd7);
  assign tx_bit      = active && shreg[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      bit_cnt    <= '0;
      sample_cnt <= '0;
      active     <= 1'b0;
    end else if (in_valid && in_ready) begin
      shreg      <= in_data;
      bit_cnt    <= '0;
      sample_cnt <= '0;
      active     <= 1'b1;
    end else if (active) begin
      if (last_sample) begin
        sample_cnt <= '0;
        if (bit_cnt == 3'd7) begin
          active <= 1'b0;
        end else begin
          bit_cnt <= bit_cnt + 3'd1;
          shreg   <= {shreg[6:0], 1'b0};
        end
      end else begin
        sample_cnt <= sample_cnt + SCNT_W'(1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dac_code <= DAC_W'(ZERO_CODE);
    else        dac_code <= tx_bit ? DAC_W'(ONE_CODE) : DAC_W'(ZERO_CODE);
  end

endmodule
