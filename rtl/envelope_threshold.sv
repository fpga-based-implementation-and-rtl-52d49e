// envelope_threshold: first stage of the receiver. It smooths the 16-bit ADC
// samples and decides, sample by sample, whether the light is "on" or "off".
//
// The envelope is a moving average over 2**AVG_LOG2 samples, kept as a
// running sum (add the newest sample, subtract the one that leaves the
// window), which removes sample-to-sample noise without spreading a bit into
// its neighbour (the window, 4 samples by default, is short next to the 25
// samples of a bit). The average is compared with a fixed THRESHOLD: above it
// the sample is a '1', at or below it a '0'.
//
// Timing: one sample per clock. `envelope` and `level` are registered; a step
// at the input reaches the middle of the window, and so flips `level`, about
// 2**(AVG_LOG2-1) + 1 cycles later.
//
// Envelope detection followed by a fixed threshold is the published
// receiver; the moving-average form of the envelope detector, its length and
// the threshold value (0, midway between the '1' and '0' levels of an
// AC-coupled signal) are this design's choices.
module envelope_threshold #(
  parameter int unsigned ADC_W     = vlc_pkg::ADC_W,
  parameter int unsigned AVG_LOG2  = 2,
  parameter int          THRESHOLD = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] adc_sample,
  output logic signed [ADC_W-1:0] envelope,
  output logic                    level
);

  localparam int unsigned N     = 1 << AVG_LOG2;
  localparam int unsigned SUM_W = ADC_W + AVG_LOG2;

  logic signed [ADC_W-1:0] window [N];
  logic signed [SUM_W-1:0] sum;
  logic signed [SUM_W-1:0] sum_next;
  logic signed [SUM_W-1:0] avg_next;

  always_comb begin
    sum_next = sum + SUM_W'(adc_sample) - SUM_W'(window[N-1]);
    avg_next = sum_next >>> AVG_LOG2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) window[i] <= '0;
      sum      <= '0;
      envelope <= '0;
      level    <= 1'b0;
    end else begin
      window[0] <= adc_sample;
      for (int i = 1; i < int'(N); i++) window[i] <= window[i-1];
      sum      <= sum_next;
      envelope <= ADC_W'(avg_next);
      level    <= (avg_next > SUM_W'(THRESHOLD));
    end
  end

endmodule
