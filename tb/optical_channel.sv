// optical_channel: behavioural model (not synthesizable logic) of everything
// between the DAC and the ADC of the link: bias tee, LED headlight, free
// space, photodetector and ADC. Each clock it takes the signed DAC code,
// multiplies it by GAIN, passes it through a first-order low-pass
// y += (x - y) / 2**LP_SHIFT (about a 2 MHz corner at 100 Msps for
// LP_SHIFT = 3, close to the headlight's 2.3 MHz bandwidth), adds uniform
// noise of +/-noise ADC codes and returns it as a signed ADC sample one cycle
// later. `noise` can be changed while running to stand in for distance.
module optical_channel #(
  parameter int GAIN     = 4,
  parameter int LP_SHIFT = 3
) (
  input  logic                              clk,
  input  logic signed [vlc_pkg::DAC_W-1:0]  dac_code,
  input  int                                noise,
  output logic signed [vlc_pkg::ADC_W-1:0]  adc_sample
);
  int lp = 0;

  always_ff @(posedge clk) begin
    int x, n, y;
    x  = GAIN * int'(dac_code);
    lp <= lp + ((x - lp) >>> LP_SHIFT);
    n  = (noise > 0) ? int'($urandom_range(2 * noise)) - noise : 0;
    y  = lp + n;
    // the ADC clips at its full scale
    if (y > 32767) y = 32767;
    if (y < -32768) y = -32768;
    adc_sample <= 16'(y);
  end
endmodule
