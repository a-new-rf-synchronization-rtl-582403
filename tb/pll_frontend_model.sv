// pll_frontend_model: behavioural model (not synthesizable) of the analogue
// front end of a digital PLL: phase discriminator, analogue loop filter and
// ADC.
//
// The discriminator is a multiplier of the analogue input (a real in [-1, 1])
// by the sine samples rebuilt from the PLL phase; for sin x sin inputs its
// mean is 0.5*cos(theta_in - phi), zero when the PLL phase lags the input by a
// quarter turn. The loop filter is a first-order low-pass,
// y += ALPHA*(product - y), and the ADC returns round(-GAIN*y) clipped to
// ADC_W bits. The minus sign makes a lagging PLL phase raise its frequency.
// Everything is updated once per clock.
module pll_frontend_model #(
  parameter int unsigned ADC_W  = 12,
  parameter int unsigned SINE_W = 12,
  parameter real         ALPHA  = 0.0625,
  parameter real         GAIN   = 1000.0
) (
  input  logic                     clk,
  input  real                      rf_in,
  input  logic signed [SINE_W-1:0] local_sine,
  output logic signed [ADC_W-1:0]  adc_code
);
  real y = 0.0;
  real prod, code;
  localparam real FS   = 2.0 ** (SINE_W - 1) - 1.0;
  localparam real CMAX = 2.0 ** (ADC_W - 1) - 1.0;

  initial adc_code = '0;

  always @(posedge clk) begin
    prod = rf_in * (real'(local_sine) / FS);
    y    = y + ALPHA * (prod - y);
    code = -GAIN * y;
    if (code > CMAX)  code = CMAX;
    if (code < -CMAX) code = -CMAX;
    adc_code <= ADC_W'($rtoi(code));
  end
endmodule
