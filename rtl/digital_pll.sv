// digital_pll: digital half of the PLL that turns an analogue rf (or
// reference) signal into a frequency word F and a phase word Phi.
//
// Outside this module a phase discriminator compares the analogue input with
// the sine rebuilt from Phi, an analogue loop filter smooths the result and an
// ADC digitises it. Here the signed ADC code, shifted up by ADC_SHIFT, is
// added to a pre-programmed frequency word; the sum is the frequency word F,
// which drives a phase accumulator giving Phi, and Phi goes through the sine
// converter back to the discriminator's DAC. The pre-programmed frequency
// carries the large frequency swing so the ADC only supplies the small
// correction (this is the method's own remedy for an otherwise very wide ADC).
// The ADC scaling, register placement and taking F after the sum are this
// design's choices.
//
// Timing: freq(t) = preprog(t-1) + (adc_code(t-1) << ADC_SHIFT);
// phase(t+1) = phase(t) + freq(t); sine is one clock behind phase.
module digital_pll #(
  parameter int unsigned PHASE_W     = rf_sync_pkg::PHASE_W,
  parameter int unsigned ADC_W       = rf_sync_pkg::ADC_W,
  parameter int unsigned ADC_SHIFT   = rf_sync_pkg::ADC_SHIFT,
  parameter int unsigned SINE_ADDR_W = rf_sync_pkg::SINE_ADDR_W,
  parameter int unsigned SINE_W      = rf_sync_pkg::SINE_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [ADC_W-1:0]  adc_code,
  input  logic [PHASE_W-1:0]       preprog,
  output logic [PHASE_W-1:0]       freq,
  output logic [PHASE_W-1:0]       phase,
  output logic signed [SINE_W-1:0] sine
);
  logic signed [PHASE_W-1:0] adc_ext;
  assign adc_ext = PHASE_W'(adc_code) <<< ADC_SHIFT;

  always_ff @(posedge clk) begin
    if (!rst_n) freq <= '0;
    else        freq <= preprog + adc_ext;
  end

  phase_accumulator #(.W(PHASE_W)) u_acc (
    .clk, .rst_n, .inc(freq), .phase
  );

  sine_converter #(.PHASE_W(PHASE_W), .ADDR_W(SINE_ADDR_W), .OUT_W(SINE_W)) u_sine (
    .clk, .phase, .sine
  );
endmodule
