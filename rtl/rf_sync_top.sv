// rf_sync_top: digital core of the RF synchronization module.
//
// It locks the rf of an accelerating synchrotron to an external reference
// without a transient and without knowing the beam phase beforehand. The rf
// and the reference are each turned into frequency and phase words by a
// digital PLL. The offset generator adds to the rf phase an offset that runs
// at F_ref - F_rf, giving a "moving reference" with the reference's frequency;
// its phase difference to the reference (the error) is therefore constant
// and the loop can be closed at any time: on Start Synchro the transient
// canceller latches the error into the offset so the error becomes zero, and
// closes the loop switch after the sums have settled. The loop filter then
// corrects the frequency program of the rf synthesizer. Triggering
// force_freq ramps the offset frequency to zero, so the loop pulls the rf up
// to the reference frequency; triggering force_phase then ramps the offset
// phase to its final value, so the rf ends at phi_rf - phi_ref = phase_set
// and the moving reference is the rf itself.
//
// Interface: the analogue parts stay outside. Each PLL takes the ADC code of
// its phase discriminator / analogue loop filter and a pre-programmed
// frequency word and returns sine samples for the discriminator's DAC; the
// synthesizer returns sine samples for the cavity DAC. The internal words are
// brought out for monitoring. Control inputs (triggers, slopes, set value,
// loop gains) are expected from the machine timing and settings.
//
// Timing: all blocks share one clock; the error is constant during
// acceleration to the bit. The block structure is the method's; widths,
// registers, gains and the trigger conventions are this design's choices
// (see each block).
module rf_sync_top #(
  parameter int unsigned PHASE_W     = rf_sync_pkg::PHASE_W,
  parameter int unsigned ADC_W       = rf_sync_pkg::ADC_W,
  parameter int unsigned ADC_SHIFT   = rf_sync_pkg::ADC_SHIFT,
  parameter int unsigned SINE_ADDR_W = rf_sync_pkg::SINE_ADDR_W,
  parameter int unsigned SINE_W      = rf_sync_pkg::SINE_W,
  parameter int unsigned SYNC_DELAY  = rf_sync_pkg::SYNC_DELAY,
  parameter int unsigned SHIFT_W     = rf_sync_pkg::SHIFT_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // digital PLLs
  input  logic signed [ADC_W-1:0]  ref_adc,
  input  logic [PHASE_W-1:0]       ref_preprog,
  input  logic signed [ADC_W-1:0]  rf_adc,
  input  logic [PHASE_W-1:0]       rf_preprog,
  // rf synthesizer
  input  logic [PHASE_W-1:0]       freq_program,
  // synchronization control
  input  logic                     start_synchro,
  input  logic                     force_freq,
  input  logic [PHASE_W-1:0]       freq_slope,
  input  logic                     force_phase,
  input  logic [PHASE_W-1:0]       phase_slope,
  input  logic [PHASE_W-1:0]       phase_set,
  input  logic [SHIFT_W-1:0]       kp_shift,
  input  logic [SHIFT_W-1:0]       ki_shift,
  // to the DACs
  output logic signed [SINE_W-1:0] ref_sine,
  output logic signed [SINE_W-1:0] rf_pll_sine,
  output logic signed [SINE_W-1:0] synth_sine,
  // monitoring
  output logic [PHASE_W-1:0]       synth_freq,
  output logic [PHASE_W-1:0]       synth_phase,
  output logic [PHASE_W-1:0]       f_ref,
  output logic [PHASE_W-1:0]       f_rf,
  output logic [PHASE_W-1:0]       phi_ref,
  output logic [PHASE_W-1:0]       phi_rf,
  output logic [PHASE_W-1:0]       f_off,
  output logic [PHASE_W-1:0]       phi_off,
  output logic [PHASE_W-1:0]       phi_mr,
  output logic [PHASE_W-1:0]       phi_error,
  output logic [PHASE_W-1:0]       correction,
  output logic                     loop_closed,
  output logic                     freq_done,
  output logic                     phase_done
);
  logic [PHASE_W-1:0] phi_latch;

  digital_pll #(
    .PHASE_W(PHASE_W), .ADC_W(ADC_W), .ADC_SHIFT(ADC_SHIFT),
    .SINE_ADDR_W(SINE_ADDR_W), .SINE_W(SINE_W)
  ) u_ref_pll (
    .clk, .rst_n, .adc_code(ref_adc), .preprog(ref_preprog),
    .freq(f_ref), .phase(phi_ref), .sine(ref_sine)
  );

  digital_pll #(
    .PHASE_W(PHASE_W), .ADC_W(ADC_W), .ADC_SHIFT(ADC_SHIFT),
    .SINE_ADDR_W(SINE_ADDR_W), .SINE_W(SINE_W)
  ) u_rf_pll (
    .clk, .rst_n, .adc_code(rf_adc), .preprog(rf_preprog),
    .freq(f_rf), .phase(phi_rf), .sine(rf_pll_sine)
  );

  offset_generator #(.W(PHASE_W)) u_offset (
    .clk, .rst_n, .f_ref, .f_rf,
    .force_freq, .freq_slope, .force_phase, .phase_slope, .phase_set,
    .phi_latch, .f_off, .phi_off, .freq_done, .phase_done
  );

  error_source #(.W(PHASE_W), .ALIGN(2)) u_error (
    .clk, .rst_n, .phi_off, .phi_rf, .phi_ref, .phi_mr, .phi_error
  );

  transient_cancel #(.W(PHASE_W), .DELAY(SYNC_DELAY)) u_cancel (
    .clk, .rst_n, .start_synchro, .phi_error, .phi_latch, .loop_closed
  );

  loop_filter #(.W(PHASE_W), .SHIFT_W(SHIFT_W)) u_filter (
    .clk, .rst_n, .enable(loop_closed), .kp_shift, .ki_shift,
    .err(phi_error), .corr(correction)
  );

  rf_synthesizer #(
    .PHASE_W(PHASE_W), .SINE_ADDR_W(SINE_ADDR_W), .SINE_W(SINE_W)
  ) u_synth (
    .clk, .rst_n, .freq_program, .correction,
    .freq(synth_freq), .phase(synth_phase), .sine(synth_sine)
  );

  // The phase force stage must not start before the frequency offset is gone
  // (the method applies the two stages in that order).
  property p_phase_after_freq;
    @(posedge clk) disable iff (!rst_n) $rose(force_phase) |-> force_freq;
  endproperty
  a_phase_after_freq: assert property (p_phase_after_freq)
    else $error("force_phase raised while force_freq is low");
endmodule
