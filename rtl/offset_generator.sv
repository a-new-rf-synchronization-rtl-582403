// offset_generator: builds the offset phase phi_off that, added to the rf
// phase, gives the moving reference.
//
// Path: F_off = F_ref - F_rf -> frequency force-to-zero -> phase accumulator
// -> minus the latched error -> phase force-to-set-value -> phi_off.
// During acceleration the two force stages pass their inputs, so phi_off
// advances by exactly F_ref - F_rf per clock and phi_rf + phi_off runs at the
// reference frequency. To end the process, force_freq ramps F_off to zero
// (freq_slope per clock), then force_phase ramps phi_off to its final value
// (phase_slope per clock). That final value is -phase_set, so that the locked
// loop ends with phi_rf - phi_ref = phase_set. The chain of blocks follows the
// method; the sign convention of phase_set is this design's choice.
//
// Timing: phi_off(t+1) - phi_off(t) = f_ref(t-2) - f_rf(t-2) while idle;
// phi_latch reaches phi_off one clock after it changes.
module offset_generator #(
  parameter int unsigned W = rf_sync_pkg::PHASE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] f_ref,
  input  logic [W-1:0] f_rf,
  input  logic         force_freq,
  input  logic [W-1:0] freq_slope,
  input  logic         force_phase,
  input  logic [W-1:0] phase_slope,
  input  logic [W-1:0] phase_set,
  input  logic [W-1:0] phi_latch,
  output logic [W-1:0] f_off,
  output logic [W-1:0] phi_off,
  output logic         freq_done,
  output logic         phase_done
);
  logic [W-1:0] f_diff, phi_acc, phi_corr, phi_target;

  assign f_diff = f_ref - f_rf;

  force_to_zero #(.W(W)) u_ftz_freq (
    .clk, .rst_n, .force_en(force_freq), .din(f_diff), .slope(freq_slope),
    .target('0), .dout(f_off), .done(freq_done)
  );

  phase_accumulator #(.W(W)) u_acc (
    .clk, .rst_n, .inc(f_off), .phase(phi_acc)
  );

  assign phi_corr   = phi_acc - phi_latch;
  assign phi_target = -phase_set;

  force_to_zero #(.W(W)) u_ftz_phase (
    .clk, .rst_n, .force_en(force_phase), .din(phi_corr), .slope(phase_slope),
    .target(phi_target), .dout(phi_off), .done(phase_done)
  );
endmodule
