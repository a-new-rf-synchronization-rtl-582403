// rf_synthesizer: the digital rf synthesizer that drives the cavity.
//
// The frequency program word plus the synchronization-loop correction gives
// the synthesizer frequency word; a phase accumulator turns it into the rf
// phase and the sine converter into samples for the DAC and the cavity
// amplifier. The sum with the frequency program follows the method; building
// the synthesizer as a plain direct digital synthesizer is this design's
// choice.
//
// Timing: freq(t) = freq_program(t-1) + correction(t-1);
// phase(t+1) = phase(t) + freq(t); sine one clock behind phase.
module rf_synthesizer #(
  parameter int unsigned PHASE_W     = rf_sync_pkg::PHASE_W,
  parameter int unsigned SINE_ADDR_W = rf_sync_pkg::SINE_ADDR_W,
  parameter int unsigned SINE_W      = rf_sync_pkg::SINE_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [PHASE_W-1:0]       freq_program,
  input  logic [PHASE_W-1:0]       correction,
  output logic [PHASE_W-1:0]       freq,
  output logic [PHASE_W-1:0]       phase,
  output logic signed [SINE_W-1:0] sine
);
  always_ff @(posedge clk) begin
    if (!rst_n) freq <= '0;
    else        freq <= freq_program + correction;
  end

  phase_accumulator #(.W(PHASE_W)) u_acc (
    .clk, .rst_n, .inc(freq), .phase
  );

  sine_converter #(.PHASE_W(PHASE_W), .ADDR_W(SINE_ADDR_W), .OUT_W(SINE_W)) u_sine (
    .clk, .phase, .sine
  );
endmodule
