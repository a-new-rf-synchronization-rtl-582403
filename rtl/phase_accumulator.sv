// phase_accumulator: the phase generator of every digital PLL and synthesizer
// in the synchronization module.
//
// Each clock the frequency word `inc` (phase jump per clock) is added to the
// phase register; the register output is the phase word, which therefore
// advances at a rate proportional to `inc` and wraps once per rf period.
// Adder plus flip-flop is the structure of the method; the reset value (0) is
// this design's choice.
//
// Timing: phase(t+1) = phase(t) + inc(t). Synchronous active-low reset.
module phase_accumulator #(
  parameter int unsigned W = rf_sync_pkg::PHASE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] inc,
  output logic [W-1:0] phase
);
  always_ff @(posedge clk) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + inc;
  end
endmodule
