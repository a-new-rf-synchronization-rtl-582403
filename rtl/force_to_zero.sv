// force_to_zero: brings an offset (frequency or phase) smoothly to a target.
//
// Idle (force_en low) the input simply passes through a flip-flop, one clock
// late. When force_en goes high the input is isolated and the flip-flop
// feeds back on itself through an adder, so it first keeps the last value and
// then moves by `slope` every clock: a linear ramp. As soon as the output is
// within one slope step of `target` it is loaded with the target and held
// there (`done`). The slope must point towards the target (opposite in sign
// to the starting offset when the target is zero); it is used as given.
// The pass/ramp/reset structure follows the method; holding the target once
// reached, the level-sensitive trigger and the general `target` input (which
// also serves the "force to set value" function) are this design's choices.
// Distances are measured modulo 2^W as signed numbers, so a phase ramp always
// ends.
//
// Timing: dout(t+1) = din(t) when idle; while forced, one slope per clock.
// Dropping force_en returns to pass-through on the next clock.
module force_to_zero #(
  parameter int unsigned W = rf_sync_pkg::PHASE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         force_en,
  input  logic [W-1:0] din,
  input  logic [W-1:0] slope,
  input  logic [W-1:0] target,
  output logic [W-1:0] dout,
  output logic         done
);
  logic signed [W-1:0] gap, step;
  logic [W-1:0]        gap_abs, step_abs;
  logic                close;

  assign gap     = signed'(dout - target);
  assign step     = signed'(slope);
  assign gap_abs = gap[W-1] ? W'(-gap) : W'(gap);
  assign step_abs = step[W-1] ? W'(-step) : W'(step);
  assign close    = gap_abs <= step_abs;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dout <= '0;
      done <= 1'b0;
    end else if (!force_en) begin
      dout <= din;
      done <= 1'b0;
    end else if (done || close) begin
      dout <= target;
      done <= 1'b1;
    end else begin
      dout <= dout + slope;
    end
  end
endmodule
