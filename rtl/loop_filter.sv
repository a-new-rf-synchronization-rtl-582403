// loop_filter: the synchronization loop filter, from phase error to a
// frequency correction that is added to the frequency program.
//
// A proportional-integral filter with power-of-two gains:
//   integ(t+1) = integ(t) + (err >>> ki_shift)
//   corr(t+1)  = -((err >>> kp_shift) + integ(t+1))
// The minus sign closes the loop with negative feedback: a positive error
// (moving reference ahead of the reference) lowers the rf frequency.
// The integral path lets the locked loop hold a constant frequency difference
// between the frequency program and the reference with zero phase error.
// While `enable` is low (loop switch open) the integrator is cleared and the
// correction is zero, so closing the switch starts from rest. The method only
// names the filter; its type, gains and the clearing are this design's
// choices. Shifts are arithmetic and sums wrap modulo 2^W like every other
// frequency word.
//
// Timing: one clock from err to corr.
module loop_filter #(
  parameter int unsigned W       = rf_sync_pkg::PHASE_W,
  parameter int unsigned SHIFT_W = rf_sync_pkg::SHIFT_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic [SHIFT_W-1:0] kp_shift,
  input  logic [SHIFT_W-1:0] ki_shift,
  input  logic [W-1:0]       err,
  output logic [W-1:0]       corr
);
  logic signed [W-1:0] err_s, p_term, i_term, integ, integ_next;

  assign err_s      = signed'(err);
  assign p_term     = err_s >>> kp_shift;
  assign i_term     = err_s >>> ki_shift;
  assign integ_next = integ + i_term;

  always_ff @(posedge clk) begin
    if (!rst_n || !enable) begin
      integ <= '0;
      corr  <= '0;
    end else begin
      integ <= integ_next;
      corr  <= W'(-(p_term + integ_next));
    end
  end
endmodule
