// transient_cancel: closes the synchronization loop without a transient.
//
// On the rising edge of start_synchro the current error is added into a
// latch whose content the offset generator subtracts from the offset phase.
// The error then drops to zero (the moving reference is re-aligned with the
// reference) and, DELAY clocks later, once that zero has propagated through
// the sums, the loop switch closes. Since the error already contains the
// previous latch value, the latch accumulates (latch + error), so a second
// Start Synchro also lands on zero. The switch stays closed while
// start_synchro is high and opens when it falls. Latch, delay and switch come
// from the method; the level/edge convention and accumulating latch are this
// design's choices.
//
// Timing: latch updated on the clock where start_synchro is first seen high
// (edge E0); loop_closed rises after edge E0+DELAY.
module transient_cancel #(
  parameter int unsigned W     = rf_sync_pkg::PHASE_W,
  parameter int unsigned DELAY = rf_sync_pkg::SYNC_DELAY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_synchro,
  input  logic [W-1:0] phi_error,
  output logic [W-1:0] phi_latch,
  output logic         loop_closed
);
  logic             start_q;
  logic             rise;
  logic [DELAY-1:0] pipe;

  assign rise = start_synchro && !start_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      start_q     <= 1'b0;
      phi_latch   <= '0;
      pipe        <= '0;
      loop_closed <= 1'b0;
    end else begin
      start_q <= start_synchro;
      if (rise) phi_latch <= phi_latch + phi_error;
      pipe        <= (pipe << 1) | DELAY'(rise);
      loop_closed <= start_synchro && (loop_closed || pipe[DELAY-1]);
    end
  end
endmodule
