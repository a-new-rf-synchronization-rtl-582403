// error_source: forms the moving reference and the synchronization error.
//
//   phi_MR    = phi_off + phi_rf
//   phi_error = phi_MR  - phi_ref
//
// Because phi_off advances by F_ref - F_rf per clock, phi_MR advances like
// phi_ref and the error stays constant during acceleration. The offset path
// needs ALIGN clocks to turn a frequency difference into a phase step, so
// phi_rf and phi_ref are delayed by ALIGN clocks here to line up with it; this
// keeps the error exactly constant even while the frequencies ramp. The delay
// alignment is this design's choice; the two sums are the method's.
//
// Timing: outputs registered, one clock after the (aligned) inputs.
module error_source #(
  parameter int unsigned W     = rf_sync_pkg::PHASE_W,
  parameter int unsigned ALIGN = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] phi_off,
  input  logic [W-1:0] phi_rf,
  input  logic [W-1:0] phi_ref,
  output logic [W-1:0] phi_mr,
  output logic [W-1:0] phi_error
);
  logic [W-1:0] rf_d  [ALIGN+1];
  logic [W-1:0] ref_d [ALIGN+1];

  assign rf_d[0]  = phi_rf;
  assign ref_d[0] = phi_ref;

  for (genvar i = 0; i < ALIGN; i++) begin : g_align
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        rf_d[i+1]  <= '0;
        ref_d[i+1] <= '0;
      end else begin
        rf_d[i+1]  <= rf_d[i];
        ref_d[i+1] <= ref_d[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phi_mr    <= '0;
      phi_error <= '0;
    end else begin
      phi_mr    <= phi_off + rf_d[ALIGN];
      phi_error <= phi_off + rf_d[ALIGN] - ref_d[ALIGN];
    end
  end
endmodule
