// sine_converter: turns a phase word into signed sine samples, for the DAC
// that feeds a PLL phase discriminator or, in the synthesizer, the cavity.
//
// The top ADDR_W bits of the phase address a quarter-wave table of
// 2^(ADDR_W-2) entries computed at elaboration:
//   TAB[i] = round((2^(OUT_W-1)-1) * sin(2*pi*(i+0.5) / 2^ADDR_W)).
// The half-step offset makes the table exactly symmetric, so the second
// quadrant reads it backwards and the third and fourth negate it. Only the
// function (phase back to a sine wave) comes from the method; the table
// organisation and sizes are this design's choice.
//
// The phase bits below the top ADDR_W are deliberately unused (phase
// truncation), so lint reports them as unused.
//
// Timing: one clock from `phase` to `sine`. No reset (pure data path).
module sine_converter #(
  parameter int unsigned PHASE_W = rf_sync_pkg::PHASE_W,
  parameter int unsigned ADDR_W  = rf_sync_pkg::SINE_ADDR_W,
  parameter int unsigned OUT_W   = rf_sync_pkg::SINE_W
) (
  input  logic                     clk,
  input  logic [PHASE_W-1:0]       phase,
  output logic signed [OUT_W-1:0]  sine
);
  localparam int unsigned QW = ADDR_W - 2;
  typedef logic signed [OUT_W-1:0] tab_t [2**QW];

  function automatic tab_t make_table();
    tab_t t;
    real  amp, arg;
    amp = 2.0 ** (OUT_W - 1) - 1.0;
    for (int i = 0; i < 2**QW; i++) begin
      arg  = 6.283185307179586 * (real'(i) + 0.5) / (2.0 ** ADDR_W);
      t[i] = OUT_W'($rtoi($floor(amp * $sin(arg) + 0.5)));
    end
    return t;
  endfunction

  localparam tab_t TAB = make_table();

  logic [1:0]    quadrant;
  logic [QW-1:0] idx, addr;

  assign quadrant = phase[PHASE_W-1 -: 2];
  assign idx      = phase[PHASE_W-3 -: QW];
  assign addr     = quadrant[0] ? ~idx : idx;   // ~idx = 2^QW-1-idx

  always_ff @(posedge clk) begin
    sine <= quadrant[1] ? -TAB[addr] : TAB[addr];
  end
endmodule
