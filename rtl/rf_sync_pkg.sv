// rf_sync_pkg: constants shared by the RF synchronization blocks.
//
// All phase and frequency words are unsigned binary fractions of one turn
// (2^PHASE_W = one full rf period). A frequency word is the phase step per
// clock. Sums of phases and frequencies wrap modulo one turn; where a sign is
// needed (offsets, slopes, the error signal) the same bits are read as two's
// complement, i.e. as a value in [-1/2, +1/2) turn.
//
// The widths are this design's choice: the underlying method fixes none of
// them, it only notes that a PLL without a pre-programmed frequency would need
// a very wide (23-bit) ADC.
package rf_sync_pkg;
  localparam int unsigned PHASE_W     = 32;  // phase / frequency word width
  localparam int unsigned ADC_W       = 12;  // PLL loop ADC width
  localparam int unsigned ADC_SHIFT   = 8;   // ADC LSB position in the frequency word
  localparam int unsigned SINE_ADDR_W = 10;  // phase bits used by the sine converter
  localparam int unsigned SINE_W      = 12;  // sine sample width (to the DAC)
  localparam int unsigned SYNC_DELAY  = 2;   // Start Synchro -> loop switch delay
  localparam int unsigned SHIFT_W     = 5;   // width of the loop filter gain shifts
endpackage
