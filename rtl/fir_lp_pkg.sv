// fir_lp_pkg: constants and types shared by the low-power FIR processor.
//
// The defaults are the main configuration: a 16x16-bit two's complement
// multiplier (the middle of the 8/16/24-bit sizes evaluated for this
// architecture, and the one with the largest overall saving), room for filters
// of up to 89 taps (the longest evaluated filter), and 40-bit precalculated
// values and accumulator (32-bit product plus guard bits for 89 terms; the
// accumulator width is this design's choice).
package fir_lp_pkg;

  localparam int unsigned MULT_W_DEF = 16;
  localparam int unsigned N_MAX_DEF  = 89;
  localparam int unsigned PCV_W_DEF  = 40;

  // Source of the value written back into the precalculated value memory.
  typedef enum logic [1:0] {
    WSEL_SUM  = 2'd0,  // product + PCV(n-1): a new stage output
    WSEL_COPY = 2'd1,  // the value just read: the save transfer of a reordered stage
    WSEL_ZERO = 2'd2   // zero: initial clearing
  } pcvm_wsel_e;

endpackage
