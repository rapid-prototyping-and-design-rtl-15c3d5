// rng_pkg: widths and field extractors shared by the random number generator.
//
// The generator turns raw bits from random-bit cells into a stream of 32-bit
// words. A conditioned 32-bit word (LFSR_IN) is split three ways: the whole
// word seeds the LFSR, bits [23,10,2] pick one of eight tap sets, and bits
// [22,20,18,16,12,10,6,4,2,0] form the 10-bit time of refresh (TR), the
// number of cycles before the next reseed. The bit positions, the 32-bit word
// and the 10-bit TR follow the design description; the package only collects
// them so that the controller and the testbenches share one definition.
package rng_pkg;

  localparam int unsigned WORD_W    = 32;  // LFSR / conditioned word width
  localparam int unsigned TR_W      = 10;  // time-of-refresh width
  localparam int unsigned TAP_SEL_W = 3;   // tap lookup-table index width

  typedef logic [WORD_W-1:0]    word_t;
  typedef logic [TR_W-1:0]      tr_t;
  typedef logic [TAP_SEL_W-1:0] tap_sel_t;

  // TR = LFSR_IN[22,20,18,16,12,10,6,4,2,0], first listed bit is the MSB.
  function automatic tr_t extract_tr(word_t w);
    return {w[22], w[20], w[18], w[16], w[12], w[10], w[6], w[4], w[2], w[0]};
  endfunction

  // Tap select = LFSR_IN[23,10,2], first listed bit is the MSB.
  function automatic tap_sel_t extract_tap_sel(word_t w);
    return {w[23], w[10], w[2]};
  endfunction

endpackage
