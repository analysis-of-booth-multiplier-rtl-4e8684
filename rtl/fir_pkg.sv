// fir_pkg: sizes and types shared by the short-word-length Booth FIR filter.
//
// The filter length (8 taps) and the 2-bit word that carries a ternary
// sigma-delta digit (0, +1, -1) are the design's headline numbers. The width
// of the multi-bit samples that enter the sigma-delta modulators (8 bits) is
// this design's own choice. The Booth action codes follow the (Q0, Q-1) pairs
// of the radix-2 Booth algorithm.
package fir_pkg;

  // Number of filter taps L.
  localparam int unsigned FIR_TAPS = 8;
  // Short word length: a ternary digit held as 2-bit two's complement.
  localparam int unsigned SWL_W = 2;
  // Width of the multi-bit data / weight samples ahead of the modulators.
  localparam int unsigned SDM_IN_W = 8;

  typedef logic signed [SWL_W-1:0] ternary_t;
  localparam ternary_t TERN_POS  = 2'sb01;
  localparam ternary_t TERN_ZERO = 2'sb00;
  localparam ternary_t TERN_NEG  = 2'sb11;

  // Booth action selected by {Q0, Q-1}.
  typedef enum logic [1:0] {
    BOOTH_NOP0 = 2'b00,  // run of zeros: shift only
    BOOTH_ADD  = 2'b01,  // end of a run of ones: A <- A + M
    BOOTH_SUB  = 2'b10,  // start of a run of ones: A <- A - M
    BOOTH_NOP1 = 2'b11   // inside a run of ones: shift only
  } booth_op_e;

  // Width of the sum of L products of two W-bit signed numbers.
  function automatic int unsigned fir_out_w(input int unsigned w, input int unsigned l);
    return 2 * w + $clog2(l);
  endfunction

endpackage
