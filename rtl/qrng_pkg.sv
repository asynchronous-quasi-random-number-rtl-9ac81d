// Shared constants of the self-timed quasi-random number generator.
//
// The generator is a 128-bit Fibonacci LFSR with characteristic polynomial
// x^128 + x^126 + x^101 + x^99 + 1, whose state circulates in a ring of four
// Mousetrap latch stages instead of a clocked register. The numbers below are
// the defaults of the design; the polynomial, the width and the delay-cell counts follow the reference description, the cell delay and the
// seed are this design's own choice (see the comments on each).
package qrng_pkg;
  timeunit 1ns; timeprecision 1fs;

  // LFSR length and taps (1-based exponents of the polynomial).
  localparam int unsigned LFSR_W = 128;
  localparam int unsigned TAP_A  = 128;
  localparam int unsigned TAP_B  = 126;
  localparam int unsigned TAP_C  = 101;
  localparam int unsigned TAP_D  = 99;

  // Delay-line lengths: 72 request cells and 24 acknowledge cells in total,
  // spread evenly over the four stages.
  localparam int unsigned REQ_CELLS = 18;
  localparam int unsigned ACK_CELLS = 6;

  // Delay of one delay cell. Chosen so that the 72 request cells of one ring
  // revolution add up to about 13.3 ns, i.e. one new 128-bit value at ~75 MHz.
  localparam realtime CELL_DELAY = 0.185ns;

  // Seed used by the testbenches (any non-zero value works; all-zero is the
  // locked state of an XOR LFSR).
  localparam logic [LFSR_W-1:0] DEFAULT_SEED = 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210;

  // One LFSR step, used by testbenches as the reference model: shift left by
  // one, the XOR of the four taps enters at bit 0.
  function automatic logic [LFSR_W-1:0] lfsr_next(input logic [LFSR_W-1:0] s);
    return {s[LFSR_W-2:0], s[TAP_A-1] ^ s[TAP_B-1] ^ s[TAP_C-1] ^ s[TAP_D-1]};
  endfunction
endpackage
