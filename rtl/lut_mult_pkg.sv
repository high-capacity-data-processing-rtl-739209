// Shared definitions of the LUT multiplier.
//
// The multiplier splits two N-bit unsigned operands into K-bit fractions and
// forms the 2N-bit product by reading fraction-by-fraction products from a
// look-up table and accumulating them, one per clock. This package holds the
// default sizes (a 32x32-bit multiplier built on an 8x8-bit table, as the
// design is presented) and the states of the sequencing state machine.
package lut_mult_pkg;

  // Operand width and fraction (LUT input) width of the main configuration.
  localparam int unsigned DEF_N = 32;
  localparam int unsigned DEF_K = 8;

  // Phases of one multiplication:
  //   ST_SR   : clear the accumulator, sample the operands, present fraction 0
  //   ST_STEP : one LUT product per clock is shifted into place and summed
  //   ST_LAST : the final sum is copied to the result and the done flag set
  typedef enum logic [1:0] {
    ST_SR   = 2'd0,
    ST_STEP = 2'd1,
    ST_LAST = 2'd2
  } mult_state_e;

  // Number of accumulation steps for N-bit operands and K-bit fractions:
  // (N/K)^2, i.e. 2^(2*(log2 N - log2 K)) when both are powers of two.
  function automatic int unsigned num_steps(int unsigned n, int unsigned k);
    return (n / k) * (n / k);
  endfunction

endpackage
