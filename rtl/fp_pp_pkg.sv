// fp_pp_pkg -- shared constants of the floating-point adder with partial
// preparation of results.
//
// The adder works on numbers a_M*2^A, where the mantissa a_M is an N-bit two's
// complement number and the exponent A an R-bit unsigned number. The defaults
// N_MANT=15, R_EXP=4 are the smaller of the two sizes the design is evaluated
// at; the larger one, N=31 and R=5, is given as N_MANT_WIDE/R_EXP_WIDE. An
// R-level shifter covers every useful alignment distance only when 2^R >= N,
// which shifter_covers() checks.
package fp_pp_pkg;

  parameter int unsigned N_MANT      = 15;
  parameter int unsigned R_EXP       = 4;
  parameter int unsigned N_MANT_WIDE = 31;
  parameter int unsigned R_EXP_WIDE  = 5;

  // True when R levels of power-of-two shifts can move an N-bit mantissa far
  // enough to leave only copies of its sign bit.
  function automatic bit shifter_covers(int unsigned n, int unsigned r);
    return (64'd1 << r) >= 64'(n);
  endfunction

endpackage
