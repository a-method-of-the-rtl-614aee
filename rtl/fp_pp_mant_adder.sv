// fp_pp_mant_adder -- adder of one prepared sum (step 3).
//
// Adds two N-bit two's complement mantissas, one unshifted and one aligned by
// the shifter, and returns the full (N+1)-bit two's complement sum, so the sum
// never overflows. Two of these run side by side in the adder, one for each
// outcome of the exponent comparison. Purely combinational; on an FPGA it maps
// onto a carry chain.
module fp_pp_mant_adder #(
  parameter int unsigned N = fp_pp_pkg::N_MANT
) (
  input  logic [N-1:0] x,    // unshifted mantissa
  input  logic [N-1:0] y,    // shifted mantissa
  output logic [N:0]   sum   // x + y, N+1 bits
);

  always_comb sum = {x[N-1], x} + {y[N-1], y};

endmodule
