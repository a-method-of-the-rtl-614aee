// fp_pp_shifter -- arithmetic right shifter of an N-bit two's complement
// mantissa (step 2).
//
// The shifter is R levels of 2:1 multiplexors, one per bit and level; level j
// moves the word 2^j places to the right when its address bit selects it,
// dropping the low bits and filling the top with the sign bit.
//
// With INV_ADDR=0 the word is shifted by the address value sh.
// With INV_ADDR=1 it is shifted by (~sh)+1 modulo 2^R, the two's complement
// negation of sh, at no extra depth: the address bits still drive the
// multiplexors unchanged, but each multiplexor has its two data inputs swapped,
// so a level shifts when its address bit is 0 (this stands for the inverted
// address), and the "+1" is an extra one-position shift of the input, which
// is only wiring. This is how the mantissa of the larger-exponent side is
// aligned by B-A while only A-B was computed. When sh=0 the inverted form
// shifts by 2^R, which with 2^R >= N leaves only sign bits.
//
// Purely combinational; sh and din to dout through R multiplexor levels.
module fp_pp_shifter #(
  parameter int unsigned N        = fp_pp_pkg::N_MANT,
  parameter int unsigned R        = fp_pp_pkg::R_EXP,
  parameter bit          INV_ADDR = 1'b0
) (
  input  logic [N-1:0] din,   // mantissa, two's complement
  input  logic [R-1:0] sh,    // shift address
  output logic [N-1:0] dout   // shifted mantissa
);

  // stage[0] is the (possibly pre-shifted) input, stage[j+1] the output of
  // multiplexor level j.
  logic [N-1:0] stage [R+1];

  assign stage[0] = INV_ADDR ? N'($signed(din) >>> 1) : din;

  for (genvar j = 0; j < R; j++) begin : g_level
    logic [N-1:0] moved;
    assign moved = N'($signed(stage[j]) >>> (2 ** j));
    if (INV_ADDR) begin : g_swapped
      // data inputs renumbered upside-down: shift when the address bit is 0
      assign stage[j+1] = sh[j] ? stage[j] : moved;
    end else begin : g_plain
      assign stage[j+1] = sh[j] ? moved : stage[j];
    end
  end

  assign dout = stage[R];

endmodule
