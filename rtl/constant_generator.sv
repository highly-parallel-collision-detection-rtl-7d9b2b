// constant_generator: radix constants for the Z path of the CORDIC execution unit.
//
// For iteration i (0..14) it gives atan(2^-i) in the circular functions
// (rotation, vectoring) and 2^-i in the linear functions (multiplication,
// division), both as Q2.14 words.  The document names a constant generator
// that produces the arc-tangent radix constants; the linear constants and the
// table contents (round(atan(2^-i) * 2^14)) are this design's.
// Purely combinational: the constant is valid in the same cycle as `iter`.
module constant_generator
  import cd_pkg::*;
(
  input  logic [3:0] iter,      // iteration index i
  input  logic       circular,  // 1: atan(2^-i), 0: 2^-i
  output word_t      const_o
);
  always_comb begin
    if (circular) const_o = atan_const(iter);
    else          const_o = word_t'(16'sd16384 >>> iter);
  end
endmodule
