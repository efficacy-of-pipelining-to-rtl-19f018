// int_mul: unsigned integer multiplier for the significands.
//
// Forms the full 2*W-bit product of two W-bit unsigned operands in one
// combinational step. In the floating-point multiplier it multiplies the two
// significands, hidden ones included; it is the wide, shallow part of that
// unit where most signal transitions (and, under relaxed timing, most newly
// generated glitches) occur.
//
// The partial-product array and its reduction tree are left to synthesis
// (written as a single multiplication); the internal structure is this
// design's own choice, since only the function is fixed.
module int_mul #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  always_comb p = (2*W)'(a) * (2*W)'(b);

endmodule
