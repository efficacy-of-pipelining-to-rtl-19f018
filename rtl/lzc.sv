// lzc: leading-zero counter.
//
// Counts the zeros above the most significant one of a W-bit word (W when
// the word is zero). Used by the single-path adder to normalise the result
// of an effective subtraction. Purely combinational; written as a priority
// scan from the least significant bit upwards so the last one found (the
// highest) sets the count. The normalisation step it serves belongs to the
// adder's organisation; this counter's structure is this design's own and
// can be replaced by any faster tree without changing the result.
module lzc #(
  parameter int unsigned W  = 28,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  x,
  output logic [CW-1:0] cnt
);

  always_comb begin
    cnt = CW'(W);
    for (int unsigned i = 0; i < W; i++)
      if (x[i]) cnt = CW'(W - 1 - i);
  end

endmodule
