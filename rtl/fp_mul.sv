// fp_mul: floating-point multiplier with output pipeline registers.
//
// Multiplies two normal-mode operands of a format with a WE-bit exponent and
// a WF-bit fraction (word = sign | exponent | fraction) and rounds to nearest,
// ties to even. The datapath is:
//   1. sign   = sign_a XOR sign_b;
//   2. significand product (1.fa * 1.fb) in the integer multiplier, a value in
//      [1, 4) held in 2*WF+2 bits;
//   3. one-bit normalisation: if the product is 2 or more, take the fraction
//      one place higher and add 1 to the exponent;
//   4. exponent = ea + eb - bias (+1 from step 3);
//   5. rounding: guard bit and sticky OR of the lower bits decide an
//      increment of the concatenated {exponent, fraction}, so a fraction that
//      rounds up to 2.0 carries into the exponent by itself.
// The result then passes STAGES levels of output registers (pipe_regs).
//
// Format handling follows the normal-only mode of a simplified IEEE-754
// format: zero, infinity and NaN travel in separate mode bits, which are
// fixed to "normal" at the inputs and dropped at the output, so that no
// exception logic is built. Every exponent code is a normal number. An
// exponent that leaves the range is not flagged (that was the dropped mode
// output's job): the exponent field is the computed exponent modulo 2^WE.
//
// Interface: a, b operand words; r result word, STAGES cycles after a and b.
// One new operation per cycle.
//
// Defaults are FP32 (WE = 8, WF = 23) with one register level. The stage
// count, the formats and the rounding mode follow the studied design; the
// exact arrangement of the steps above and the modulo exponent are this
// design's own reading of the unit.
module fp_mul #(
  parameter int unsigned WE     = 8,
  parameter int unsigned WF     = 23,
  parameter int unsigned STAGES = fp_pkg::DEFAULT_STAGES,
  localparam int unsigned W     = 1 + WE + WF
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] r
);

  localparam int unsigned N    = WF + 1;              // significand width
  localparam int unsigned BIAS = (1 << (WE - 1)) - 1;

  logic          sa, sb;
  logic [WE-1:0] ea, eb;
  logic [N-1:0]  ma, mb;

  always_comb begin
    {sa, ea} = a[W-1 -: 1+WE];
    {sb, eb} = b[W-1 -: 1+WE];
    ma = {1'b1, a[WF-1:0]};
    mb = {1'b1, b[WF-1:0]};
  end

  logic [2*N-1:0] prod;

  int_mul #(.W(N)) u_sigmul (
    .a (ma),
    .b (mb),
    .p (prod)
  );

  logic          hi;        // product is in [2, 4)
  logic [WF-1:0] frac;
  logic          guard, sticky, rnd;
  logic [WE-1:0] exp;
  logic [W-1:0]  res;

  always_comb begin
    hi = prod[2*N-1];
    if (hi) begin
      frac   = prod[2*WF   -: WF];
      guard  = prod[WF];
      sticky = |prod[WF-1:0];
    end else begin
      frac   = prod[2*WF-1 -: WF];
      guard  = prod[WF-1];
      sticky = |prod[WF-2:0];
    end
    exp = WE'(ea + eb - WE'(BIAS) + WE'(hi));
    rnd = guard & (sticky | frac[0]);
    res = {sa ^ sb, ({exp, frac} + (WE+WF)'(rnd))};
  end

  pipe_regs #(.W(W), .STAGES(STAGES)) u_out (
    .clk (clk),
    .d   (res),
    .q   (r)
  );

endmodule
