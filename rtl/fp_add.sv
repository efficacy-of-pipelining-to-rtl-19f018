// fp_add: single-path floating-point adder with output pipeline registers.
//
// Adds two normal-mode operands of a format with a WE-bit exponent and a
// WF-bit fraction (word = sign | exponent | fraction) and rounds to nearest,
// ties to even. It is the area-lean single-path organisation, in which one
// chain of steps serves every case, so the logic is deep and narrow:
//   1. swap:      compare |a| and |b| and route the larger to X, the smaller
//                 to Y; the result takes the sign of X;
//   2. align:     shift Y's significand right by ex - ey into a field with
//                 three extra low bits (guard, round, sticky); every bit
//                 shifted past the sticky position is ORed into it;
//   3. add/sub:   X + Y or X - Y (effective subtraction when the signs
//                 differ) on WF+5 bits including a carry bit; the result is
//                 never negative because |X| >= |Y|;
//   4. normalise: count leading zeros (lzc) and shift left so that the
//                 leading one lands on the carry position; the exponent
//                 becomes ex + 1 - count;
//   5. round:     guard bit and sticky OR of the bits below decide an
//                 increment of the concatenated {exponent, fraction}.
// An exact cancellation (a = -b) gives the all-zero word. The result then
// passes STAGES levels of output registers (pipe_regs).
//
// As in the multiplier, zero, infinity and NaN live in mode bits that are
// fixed to "normal" on the inputs and dropped at the output, every exponent
// code is a normal number, and an exponent that leaves the range is not
// flagged: the exponent field is the computed exponent modulo 2^WE.
//
// Interface: a, b operand words; r result word, STAGES cycles after a and b.
// One new operation per cycle.
//
// Defaults are FP32 (WE = 8, WF = 23) with one register level. The
// single-path organisation, the formats, rounding and stage count follow the
// studied design; the guard/round/sticky arrangement, the modulo exponent and
// the zero result encoding are this design's own choices.
module fp_add #(
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

  localparam int unsigned N  = WF + 1;   // significand width
  localparam int unsigned AW = N + 3;    // aligned field: significand, G, R, S
  localparam int unsigned SW = AW + 1;   // sum field with carry bit
  localparam int unsigned CW = $clog2(SW + 1);

  // ---- 1. swap -------------------------------------------------------------
  logic          swap;
  logic [W-1:0]  x, y;
  logic          sx, sy;
  logic [WE-1:0] ex, ey;
  logic [N-1:0]  mx, my;

  always_comb begin
    swap = b[W-2:0] > a[W-2:0];
    x    = swap ? b : a;
    y    = swap ? a : b;
    {sx, ex} = x[W-1 -: 1+WE];
    {sy, ey} = y[W-1 -: 1+WE];
    mx = {1'b1, x[WF-1:0]};
    my = {1'b1, y[WF-1:0]};
  end

  // ---- 2. align ------------------------------------------------------------
  logic [WE-1:0]   dexp;
  logic [2*AW-1:0] yshift;   // upper half: kept bits, lower half: shifted out
  logic [AW-1:0]   yal;

  always_comb begin
    dexp = ex - ey;
    if (dexp >= WE'(AW)) yshift = {{AW{1'b0}}, my, 3'b000};
    else                 yshift = {my, 3'b000, {AW{1'b0}}} >> dexp;
    yal = {yshift[2*AW-1:AW+1], yshift[AW] | (|yshift[AW-1:0])};
  end

  // ---- 3. add / subtract ---------------------------------------------------
  logic          eff_sub;
  logic [SW-1:0] sum;

  always_comb begin
    eff_sub = sx ^ sy;
    if (eff_sub) sum = {1'b0, mx, 3'b000} - {1'b0, yal};
    else         sum = {1'b0, mx, 3'b000} + {1'b0, yal};
  end

  // ---- 4. normalise --------------------------------------------------------
  logic [CW-1:0] lz;

  lzc #(.W(SW)) u_lzc (
    .x   (sum),
    .cnt (lz)
  );

  logic [SW-1:0] norm;
  logic [WE-1:0] exp;

  always_comb begin
    norm = sum << lz;
    exp  = WE'(ex + 1'b1 - lz);
  end

  // ---- 5. round ------------------------------------------------------------
  logic [WF-1:0] frac;
  logic          guard, sticky, rnd;
  logic [W-1:0]  res;

  always_comb begin
    frac   = norm[SW-2 -: WF];
    guard  = norm[3];
    sticky = |norm[2:0];
    rnd    = guard & (sticky | frac[0]);
    if (!norm[SW-1]) res = '0;      // no leading one: exact cancellation
    else           res = {sx, ({exp, frac} + (WE+WF)'(rnd))};
  end

  pipe_regs #(.W(W), .STAGES(STAGES)) u_out (
    .clk (clk),
    .d   (res),
    .q   (r)
  );

endmodule
