// fp_arith_top: the six floating-point units side by side.
//
// An adder and a multiplier for each of three formats: FP32 (8-bit exponent,
// 23-bit fraction), FP16 (5-bit exponent, 10-bit fraction) and bfloat16
// (8-bit exponent, 7-bit fraction). Each unit is a combinational core with
// STAGES levels of registers at its output; one level is the configuration
// meant to cut glitch energy at an unchanged clock rate, zero the plain
// combinational unit it replaces as a drop-in.
//
// The six units are independent: each has its own operand and result ports
// and they share only the clock. Every unit accepts a new operand pair on
// each rising clock edge and presents the rounded result STAGES edges later.
// Operands and results are packed structs (sign, exponent, fraction) from
// fp_pkg.
//
// The three formats, the two unit kinds and the single output register
// level follow the studied design; placing the units side by side with
// separate ports (they are evaluated one at a time, never connected) is this
// design's own arrangement.
module fp_arith_top
  import fp_pkg::*;
#(
  parameter int unsigned STAGES = DEFAULT_STAGES
) (
  input  logic  clk,

  input  fp32_t fp32_add_a,
  input  fp32_t fp32_add_b,
  output fp32_t fp32_add_r,
  input  fp32_t fp32_mul_a,
  input  fp32_t fp32_mul_b,
  output fp32_t fp32_mul_r,

  input  fp16_t fp16_add_a,
  input  fp16_t fp16_add_b,
  output fp16_t fp16_add_r,
  input  fp16_t fp16_mul_a,
  input  fp16_t fp16_mul_b,
  output fp16_t fp16_mul_r,

  input  bf16_t bf16_add_a,
  input  bf16_t bf16_add_b,
  output bf16_t bf16_add_r,
  input  bf16_t bf16_mul_a,
  input  bf16_t bf16_mul_b,
  output bf16_t bf16_mul_r
);

  fp_add #(.WE(FP32_WE), .WF(FP32_WF), .STAGES(STAGES)) u_fp32_add (
    .clk (clk), .a (fp32_add_a), .b (fp32_add_b), .r (fp32_add_r));

  fp_mul #(.WE(FP32_WE), .WF(FP32_WF), .STAGES(STAGES)) u_fp32_mul (
    .clk (clk), .a (fp32_mul_a), .b (fp32_mul_b), .r (fp32_mul_r));

  fp_add #(.WE(FP16_WE), .WF(FP16_WF), .STAGES(STAGES)) u_fp16_add (
    .clk (clk), .a (fp16_add_a), .b (fp16_add_b), .r (fp16_add_r));

  fp_mul #(.WE(FP16_WE), .WF(FP16_WF), .STAGES(STAGES)) u_fp16_mul (
    .clk (clk), .a (fp16_mul_a), .b (fp16_mul_b), .r (fp16_mul_r));

  fp_add #(.WE(BF16_WE), .WF(BF16_WF), .STAGES(STAGES)) u_bf16_add (
    .clk (clk), .a (bf16_add_a), .b (bf16_add_b), .r (bf16_add_r));

  fp_mul #(.WE(BF16_WE), .WF(BF16_WF), .STAGES(STAGES)) u_bf16_mul (
    .clk (clk), .a (bf16_mul_a), .b (bf16_mul_b), .r (bf16_mul_r));

endmodule
