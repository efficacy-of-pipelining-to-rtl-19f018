// tb_fp_arith_top: end-to-end test of all six units of fp_arith_top at its
// default parameters (one output register level on every unit).
//
// Each unit gets a new operand pair every cycle from its own stream checker,
// which compares every result, in exactly the cycle it is due, with an
// exact-arithmetic reference rounded to nearest even. Besides the value and
// latency checks, the mechanisms of the units are counted per unit, and a
// mechanism that never occurred counts as a failure:
//   both units: rounding increment, exact tie, exponent carry (normalising
//               shift of the product or the sum, or rounding overflow),
//               exponent wrap-around (result outside the exponent range);
//   adders:     cancellation of more than one leading bit (multi-bit
//               normalising left shift), exact zero result.
module tb_fp_arith_top;
  import fp_pkg::*;

  localparam int unsigned NVEC = 4000;

  logic clk = 1'b0;
  logic start = 1'b0;
  always #5 clk = ~clk;

  fp32_t a32a, b32a, r32a, a32m, b32m, r32m;
  fp16_t a16a, b16a, r16a, a16m, b16m, r16m;
  bf16_t abfa, bbfa, rbfa, abfm, bbfm, rbfm;

  fp_arith_top dut (
    .clk,
    .fp32_add_a (a32a), .fp32_add_b (b32a), .fp32_add_r (r32a),
    .fp32_mul_a (a32m), .fp32_mul_b (b32m), .fp32_mul_r (r32m),
    .fp16_add_a (a16a), .fp16_add_b (b16a), .fp16_add_r (r16a),
    .fp16_mul_a (a16m), .fp16_mul_b (b16m), .fp16_mul_r (r16m),
    .bf16_add_a (abfa), .bf16_add_b (bbfa), .bf16_add_r (rbfa),
    .bf16_mul_a (abfm), .bf16_mul_b (bbfm), .bf16_mul_r (rbfm)
  );

  logic done [6];
  int   c[6], f[6], rup[6], tie[6], car[6], can[6], zer[6], wrp[6];

  fp_stream_check #(.IS_MUL(0), .WE(FP32_WE), .WF(FP32_WF), .STAGES(DEFAULT_STAGES), .NVEC(NVEC)) k0 (
    .clk, .start, .a(a32a), .b(b32a), .r(r32a), .done(done[0]), .checks(c[0]), .failures(f[0]),
    .n_rup(rup[0]), .n_tie(tie[0]), .n_carry(car[0]), .n_cancel(can[0]), .n_zero(zer[0]), .n_wrap(wrp[0]));
  fp_stream_check #(.IS_MUL(1), .WE(FP32_WE), .WF(FP32_WF), .STAGES(DEFAULT_STAGES), .NVEC(NVEC)) k1 (
    .clk, .start, .a(a32m), .b(b32m), .r(r32m), .done(done[1]), .checks(c[1]), .failures(f[1]),
    .n_rup(rup[1]), .n_tie(tie[1]), .n_carry(car[1]), .n_cancel(can[1]), .n_zero(zer[1]), .n_wrap(wrp[1]));
  fp_stream_check #(.IS_MUL(0), .WE(FP16_WE), .WF(FP16_WF), .STAGES(DEFAULT_STAGES), .NVEC(NVEC)) k2 (
    .clk, .start, .a(a16a), .b(b16a), .r(r16a), .done(done[2]), .checks(c[2]), .failures(f[2]),
    .n_rup(rup[2]), .n_tie(tie[2]), .n_carry(car[2]), .n_cancel(can[2]), .n_zero(zer[2]), .n_wrap(wrp[2]));
  fp_stream_check #(.IS_MUL(1), .WE(FP16_WE), .WF(FP16_WF), .STAGES(DEFAULT_STAGES), .NVEC(NVEC)) k3 (
    .clk, .start, .a(a16m), .b(b16m), .r(r16m), .done(done[3]), .checks(c[3]), .failures(f[3]),
    .n_rup(rup[3]), .n_tie(tie[3]), .n_carry(car[3]), .n_cancel(can[3]), .n_zero(zer[3]), .n_wrap(wrp[3]));
  fp_stream_check #(.IS_MUL(0), .WE(BF16_WE), .WF(BF16_WF), .STAGES(DEFAULT_STAGES), .NVEC(NVEC)) k4 (
    .clk, .start, .a(abfa), .b(bbfa), .r(rbfa), .done(done[4]), .checks(c[4]), .failures(f[4]),
    .n_rup(rup[4]), .n_tie(tie[4]), .n_carry(car[4]), .n_cancel(can[4]), .n_zero(zer[4]), .n_wrap(wrp[4]));
  fp_stream_check #(.IS_MUL(1), .WE(BF16_WE), .WF(BF16_WF), .STAGES(DEFAULT_STAGES), .NVEC(NVEC)) k5 (
    .clk, .start, .a(abfm), .b(bbfm), .r(rbfm), .done(done[5]), .checks(c[5]), .failures(f[5]),
    .n_rup(rup[5]), .n_tie(tie[5]), .n_carry(car[5]), .n_cancel(can[5]), .n_zero(zer[5]), .n_wrap(wrp[5]));

  int checks = 0, failures = 0;
  const string names [6] = '{"FP32 add", "FP32 mul", "FP16 add", "FP16 mul", "bf16 add", "bf16 mul"};

  task automatic need(input int count, input string what, input int unit);
    checks++;
    if (count == 0) begin
      failures++;
      $display("unit %0d: %s never happened", unit, what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    start = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    for (int i = 0; i < 6; i++) begin
      checks += c[i];
      failures += f[i];
      $display("%s: checks=%0d fails=%0d roundup=%0d tie=%0d carry=%0d cancel=%0d zero=%0d wrap=%0d",
               names[i], c[i], f[i], rup[i], tie[i], car[i], can[i], zer[i], wrp[i]);
      need(rup[i], "rounding increment", i);
      need(tie[i], "exact tie", i);
      need(car[i], "exponent carry", i);
      need(wrp[i], "exponent wrap-around", i);
      if (i % 2 == 0) begin
        need(can[i], "multi-bit cancellation", i);
        need(zer[i], "exact zero", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NVEC * 4 + 100) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
