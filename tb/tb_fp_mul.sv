// tb_fp_mul: self-checking test of the multiplier in all three
// formats (FP32, FP16, bfloat16) with one output register level, plus the
// FP16 multiplier with no register (combinational) to check that the latency
// follows the stage count. Every result is compared, in the cycle it is due,
// with an exact-arithmetic reference rounded to nearest even.
module tb_fp_mul;
  import fp_pkg::*;

  localparam int unsigned NVEC = 3000;

  logic clk = 1'b0;
  logic start = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a32, b32, r32;
  logic [15:0] a16, b16, r16, ab, bb, rb, a0, b0, r0;
  logic        d32, d16, dbf, d0;
  int          c[4], f[4], rup[4], tie[4], car[4], can[4], zer[4], wrp[4];

  fp_mul #(.WE(FP32_WE), .WF(FP32_WF)) dut32 (.clk, .a(a32), .b(b32), .r(r32));
  fp_mul #(.WE(FP16_WE), .WF(FP16_WF)) dut16 (.clk, .a(a16), .b(b16), .r(r16));
  fp_mul #(.WE(BF16_WE), .WF(BF16_WF)) dutbf (.clk, .a(ab),  .b(bb),  .r(rb));
  fp_mul #(.WE(FP16_WE), .WF(FP16_WF), .STAGES(0)) dut0 (.clk, .a(a0), .b(b0), .r(r0));

  fp_stream_check #(.IS_MUL(1), .WE(FP32_WE), .WF(FP32_WF), .NVEC(NVEC)) chk32 (
    .clk, .start, .a(a32), .b(b32), .r(r32), .done(d32), .checks(c[0]), .failures(f[0]),
    .n_rup(rup[0]), .n_tie(tie[0]), .n_carry(car[0]), .n_cancel(can[0]), .n_zero(zer[0]), .n_wrap(wrp[0]));
  fp_stream_check #(.IS_MUL(1), .WE(FP16_WE), .WF(FP16_WF), .NVEC(NVEC)) chk16 (
    .clk, .start, .a(a16), .b(b16), .r(r16), .done(d16), .checks(c[1]), .failures(f[1]),
    .n_rup(rup[1]), .n_tie(tie[1]), .n_carry(car[1]), .n_cancel(can[1]), .n_zero(zer[1]), .n_wrap(wrp[1]));
  fp_stream_check #(.IS_MUL(1), .WE(BF16_WE), .WF(BF16_WF), .NVEC(NVEC)) chkbf (
    .clk, .start, .a(ab), .b(bb), .r(rb), .done(dbf), .checks(c[2]), .failures(f[2]),
    .n_rup(rup[2]), .n_tie(tie[2]), .n_carry(car[2]), .n_cancel(can[2]), .n_zero(zer[2]), .n_wrap(wrp[2]));
  fp_stream_check #(.IS_MUL(1), .WE(FP16_WE), .WF(FP16_WF), .STAGES(0), .NVEC(NVEC)) chk0 (
    .clk, .start, .a(a0), .b(b0), .r(r0), .done(d0), .checks(c[3]), .failures(f[3]),
    .n_rup(rup[3]), .n_tie(tie[3]), .n_carry(car[3]), .n_cancel(can[3]), .n_zero(zer[3]), .n_wrap(wrp[3]));

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    start = 1'b1;
    wait (d32 && d16 && dbf && d0);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i];
      $display("unit %0d: checks=%0d fails=%0d roundup=%0d tie=%0d carry=%0d cancel=%0d zero=%0d wrap=%0d",
               i, c[i], f[i], rup[i], tie[i], car[i], can[i], zer[i], wrp[i]);
      // every multiplier mechanism must have been exercised
      checks += 4;
      if (rup[i] == 0) failures++;
      if (tie[i] == 0) failures++;
      if (car[i] == 0) failures++;
      if (wrp[i] == 0) failures++;
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
