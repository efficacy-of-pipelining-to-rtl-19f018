// tb_fp_known_values: checks all six units of fp_arith_top (default
// parameters) against results known from standard IEEE-754 arithmetic
// (round to nearest even) for ordinary in-range numbers, independently of
// any reference model. Operand pairs: 1+1, 0.1 and 0.2, 1.5 and 1.5,
// 3 and -1, 100 and -0.01, 1000 and 3.14159, -2.5 and 0.4, 7 and 1/3, each
// first rounded to the format. Each result must appear exactly one clock
// edge after its operands.
module tb_fp_known_values;
  import fp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  // {a, b, a+b, a*b} per row
  localparam logic [31:0] V32 [8][4] = '{
    '{32'h3f800000, 32'h3f800000, 32'h40000000, 32'h3f800000},
    '{32'h3dcccccd, 32'h3e4ccccd, 32'h3e99999a, 32'h3ca3d70b},
    '{32'h3fc00000, 32'h3fc00000, 32'h40400000, 32'h40100000},
    '{32'h40400000, 32'hbf800000, 32'h40000000, 32'hc0400000},
    '{32'h42c80000, 32'hbc23d70a, 32'h42c7fae1, 32'hbf800000},
    '{32'h447a0000, 32'h40490fd0, 32'h447ac910, 32'h45445971},
    '{32'hc0200000, 32'h3ecccccd, 32'hc0066666, 32'hbf800000},
    '{32'h40e00000, 32'h3eaaaaab, 32'h40eaaaab, 32'h40155556}};
  localparam logic [15:0] V16 [8][4] = '{
    '{16'h3c00, 16'h3c00, 16'h4000, 16'h3c00},
    '{16'h2e66, 16'h3266, 16'h34cc, 16'h251e},
    '{16'h3e00, 16'h3e00, 16'h4200, 16'h4080},
    '{16'h4200, 16'hbc00, 16'h4000, 16'hc200},
    '{16'h5640, 16'ha11f, 16'h5640, 16'hbc00},
    '{16'h63d0, 16'h4248, 16'h63d6, 16'h6a22},
    '{16'hc100, 16'h3666, 16'hc033, 16'hbc00},
    '{16'h4700, 16'h3555, 16'h4755, 16'h40aa}};
  localparam logic [15:0] VBF [8][4] = '{
    '{16'h3f80, 16'h3f80, 16'h4000, 16'h3f80},
    '{16'h3dcd, 16'h3e4d, 16'h3e9a, 16'h3ca4},
    '{16'h3fc0, 16'h3fc0, 16'h4040, 16'h4010},
    '{16'h4040, 16'hbf80, 16'h4000, 16'hc040},
    '{16'h42c8, 16'hbc24, 16'h42c8, 16'hbf80},
    '{16'h447a, 16'h4049, 16'h447b, 16'h4544},
    '{16'hc020, 16'h3ecd, 16'hc006, 16'hbf80},
    '{16'h40e0, 16'h3eab, 16'h40eb, 16'h4016}};

  fp32_t a32, b32, s32, p32;
  fp16_t a16, b16, s16, p16;
  bf16_t abf, bbf, sbf, pbf;

  fp_arith_top dut (
    .clk,
    .fp32_add_a (a32), .fp32_add_b (b32), .fp32_add_r (s32),
    .fp32_mul_a (a32), .fp32_mul_b (b32), .fp32_mul_r (p32),
    .fp16_add_a (a16), .fp16_add_b (b16), .fp16_add_r (s16),
    .fp16_mul_a (a16), .fp16_mul_b (b16), .fp16_mul_r (p16),
    .bf16_add_a (abf), .bf16_add_b (bbf), .bf16_add_r (sbf),
    .bf16_mul_a (abf), .bf16_mul_b (bbf), .bf16_mul_r (pbf)
  );

  int checks = 0, failures = 0;

  task automatic check(input logic [31:0] got, input logic [31:0] want, input string what, input int row);
    checks++;
    if (got !== want) begin
      failures++;
      $display("MISMATCH %s row %0d: got %h expected %h", what, row, got, want);
    end
  endtask

  initial begin
    for (int i = 0; i <= 8; i++) begin
      @(negedge clk);
      if (i < 8) begin
        a32 = V32[i][0]; b32 = V32[i][1];
        a16 = V16[i][0]; b16 = V16[i][1];
        abf = VBF[i][0]; bbf = VBF[i][1];
      end
      // results of the previous row are due after one rising edge
      if (i > 0) begin
        check(32'(s32), V32[i-1][2], "FP32 add", i - 1);
        check(32'(p32), V32[i-1][3], "FP32 mul", i - 1);
        check(32'(s16), 32'(V16[i-1][2]), "FP16 add", i - 1);
        check(32'(p16), 32'(V16[i-1][3]), "FP16 mul", i - 1);
        check(32'(sbf), 32'(VBF[i-1][2]), "bf16 add", i - 1);
        check(32'(pbf), 32'(VBF[i-1][3]), "bf16 mul", i - 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
