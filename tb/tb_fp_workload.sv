// tb_fp_workload: the power-analysis style workload on all six units.
//
// Operand streams are built so that every input bit makes a 0->1 transition
// in about 10% of the cycles (switching activity alpha = 0.1): each cycle,
// each bit flips with probability 0.2. The stream drives two copies of
// fp_arith_top side by side: one at its default (one output register level)
// and one with STAGES = 0, the combinational unit it replaces as a drop-in.
// At every rising edge the combinational results must equal the reference
// for the operands present now, and the registered results the reference
// for the operands of the previous edge, so both the function and the one
// extra cycle of latency are checked. The measured input activity must lie
// between 0.09 and 0.11.
module tb_fp_workload;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  localparam int NCYC = 5000;
  localparam int WE_U [6] = '{FP32_WE, FP32_WE, FP16_WE, FP16_WE, BF16_WE, BF16_WE};
  localparam int WF_U [6] = '{FP32_WF, FP32_WF, FP16_WF, FP16_WF, BF16_WF, BF16_WF};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] opa [6], opb [6];   // right-aligned operand words per unit
  logic [31:0] exp_now [6], exp_prev [6];

  fp32_t p32a, p32m, c32a, c32m;
  fp16_t p16a, p16m, c16a, c16m;
  bf16_t pbfa, pbfm, cbfa, cbfm;

  fp_arith_top pipe (
    .clk,
    .fp32_add_a (opa[0]), .fp32_add_b (opb[0]), .fp32_add_r (p32a),
    .fp32_mul_a (opa[1]), .fp32_mul_b (opb[1]), .fp32_mul_r (p32m),
    .fp16_add_a (opa[2][15:0]), .fp16_add_b (opb[2][15:0]), .fp16_add_r (p16a),
    .fp16_mul_a (opa[3][15:0]), .fp16_mul_b (opb[3][15:0]), .fp16_mul_r (p16m),
    .bf16_add_a (opa[4][15:0]), .bf16_add_b (opb[4][15:0]), .bf16_add_r (pbfa),
    .bf16_mul_a (opa[5][15:0]), .bf16_mul_b (opb[5][15:0]), .bf16_mul_r (pbfm)
  );

  fp_arith_top #(.STAGES(0)) comb (
    .clk,
    .fp32_add_a (opa[0]), .fp32_add_b (opb[0]), .fp32_add_r (c32a),
    .fp32_mul_a (opa[1]), .fp32_mul_b (opb[1]), .fp32_mul_r (c32m),
    .fp16_add_a (opa[2][15:0]), .fp16_add_b (opb[2][15:0]), .fp16_add_r (c16a),
    .fp16_mul_a (opa[3][15:0]), .fp16_mul_b (opb[3][15:0]), .fp16_mul_r (c16m),
    .bf16_add_a (opa[4][15:0]), .bf16_add_b (opb[4][15:0]), .bf16_add_r (cbfa),
    .bf16_mul_a (opa[5][15:0]), .bf16_mul_b (opb[5][15:0]), .bf16_mul_r (cbfm)
  );

  logic [31:0] pres [6], cres [6];
  always_comb begin
    pres = '{32'(p32a), 32'(p32m), 32'(p16a), 32'(p16m), 32'(pbfa), 32'(pbfm)};
    cres = '{32'(c32a), 32'(c32m), 32'(c16a), 32'(c16m), 32'(cbfa), 32'(cbfm)};
  end

  int  checks = 0, failures = 0;
  longint rises = 0, bit_cycles = 0;

  function automatic logic [31:0] flip_mask(input int width);
    logic [31:0] m;
    m = '0;
    for (int i = 0; i < width; i++) m[i] = ($urandom_range(0, 9) < 2);
    return m;
  endfunction

  task automatic check(input logic [31:0] got, input logic [31:0] want, input string what, input int u);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures <= 5) $display("MISMATCH %s unit %0d: got %h expected %h", what, u, got, want);
    end
  endtask

  initial begin
    ref_info_t info;
    for (int u = 0; u < 6; u++) begin
      opa[u] = $urandom & ((32'd1 << (1 + WE_U[u] + WF_U[u])) - 1);
      opb[u] = $urandom & ((32'd1 << (1 + WE_U[u] + WF_U[u])) - 1);
      exp_prev[u] = '0;
    end
    for (int k = 0; k < NCYC; k++) begin
      @(negedge clk);
      for (int u = 0; u < 6; u++) begin
        int          w;
        logic [31:0] na, nb;
        w  = 1 + WE_U[u] + WF_U[u];
        na = opa[u] ^ flip_mask(w);
        nb = opb[u] ^ flip_mask(w);
        rises      += $countones(na & ~opa[u]) + $countones(nb & ~opb[u]);
        bit_cycles += 2 * w;
        opa[u] = na;
        opb[u] = nb;
        exp_prev[u] = exp_now[u];
        if (u % 2 == 0) exp_now[u] = ref_add(WE_U[u], WF_U[u], na, nb, info);
        else            exp_now[u] = ref_mul(WE_U[u], WF_U[u], na, nb, info);
      end
      @(posedge clk);
      for (int u = 0; u < 6; u++) begin
        check(cres[u], exp_now[u], "combinational", u);
        if (k > 0) check(pres[u], exp_prev[u], "pipelined", u);
      end
    end
    checks++;
    $display("input activity alpha = %0.4f", real'(rises) / real'(bit_cycles));
    if (real'(rises) / real'(bit_cycles) < 0.09 || real'(rises) / real'(bit_cycles) > 0.11) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
