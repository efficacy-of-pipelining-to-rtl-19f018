// fp_stream_check: drives one floating-point unit with a new operand pair on
// every clock and checks each result against the exact reference.
//
// The operands present at rising edge k must show up on r at edge
// k + STAGES, so the comparison checks the latency as well as the value.
// Besides checks and failures it counts how often each mechanism of the
// unit was exercised: rounding increments, exact ties, exponent carry from
// normalisation or rounding, cancellations of more than one bit, exact zero
// results and exponents that wrapped around the field.
module fp_stream_check
  import fp_ref_pkg::*;
#(
  parameter bit          IS_MUL = 1'b0,
  parameter int unsigned WE     = 8,
  parameter int unsigned WF     = 23,
  parameter int unsigned STAGES = 1,
  parameter int unsigned NVEC   = 2000,
  localparam int unsigned W     = 1 + WE + WF
) (
  input  logic         clk,
  input  logic         start,
  output logic [W-1:0] a,
  output logic [W-1:0] b,
  input  logic [W-1:0] r,
  output logic         done,
  output int           checks,
  output int           failures,
  output int           n_rup,
  output int           n_tie,
  output int           n_carry,
  output int           n_cancel,
  output int           n_zero,
  output int           n_wrap
);

  logic [W-1:0] expect_q [NVEC];
  int           issued;     // pairs applied so far
  int           edge_no;    // rising edges since the first pair was applied
  logic         running;

  initial begin
    a = '0; b = '0; done = 1'b0; running = 1'b0;
    checks = 0; failures = 0;
    n_rup = 0; n_tie = 0; n_carry = 0; n_cancel = 0; n_zero = 0; n_wrap = 0;
    issued = 0; edge_no = 0;
  end

  // Drive on the falling edge so the operands are stable at the rising edge.
  always @(negedge clk) begin
    if (start && !done && issued < int'(NVEC)) begin
      logic [31:0] wa, wb, wr;
      ref_info_t   info;
      int          emax;
      gen_pair(int'(WE), int'(WF), IS_MUL, wa, wb);
      if (IS_MUL) wr = ref_mul(int'(WE), int'(WF), wa, wb, info);
      else        wr = ref_add(int'(WE), int'(WF), wa, wb, info);
      a = wa[W-1:0];
      b = wb[W-1:0];
      expect_q[issued] = wr[W-1:0];
      emax = int'(wa[W-2:WF]);
      if (int'(wb[W-2:WF]) > emax) emax = int'(wb[W-2:WF]);
      if (info.rup)  n_rup++;
      if (info.tie)  n_tie++;
      if (info.zero) n_zero++;
      if (info.e < 0 || info.e >= (1 << WE)) n_wrap++;
      if (IS_MUL) begin
        if (info.e == int'(wa[W-2:WF]) + int'(wb[W-2:WF]) - int'(fbias(int'(WE))) + 1) n_carry++;
      end else if (!info.zero) begin
        if (info.e == emax + 1) n_carry++;
        if (info.e < emax - 1)  n_cancel++;
      end
      issued++;
      running = 1'b1;
    end
  end

  always @(posedge clk) begin
    if (running && !done) begin
      if (edge_no >= int'(STAGES) && edge_no - int'(STAGES) < int'(NVEC)) begin
        checks++;
        if (r !== expect_q[edge_no - int'(STAGES)]) begin
          failures++;
          if (failures <= 5)
            $display("MISMATCH %s WE=%0d WF=%0d op#%0d: got %h expected %h",
                     IS_MUL ? "mul" : "add", WE, WF, edge_no - int'(STAGES), r,
                     expect_q[edge_no - int'(STAGES)]);
        end
      end
      edge_no++;
      if (edge_no >= int'(NVEC + STAGES)) done = 1'b1;
    end
  end

endmodule
