// pipe_regs: output pipeline register bank of an arithmetic unit.
//
// STAGES levels of W flip-flops, clocked on every rising edge with no enable
// and no reset, placed behind a combinational arithmetic core. Registering
// the output of a glitch-prone core and letting the synthesis tool retime
// the flops into the logic cuts the long paths into two shorter ones and
// stops glitches from propagating past the register level; a sampled input
// leaves the register glitch-free. One level is the configuration studied
// for saving energy at an unchanged clock rate.
//
// Timing: q equals d from STAGES clock edges earlier. STAGES = 0 gives a
// plain wire (the combinational reference unit).
//
// Own choices: the registers have no reset and no enable, since the unit is
// fed a new operand pair every cycle and a reset would only add load to the
// retimed flops; whatever they hold after power-up is flushed after STAGES
// cycles.
module pipe_regs #(
  parameter int unsigned W      = 32,
  parameter int unsigned STAGES = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (STAGES == 0) begin : g_comb
    assign q = d;
  end else begin : g_pipe
    logic [STAGES-1:0][W-1:0] stage_q;

    always_ff @(posedge clk) begin
      stage_q[0] <= d;
      for (int unsigned i = 1; i < STAGES; i++) stage_q[i] <= stage_q[i-1];
    end

    assign q = stage_q[STAGES-1];
  end

endmodule
