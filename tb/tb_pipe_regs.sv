// tb_pipe_regs: self-checking test of the output register bank. Random words
// enter every cycle; the output must equal the word that entered exactly
// STAGES rising edges earlier, for STAGES = 1 (the default), 2 and 0.
module tb_pipe_regs;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] d;
  logic [31:0] q1, q2, q0;
  logic [31:0] hist [4];     // hist[k]: input present k edges ago

  int checks = 0, failures = 0;

  pipe_regs #(.W(32))              dut1 (.clk, .d, .q(q1));
  pipe_regs #(.W(32), .STAGES(2)) dut2 (.clk, .d, .q(q2));
  pipe_regs #(.W(32), .STAGES(0)) dut0 (.clk, .d, .q(q0));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 5) $display("MISMATCH %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    d = 32'h0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if (i >= 3) begin
        check(q1, hist[1], "1 stage");
        check(q2, hist[2], "2 stages");
      end
      d = $urandom;
      #1;
      check(q0, d, "0 stages");
      @(posedge clk);
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
