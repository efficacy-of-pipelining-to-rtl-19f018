// tb_int_mul: self-checking test of the significand multiplier at the three
// significand widths used (24, 11 and 8 bits). Operands are random with the
// top bit set, as significands with a hidden one are, plus corner values;
// products are checked against 64-bit integer multiplication.
module tb_int_mul;

  logic [23:0] a24, b24;
  logic [47:0] p24;
  logic [10:0] a11, b11;
  logic [21:0] p11;
  logic [7:0]  a8, b8;
  logic [15:0] p8;

  int checks = 0, failures = 0;

  int_mul #(.W(24)) dut24 (.a(a24), .b(b24), .p(p24));
  int_mul #(.W(11)) dut11 (.a(a11), .b(b11), .p(p11));
  int_mul #(.W(8))  dut8  (.a(a8),  .b(b8),  .p(p8));

  task automatic check(input longint unsigned got, input longint unsigned exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 5) $display("MISMATCH %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0:       begin a24 = '1;        b24 = '1;        end
        1:       begin a24 = 24'h800000; b24 = 24'h800000; end
        2:       begin a24 = 24'hffffff; b24 = 24'h800000; end
        default: begin a24 = 24'($urandom) | 24'h800000; b24 = 24'($urandom) | 24'h800000; end
      endcase
      a11 = 11'($urandom) | 11'h400; b11 = (i == 0) ? 11'h7ff : 11'($urandom) | 11'h400;
      a8  = 8'($urandom)  | 8'h80;   b8  = (i == 0) ? 8'hff   : 8'($urandom)  | 8'h80;
      if (i == 0) begin a11 = 11'h7ff; a8 = 8'hff; end
      #1;
      check(64'(p24), 64'(a24) * 64'(b24), "24-bit");
      check(64'(p11), 64'(a11) * 64'(b11), "11-bit");
      check(64'(p8),  64'(a8)  * 64'(b8),  "8-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
