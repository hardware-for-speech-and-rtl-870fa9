// Self-checking test of the add-shift ALU slice: add/sub, shift and the merged
// add-then-shift operation against integer arithmetic.
module tb_add_shift_unit;
  logic signed [31:0] a, b, y; logic sub; logic [1:0] op; logic [4:0] sh;
  int checks = 0, failures = 0;
  add_shift_unit dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    longint s, e;
    for (int i = 0; i < 3000; i++) begin
      a = $urandom; b = $urandom; sub = 1'($urandom); op = 2'($urandom_range(0, 2)); sh = 5'($urandom);
      #1;
      s = sub ? longint'(a) - longint'(b) : longint'(a) + longint'(b);
      s = longint'(32'(s) ^ 32'h8000_0000) - 64'sh8000_0000;   // wrap to 32-bit signed
      case (op)
        0: e = s;
        1: e = longint'(a) >>> sh;
        default: e = s >>> sh;
      endcase
      checks++;
      if (y !== 32'(e)) begin failures++; $display("op %0d a %h b %h sh %0d got %h exp %h", op, a, b, sh, y, 32'(e)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
