// Self-checking test of the floating-point adder/subtractor against exact
// integer sums rounded once to the internal format: close exponents with heavy
// cancellation, far-apart exponents, zeros and overflow.
module tb_rfp_add;
  import rfp_pkg::*;
  import rfp_ref_pkg::*;
  rfp_t a, b, y, bb; logic sub;
  int checks = 0, failures = 0;
  rfp_add dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    longint e;
    for (int t = 0; t < 30000; t++) begin
      a = rnd_int((t % 5 == 0) ? 62 : 31); b = rnd_int((t % 5 == 0) ? 62 : 31); sub = 1'($urandom);
      if (t % 7 == 0) begin b = a; b.m[1:0] = 2'($urandom); end
      if (t % 11 == 0) b.e = 6'($urandom);
      #1;
      bb = b; bb.s = b.s ^ sub;
      e = ref_add(a, bb);
      checks++;
      if (y !== 20'(e)) begin failures++; $display("%h %s %h got %h exp %h", a, sub ? "-" : "+", b, y, 20'(e)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
