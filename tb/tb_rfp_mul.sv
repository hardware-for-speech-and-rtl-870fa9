// Self-checking test of the floating-point multiplier against exact integer
// products rounded once to the internal format (zeros, overflow and underflow
// included).
module tb_rfp_mul;
  import rfp_pkg::*;
  import rfp_ref_pkg::*;
  rfp_t a, b, y;
  int checks = 0, failures = 0;
  rfp_mul dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    longint e;
    for (int t = 0; t < 20000; t++) begin
      a = rnd_int(31); b = rnd_int((t % 3 == 0) ? 58 : (t % 3 == 1) ? 5 : 31);
      #1;
      e = ref_mul(a, b);
      checks++;
      if (y !== 20'(e)) begin failures++; $display("%h * %h got %h exp %h", a, b, y, 20'(e)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
