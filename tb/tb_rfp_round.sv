// Self-checking test of the store converter: random internal values, including
// ties, mantissa carries, exponents below and above the external range, are
// compared with exact rounding to the external format.
module tb_rfp_round;
  import rfp_pkg::*;
  import rfp_ref_pkg::*;
  rfp_t x; logic [15:0] y;
  int checks = 0, failures = 0, n_sat = 0, n_flush = 0;
  rfp_round dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    big_t n; int xe; longint e;
    for (int t = 0; t < 20000; t++) begin
      x = 20'($urandom);
      if (t % 4 == 0) x.m[3:0] = 4'b1000;          // tie
      if (t % 8 == 1) x.m = '1;                     // carry out
      #1;
      decode(x.s, int'(x.e), int'(x.m), 13, 31, n, xe);
      e = encode(n, xe, 9, 5, 15);
      if (x.e > 46) n_sat++;
      if (x.e != 0 && x.e < 17) n_flush++;
      checks++;
      if (y !== 16'(e)) begin failures++; $display("x %h got %h exp %h", x, y, 16'(e)); end
    end
    checks++;
    if (n_sat == 0 || n_flush == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
