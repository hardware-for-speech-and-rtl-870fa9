// Self-checking test of the normalisation unit: the count is recomputed by
// shifting the operand left until it is normalised, as the ITU norm_s/norm_l.
module tb_norm_unit;
  logic [31:0] x; logic long_op; logic [4:0] n;
  int checks = 0, failures = 0;
  norm_unit dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int ref_norm(logic [31:0] v, bit lng);
    int c = 0;
    if (lng) begin
      if (v == 0) return 0;
      if (v == 32'hFFFF_FFFF) return 31;
      if (v[31]) v = ~v;
      while (v < 32'h4000_0000) begin v = v << 1; c++; end
    end else begin
      logic [15:0] s = v[15:0];
      if (s == 0) return 0;
      if (s == 16'hFFFF) return 15;
      if (s[15]) s = ~s;
      while (s < 16'h4000) begin s = s << 1; c++; end
    end
    return c;
  endfunction
  initial begin
    for (int i = 0; i < 4000; i++) begin
      long_op = 1'($urandom);
      x = $urandom >> $urandom_range(0, 31);
      if ($urandom_range(0, 1)) x = ~x;
      if (i < 4) x = (i < 2) ? 0 : '1;
      #1;
      checks++;
      if (n !== 5'(ref_norm(x, long_op))) begin failures++; $display("x %h long %0d got %0d exp %0d", x, long_op, n, ref_norm(x, long_op)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
