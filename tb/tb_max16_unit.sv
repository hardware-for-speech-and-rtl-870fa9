// Self-checking test of the amax/max unit against an independent reference,
// including the saturating abs of -32768.
module tb_max16_unit;
  logic signed [15:0] a, b, y; logic use_abs, moved;
  int checks = 0, failures = 0;
  max16_unit dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int ai, bi, ci, ey;
    for (int i = 0; i < 3000; i++) begin
      a = (i % 10 == 0) ? -16'sd32768 : 16'($urandom); b = 16'($urandom); use_abs = 1'($urandom);
      if (i % 7 == 0) b = a;
      #1;
      ai = a; bi = b;
      ci = (use_abs && ai < 0) ? ((-ai > 32767) ? 32767 : -ai) : ai;
      ey = (ci > bi) ? ci : bi;
      checks++;
      if (y !== 16'(ey) || moved !== (ci > bi)) begin failures++; $display("a %0d b %0d abs %0d y %0d", a, b, use_abs, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
