// Self-checking test of the offset address generator: for random REG, loop
// counter and segment start values the address base + (lc - REG), its absolute
// variant and the negative flag are compared with integer arithmetic.
module tb_offset_agu;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic reg_we, use_abs, neg; logic [15:0] reg_in, lc; logic [AW-1:0] base, addr;
  int checks = 0, failures = 0;
  offset_agu dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int r, d, ea;
    reg_we = 0; reg_in = 0; lc = 0; base = 0; use_abs = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      r = $urandom_range(0, 59);
      reg_we = 1; reg_in = 16'(r); @(posedge clk); #1 reg_we = 0;
      lc = 16'($urandom_range(0, 59)); base = AW'($urandom_range(0, 900)); use_abs = 1'($urandom);
      #1;
      d = int'(lc) - r;
      ea = int'(base) + ((use_abs && d < 0) ? -d : d);
      checks++;
      if (addr !== AW'(ea) || neg !== (d < 0)) begin failures++; $display("lc %0d reg %0d abs %0d addr %0d", lc, r, use_abs, addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
