// Self-checking test of the floating-point MAC: random operation sequences
// checked step by step against the reference (product rounded, then sum
// rounded), including dot products of the kind a synthesis filterbank runs.
module tb_rfp_mac;
  import rfp_pkg::*;
  import rfp_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rfp_op_e op; rfp_t a, b, acc; rfp_t r, p, nb;
  int checks = 0, failures = 0;
  rfp_mac dut (.*);
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    op = RFP_NOP; a = 0; b = 0; r = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 10000; t++) begin
      op = rfp_op_e'($urandom_range(0, 6));
      if (t % 40 == 0) op = RFP_CLR;
      a = rnd_int(31); b = rnd_int(31);
      p = 20'(ref_mul(a, b));
      nb = p; nb.s = ~p.s;
      case (op)
        RFP_CLR:  r = 0;
        RFP_LOAD: r = a;
        RFP_MUL:  r = p;
        RFP_MAC:  r = 20'(ref_add(r, p));
        RFP_MSU:  r = 20'(ref_add(r, (p.e == 0) ? p : nb));
        RFP_ADD:  r = 20'(ref_add(r, a));
        default: ;
      endcase
      @(posedge clk); #1;
      checks++;
      if (acc !== r) begin failures++; $display("t %0d op %s got %h exp %h", t, op.name(), acc, r); r = acc; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
