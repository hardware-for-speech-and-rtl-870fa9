// Self-checking test of the operand memory: random writes and reads against a
// reference array, with the one-cycle read latency.
module tb_op_ram16;
  localparam int AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we; logic [AW-1:0] waddr, raddr; logic signed [15:0] wdata, rdata;
  logic signed [15:0] refm [2**AW];
  int checks = 0, failures = 0;
  op_ram16 #(.AW(AW)) dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 1;
    for (int i = 0; i < 2**AW; i++) begin waddr = AW'(i); wdata = 16'($urandom); refm[i] = wdata; raddr = 0; @(posedge clk); #1; end
    for (int t = 0; t < 3000; t++) begin
      we = 1'($urandom); waddr = AW'($urandom); wdata = 16'($urandom); raddr = AW'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata !== refm[raddr]) begin failures++; $display("raddr %0d got %h exp %h", raddr, rdata, refm[raddr]); end
      if (we) refm[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
