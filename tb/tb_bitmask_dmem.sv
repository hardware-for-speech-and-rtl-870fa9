// Self-checking test of the bit-mask memory: random masked writes and reads are
// compared with a reference array; read data must appear one cycle after en.
module tb_bitmask_dmem;
  localparam int AW = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we; logic [AW-1:0] addr; logic [31:0] wmask, wdata, rdata;
  logic [31:0] refm [2**AW];
  int checks = 0, failures = 0;
  bitmask_dmem #(.AW(AW), .DW(32)) dut (.*);

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; we = 1; wmask = '1;
    for (int i = 0; i < 2**AW; i++) begin
      addr = AW'(i); wdata = $urandom; refm[i] = wdata; @(posedge clk); #1;
    end
    for (int it = 0; it < 2000; it++) begin
      addr = AW'($urandom); en = 1; we = $urandom_range(0, 1);
      wmask = $urandom & $urandom; wdata = $urandom;
      @(posedge clk); #1;
      checks++;
      if (rdata !== refm[addr]) begin failures++; $display("addr %0d got %h exp %h", addr, rdata, refm[addr]); end
      if (we) refm[addr] = (refm[addr] & ~wmask) | (wdata & wmask);
      // a disabled cycle must not write (caught by later reads)
      en = 0; we = 1; wmask = '1; wdata = ~wdata; @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
