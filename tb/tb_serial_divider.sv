// Self-checking test of the bit-serial divider: random DIV_S and DIV_32
// operands are compared with integer reference division (floor of the
// fractional quotient), and the latency must be one start cycle plus 15 or 31 iteration cycles.
module tb_serial_divider;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, long_div, busy, done; logic [31:0] num, quot; logic [15:0] den;
  int checks = 0, failures = 0;
  serial_divider dut (.*);
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    longint n, d, e; int cyc;
    start = 0; long_div = 0; num = 0; den = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      long_div = 1'($urandom);
      d = $urandom_range(1, 32767);
      if (long_div) n = (t % 50 == 0) ? d << 16 : longint'($urandom) % ((d << 16) + 1);
      else          n = (t % 50 == 0) ? d : $urandom_range(0, int'(d));
      num = 32'(n); den = 16'(d);
      if (long_div) e = (n == (d << 16)) ? 64'h7FFFFFFF : (n << 31) / (d << 16);
      else          e = (n == d) ? 64'h7FFF : (n << 15) / d;
      start = 1; @(posedge clk); #1 start = 0; cyc = 1;
      while (!done) begin @(posedge clk); #1 cyc++; end
      checks++;
      if (quot !== 32'(e)) begin failures++; $display("long %0d %0d/%0d got %h exp %h", long_div, n, d, quot, e); end
      checks++;
      if ((n == (long_div ? d << 16 : d)) ? cyc != 1 : cyc != (long_div ? 32 : 16)) begin
        failures++; $display("latency %0d long %0d", cyc, long_div);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
