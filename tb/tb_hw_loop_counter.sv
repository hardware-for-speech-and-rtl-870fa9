// Self-checking test of the down-counting loop counter: random start values and
// steps; the visited indices, the last flag and the number of iterations are
// compared with a for-loop reference.
module tb_hw_loop_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, adv, last; logic [15:0] start, step, count;
  int checks = 0, failures = 0;
  hw_loop_counter dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int n;
    load = 0; adv = 0; start = 0; step = 1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      start = 16'($urandom_range(0, 70)); step = 16'($urandom_range(1, 4));
      if (t == 0) begin start = 58; step = 2; end
      load = 1; @(posedge clk); #1 load = 0;
      n = 0;
      for (int i = int'(start); i >= 0; i -= int'(step)) begin
        checks++;
        if (count !== 16'(i) || last !== (i < int'(step))) begin failures++; $display("i %0d count %0d last %0d", i, count, last); end
        n++;
        if (last) break;
        adv = 1; @(posedge clk); #1 adv = 0;
      end
      checks++;
      if (n != int'(start) / int'(step) + 1) begin failures++; $display("iterations %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
