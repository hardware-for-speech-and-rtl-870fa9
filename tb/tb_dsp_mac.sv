// Self-checking test of the MAC unit: random operation sequences in fractional,
// integer, autocorrelation and conditional-operand modes are compared with a
// reference written from the ITU basic-operation definitions (wide integer
// arithmetic with explicit saturation). Saturation must occur in the test.
module tb_dsp_mac;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mac_op_e op; logic signed [15:0] x, y; logic signed [31:0] acc_in, acc;
  logic int_mode, auto_mode, cond_en, cond_neg;
  int checks = 0, failures = 0, n_sat = 0, n_zero = 0;
  dsp_mac dut (.*);

  function automatic longint clip(longint v);
    if (v > 64'sd2147483647) begin n_sat++; return 64'sd2147483647; end
    if (v < -64'sd2147483648) begin n_sat++; return -64'sd2147483648; end
    return v;
  endfunction

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    longint r, p, xs, ys;
    op = MAC_NOP; x = 0; y = 0; acc_in = 0; int_mode = 0; auto_mode = 0; cond_en = 0; cond_neg = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    r = 0;
    for (int t = 0; t < 5000; t++) begin
      op = mac_op_e'($urandom_range(0, 7));
      x = (t % 13 == 0) ? -16'sd32768 : 16'($urandom); y = (t % 17 == 0) ? -16'sd32768 : 16'($urandom);
      acc_in = $urandom; int_mode = 1'($urandom); auto_mode = ($urandom_range(0, 3) == 0);
      cond_en = 1'($urandom); cond_neg = 1'($urandom);
      xs = (cond_en && cond_neg) ? 0 : longint'(x);
      if (cond_en && cond_neg) n_zero++;
      ys = auto_mode ? xs : longint'(y);
      p = int_mode ? xs * ys : clip(2 * xs * ys);
      case (op)
        MAC_CLR:   r = 0;
        MAC_LOAD:  r = longint'(acc_in);
        MAC_MULT:  r = p;
        MAC_MAC:   r = clip(r + p);
        MAC_MSU:   r = clip(r - p);
        MAC_MAC_L: r = clip(longint'(acc_in) + p);
        MAC_MSU_L: r = clip(longint'(acc_in) - p);
        default: ;
      endcase
      @(posedge clk); #1;
      checks++;
      if (acc !== 32'(r)) begin failures++; $display("t %0d op %s got %h exp %h", t, op.name(), acc, 32'(r)); r = longint'(acc); end
    end
    checks++;
    if (n_sat == 0 || n_zero == 0) failures++;
    $display("saturations %0d zeroed operands %0d", n_sat, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
