// Self-checking test of the 32-bit conditional move with loop index: random
// searches over a down-counting loop are checked against a C-style reference
// (up-counting loop with '>' must equal the down-counting hardware with '>='),
// plus '>' mode, the same-cycle max_out write-back value, no-abs mode and
// the saturating abs of the most negative value.
// Every conditional move must complete in one cycle.
module tb_cond_move_idx;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init, exec, use_abs, ge_mode, idx_we;
  logic signed [31:0] init_val, acr1, acr2, max_out;
  logic [15:0] loop_idx, best_idx;
  int checks = 0, failures = 0;
  cond_move_idx dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [31:0] v [30];
    logic signed [31:0] rbest, a; int ridx;
    init = 0; exec = 0; use_abs = 0; ge_mode = 0; init_val = 0; acr1 = 0; loop_idx = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int mode = t % 3;   // 0: abs + '>=' down vs C up '>'; 1: no abs, '>' down; 2: abs '>' down
      for (int i = 0; i < 30; i++) begin
        case ($urandom_range(0, 3))
          0: v[i] = 32'($urandom_range(0, 20)) - 10;  // many ties
          1: v[i] = MIN32;
          default: v[i] = $urandom;
        endcase
      end
      // reference
      rbest = 0; ridx = 0;
      if (mode == 0) begin
        for (int i = 0; i < 30; i++) begin a = sat_abs32(v[i]); if (a > rbest) begin rbest = a; ridx = 2*i; end end
      end else begin
        for (int i = 29; i >= 0; i--) begin
          a = (mode == 2) ? sat_abs32(v[i]) : v[i];
          if (a > rbest) begin rbest = a; ridx = 2*i; end
        end
      end
      init = 1; init_val = 0; @(posedge clk); #1 init = 0;
      for (int i = 29; i >= 0; i--) begin
        exec = 1; acr1 = v[i]; loop_idx = 16'(2*i);
        use_abs = (mode != 1); ge_mode = (mode == 0);
        #1;
        begin
          logic signed [31:0] c, m;
          c = use_abs ? sat_abs32(acr1) : acr1;
          m = (ge_mode ? (c >= acr2) : (c > acr2)) ? c : acr2;
          checks++;
          if (max_out !== m) begin failures++; $display("max_out %h exp %h", max_out, m); end
        end
        @(posedge clk); #1;   // result must be there after one cycle
      end
      exec = 0;
      checks++;
      if (acr2 !== rbest || best_idx !== 16'(ridx)) begin
        failures++; $display("mode %0d got %h/%0d exp %h/%0d", mode, acr2, best_idx, rbest, ridx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
