// Workload test: compactly stored FIR filter input on the bit-addressed memory
// path of the top level at its default size, for every sample width from 1 to
// 31 bits.
// For each width b the test
//  - packs 64 signed samples back to back with bit-store instructions, after
//    filling the region with a sentinel, and checks that the word just past
//    the packed data still holds the sentinel (64*b bits used, no padding);
//  - reads 32 consecutive samples once with bit loads (signed mode) and counts
//    the stall cycles. A sample crosses a word boundary unless its end meets one,
//    so a sequential pass of 32 samples must give exactly 32*(b - gcd(b,32))/32
//    = b - gcd(b,32) extra memory accesses. This is the load penalty per
//    width; the memory saving against rounding each sample up to 8, 16 or 32
//    bits, (c - b) / c with c the container, is printed next to it;
//  - runs an 8-tap FIR filter y[i] = sum_k h[k] * x[i-k] over the 64 samples,
//    every x loaded again with a bit load as a processor without a load cache
//    would, and compares each output with the filter computed on the original
//    samples.
// The processor is this testbench: it issues the instructions and does the
// filter arithmetic.
module tb_wl_bitmem_fir;
  import bitmem_pkg::*;
  import dsp_pkg::*;
  import rfp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bm_issue, bm_ready, bm_stall, bm_rvalid; logic [31:0] bm_insn, bm_ra_val, bm_rb_val, bm_rdata; logic [4:0] bm_rd;
  mpmlq_ctl_t mp_ctl; logic [15:0] mp_lc, mp_best_idx; logic mp_lc_last, mp_idx_we; logic signed [31:0] mp_acc, mp_best;
  logic div_start, div_long, div_busy, div_done; logic [31:0] div_num, div_quot; logic [15:0] div_den;
  logic [31:0] norm_x; logic norm_long; logic [4:0] norm_n;
  logic signed [15:0] max_a, max_b, max_y; logic max_abs, max_moved;
  logic signed [31:0] as_a, as_b, as_y; logic as_sub; logic [1:0] as_op; logic [4:0] as_sh;
  rfp_op_e fp_op; logic [15:0] fp_a_mem, fp_b_mem, fp_acc_mem; rfp_t fp_acc;

  speech_audio_hw_top dut (.*);

  int checks = 0, failures = 0, stalls = 0;
  localparam int BASE_W = 64;            // first word of the sample buffer
  localparam logic [31:0] SENTINEL = 32'hA5C3_965A;

  always @(posedge clk) if (bm_stall) stalls++;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic issue(logic [31:0] insn, logic [31:0] ra, logic [31:0] rb, output logic [31:0] q);
    bm_issue = 1; bm_insn = insn; bm_ra_val = ra; bm_rb_val = rb;
    do @(posedge clk); while (!bm_ready);
    #1 bm_issue = 0;
    q = 0;
    if (insn[31:26] == OP_BLOAD || insn[31:26] == OP_LWZ) begin
      while (!bm_rvalid) begin @(posedge clk); #1; end
      q = bm_rdata;
    end else begin
      while (bm_stall) begin @(posedge clk); #1; end
    end
  endtask

  function automatic int gcd32(int b);
    int g = 1;
    while (b % (2 * g) == 0 && 2 * g <= 32) g = 2 * g;
    return g;
  endfunction

  task automatic load_sample(int b, int i, output int v);
    logic [31:0] q;
    issue({OP_BLOAD, 5'd5, 5'd3, 5'(b), 3'b001, 8'd0}, 32'(BASE_W * 32 + i * b), 0, q);
    v = int'(q);
  endtask

  initial begin
    int x [64], h [8], v, p2, s0, ncross; longint y;
    logic [31:0] q;
    bm_issue = 0; bm_insn = 0; bm_ra_val = 0; bm_rb_val = 0;
    mp_ctl = '0; div_start = 0; div_long = 0; div_num = 0; div_den = 1; norm_x = 0; norm_long = 0;
    max_a = 0; max_b = 0; max_abs = 0; as_a = 0; as_b = 0; as_sub = 0; as_op = 0; as_sh = 0;
    fp_op = RFP_NOP; fp_a_mem = 0; fp_b_mem = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 8; k++) h[k] = $urandom_range(0, 2000) - 1000;
    $display(" bits  saving%%  load penalty%% (measured)");
    for (int b = 1; b <= 31; b++) begin
      // sentinel over the buffer and the word after it
      for (int w = 0; w <= 63; w++) issue({OP_SW, 5'd0, 5'd3, 5'd4, 11'd0}, 32'((BASE_W + w) * 4), SENTINEL, q);
      for (int i = 0; i < 64; i++) begin
        x[i] = (b == 1) ? -int'($urandom_range(0, 1)) : int'($urandom_range(0, (1 << b) - 1)) - (1 << (b - 1));
        issue({OP_BSTOR, 5'(b), 5'd3, 5'd4, 3'b000, 8'd0}, 32'(BASE_W * 32 + i * b), 32'(x[i]), q);
      end
      // the word after the packed data is untouched
      issue({OP_LWZ, 5'd6, 5'd3, 16'd0}, 32'((BASE_W + (64 * b + 31) / 32) * 4), 0, q);
      check(q === SENTINEL, $sformatf("b=%0d: word after the buffer overwritten (%h)", b, q));
      // one sequential pass: load penalty
      s0 = stalls;
      for (int i = 0; i < 32; i++) begin
        load_sample(b, i, v);
        check(v == x[i], $sformatf("b=%0d x[%0d] = %0d exp %0d", b, i, v, x[i]));
      end
      ncross = b - gcd32(b);
      check(stalls - s0 == ncross, $sformatf("b=%0d: %0d extra accesses exp %0d", b, stalls - s0, ncross));
      p2 = 8; while (p2 < b) p2 = 2 * p2;
      $display(" %4d  %6.1f  %6.1f", b, 100.0 * real'(p2 - b) / real'(p2), 100.0 * real'(stalls - s0) / 32.0);
      // FIR filter over the packed samples
      for (int i = 7; i < 64; i++) begin
        automatic longint r = 0;
        y = 0;
        for (int k = 0; k < 8; k++) begin
          load_sample(b, i - k, v);
          y += longint'(h[k]) * v;
          r += longint'(h[k]) * x[i - k];
        end
        check(y == r, $sformatf("b=%0d y[%0d] = %0d exp %0d", b, i, y, r));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
