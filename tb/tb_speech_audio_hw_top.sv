// End-to-end test of the top level at its default sizes.
//  A. Bit memory: 13-bit signed ADC samples and 9/10/11-bit V.42bis codewords
//     are packed back to back with bit-store instructions (bit pointer in RA,
//     8-bit offsets), read back with bit loads in unsigned, signed and
//     fractional modes, and mixed with ordinary word loads and stores; all
//     results are compared with a bit-level reference memory.
//  B. G.723.1: one pulse-search loop and one pulse-only convolution loop on the
//     search data path, checked against the C loops; DIV_S and DIV_32, NORM_S and
//     NORM_L, amax/max and add-shift operations.
//  C. Reduced floating point: dot products of memory-format operands checked
//     step by step, plus the rounded store value of the accumulator.
// Each mechanism (word-crossing load and store with stall, each load mode,
// conditional zero operand, conditional-move win, loop end, divider, float
// cancellation, store saturation and flush) is counted; one that never happens
// counts as a failure.
module tb_speech_audio_hw_top;
  import bitmem_pkg::*;
  import dsp_pkg::*;
  import rfp_pkg::*;
  import rfp_ref_pkg::*;

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

  int checks = 0, failures = 0;
  int n_split_ld = 0, n_split_st = 0, n_stall = 0, n_mode[3] = '{0, 0, 0}, n_word = 0;
  int n_zeroed = 0, n_wins = 0, n_last = 0, n_div = 0, n_cancel = 0, n_sat = 0, n_flush = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #50000000; failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (bm_stall) n_stall++;
    if (mp_idx_we) n_wins++;
    if (div_done) n_div++;
  end

  // ---------------- A: bit memory ----------------
  localparam int NBITS = 32 * 1024;
  bit refm [NBITS];

  function automatic logic [31:0] ref_load(int b, int len, logic [2:0] md);
    logic [31:0] v = 0;
    for (int i = 0; i < len; i++) v = {v[30:0], refm[b + i]};
    if (md[1]) return v << (32 - len);
    if (md[0] && v[len-1]) for (int i = len; i < 32; i++) v[i] = 1'b1;
    return v;
  endfunction

  // issue one instruction, wait until accepted (and for a load, its data)
  task automatic issue(logic [31:0] insn, logic [31:0] ra, logic [31:0] rb, output logic [31:0] q, output logic [4:0] rd);
    bm_issue = 1; bm_insn = insn; bm_ra_val = ra; bm_rb_val = rb;
    do @(posedge clk); while (!bm_ready);
    #1 bm_issue = 0;
    q = 0; rd = 0;
    if (insn[31:26] == OP_BLOAD || insn[31:26] == OP_LWZ) begin
      while (!bm_rvalid) begin @(posedge clk); #1; end
      q = bm_rdata; rd = bm_rd;
    end else begin
      while (bm_stall) begin @(posedge clk); #1; end
    end
  endtask

  task automatic bit_store(int bp, int off, int len, logic [2:0] md, logic [31:0] d);
    logic [31:0] q, v; logic [4:0] rd;
    issue({OP_BSTOR, 5'(len), 5'd3, 5'd4, md, 8'(off)}, 32'(bp), d, q, rd);
    v = md[1] ? d >> (32 - len) : d;
    for (int i = 0; i < len; i++) refm[bp + off + i] = v[len-1-i];
    if ((bp + off) % 32 + len > 32) n_split_st++;
  endtask

  task automatic bit_load(int bp, int off, int len, logic [2:0] md, int rdx);
    logic [31:0] q; logic [4:0] rd;
    issue({OP_BLOAD, 5'(rdx), 5'd3, 5'(len), md, 8'(off)}, 32'(bp), 0, q, rd);
    check(q === ref_load(bp + off, len, md) && rd == 5'(rdx),
          $sformatf("bit load @%0d len %0d mode %0d: %h exp %h", bp + off, len, md, q, ref_load(bp + off, len, md)));
    if ((bp + off) % 32 + len > 32) n_split_ld++;
    n_mode[md[1] ? 2 : md[0] ? 1 : 0]++;
  endtask

  task automatic part_a();
    int bp; int w; logic [31:0] q, d; logic [4:0] rd;
    // clear the memory with ordinary word stores
    for (int i = 0; i < 1024; i++) issue({OP_SW, 5'd0, 5'd3, 5'd4, 11'd0}, 32'(i * 4), 0, q, rd);
    foreach (refm[i]) refm[i] = 0;
    // 13-bit signed ADC samples, packed
    for (int i = 0; i < 200; i++) bit_store(i * 13, 0, 13, 3'b001, 32'($urandom_range(0, 8191)) - 4096);
    for (int i = 0; i < 200; i++) bit_load(i * 13, 0, 13, 3'(i % 3 == 2 ? 3'b010 : (i % 3 == 1 ? 3'b001 : 3'b000)), i % 32);
    // V.42bis codewords of 9, 10 and 11 bits, bit pointer plus offset
    bp = 4000;
    for (int cw = 9; cw <= 11; cw++) begin
      int start = bp;
      for (int i = 0; i < 100; i++) begin
        bit_store(bp, (i % 4) * 8 - 8, cw, 3'b000, $urandom);  // offsets -8..16
        bp += cw;
      end
      bp = start;
      for (int i = 0; i < 100; i++) begin bit_load(bp, (i % 4) * 8 - 8, cw, 3'b000, 7); bp += cw; end
    end
    // fractional stores (value in the upper bits of the register), any length
    for (int i = 0; i < 300; i++) begin
      int len = $urandom_range(1, 32), b = $urandom_range(10000, 30000);
      bit_store(b, 0, len, 3'b010, $urandom);
      bit_load(b, 0, len, 3'($urandom_range(0, 3)), 1);
    end
    // ordinary word accesses still work
    for (int i = 0; i < 50; i++) begin
      w = $urandom_range(0, 1023); d = $urandom;
      issue({OP_SW, 5'd0, 5'd3, 5'd4, 11'd8}, 32'(w * 4 - 8), d, q, rd);
      for (int k = 0; k < 32; k++) refm[w * 32 + k] = d[31-k];
      issue({OP_LWZ, 5'd9, 5'd3, 16'hFFFC}, 32'(w * 4 + 4), 0, q, rd);
      check(q === d && rd == 5'd9, $sformatf("word load %h exp %h", q, d));
      n_word++;
    end
  endtask

  // ---------------- B: G.723.1 ----------------
  function automatic longint clip(longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  task automatic mp_step();
    @(posedge clk); #1; mp_ctl = '0;
  endtask

  task automatic part_b();
    int imr [60], imrc [60], ploc [6], pamp [6], occ [60]; longint wrk [60], wref [60], a, a1, r; int ridx, np;
    longint n, dd, e;
    for (int trial = 0; trial < 4; trial++) begin
      np = 6 - trial % 2;
      for (int i = 0; i < 60; i++) begin
        imr[i] = $urandom_range(0, 16000) - 8000; imrc[i] = $urandom_range(0, 65535) - 32768;
        mp_ctl.mem_we = 1; mp_ctl.mem_waddr = 10'(100 + i); mp_ctl.mem_wdata = 16'(imr[i]); mp_step();
        mp_ctl.mem_we = 1; mp_ctl.mem_waddr = 10'(300 + i); mp_ctl.mem_wdata = 16'(imrc[i]); mp_step();
      end
      foreach (occ[i]) occ[i] = 0;
      for (int j = 0; j < np; j++) begin
        do ploc[j] = $urandom_range(0, 59); while (occ[ploc[j]] != 0);
        pamp[j] = $urandom_range(1, 8000) * ((j % 2) ? -1 : 1);
        occ[ploc[j]] = pamp[j];
      end
      // pulse search
      for (int i = 0; i < 60; i++) wrk[i] = longint'(int'($urandom));
      wref = wrk; a1 = 0; ridx = 0;
      for (int l = 0; l < 60; l += 2) begin
        if (occ[l] != 0) continue;
        a = clip(wref[l] - clip(2 * pamp[np-1] * imrc[(l > ploc[np-1]) ? l - ploc[np-1] : ploc[np-1] - l]));
        wref[l] = a;
        a = (a < 0) ? ((a == -64'sd2147483648) ? 64'sd2147483647 : -a) : a;
        if (a > a1) begin a1 = a; ridx = l; end
      end
      mp_ctl.reg_we = 1; mp_ctl.reg_in = 16'(ploc[np-1]); mp_ctl.lc_load = 1; mp_ctl.lc_start = 58; mp_ctl.lc_step = 2; mp_ctl.cm_init = 1;
      mp_step();
      for (int l = 58; l >= 0; l -= 2) begin
        mp_ctl.base = 10'd300; mp_ctl.agu_abs = 1; mp_ctl.y = 16'(pamp[np-1]); mp_ctl.acc_in = 32'(wrk[l]);
        mp_ctl.mac_op = (occ[l] != 0) ? MAC_NOP : MAC_MSU_L;
        mp_ctl.cm_exec = (occ[l] == 0); mp_ctl.cm_abs = 1; mp_ctl.cm_ge = 1; mp_ctl.lc_adv = 1;
        if (mp_lc_last) n_last++;
        mp_step();
      end
      repeat (3) mp_step();
      check(mp_best === 32'(a1) && mp_best_idx === 16'(ridx),
            $sformatf("search best %h/%0d exp %h/%0d", mp_best, mp_best_idx, 32'(a1), ridx));
      // convolution over the pulses
      mp_ctl.reg_we = 1; mp_ctl.reg_in = 16'(ploc[0]); mp_ctl.lc_load = 1; mp_ctl.lc_start = 59; mp_ctl.lc_step = 1;
      mp_step();
      for (int l = 59; l >= 0; l--) begin
        r = 0;
        for (int j = 0; j <= l; j++) r = clip(r + clip(2 * occ[j] * imr[l - j]));   // original loop
        for (int j = 0; j < np; j++) begin
          if (l < ploc[j]) n_zeroed++;
          mp_ctl.base = 10'd100; mp_ctl.cond_en = 1; mp_ctl.y = 16'(pamp[j]);
          mp_ctl.mac_op = (j == 0) ? MAC_MULT : MAC_MAC;
          mp_ctl.reg_we = 1; mp_ctl.reg_in = 16'(ploc[(j + 1) % np]); mp_ctl.lc_adv = (j == np - 1);
          mp_step();
        end
        // the result of the last step lands two cycles after it was issued
        fork begin automatic longint rr = r; automatic int ll = l;
          @(posedge clk); #1;
          check(mp_acc === 32'(rr), $sformatf("conv l=%0d %h exp %h", ll, mp_acc, 32'(rr)));
        end join_none
      end
      repeat (3) mp_step();
    end
    // divider
    for (int t = 0; t < 20; t++) begin
      div_long = t[0]; dd = $urandom_range(1, 32767);
      n = div_long ? longint'($urandom) % ((dd << 16) + 1) : $urandom_range(0, int'(dd));
      e = div_long ? ((n == dd << 16) ? 64'h7FFFFFFF : (n << 31) / (dd << 16)) : ((n == dd) ? 64'h7FFF : (n << 15) / dd);
      div_num = 32'(n); div_den = 16'(dd); div_start = 1; @(posedge clk); #1 div_start = 0;
      while (!div_done) begin @(posedge clk); #1; end
      check(div_quot === 32'(e), $sformatf("div %0d/%0d %h exp %h", n, dd, div_quot, e));
    end
    // normalisation, amax/max, add-shift
    for (int s = 0; s < 31; s++) begin
      norm_long = 1; norm_x = 32'h4000_0000 >> s; #1;
      check(norm_n == 5'(s), $sformatf("norm_l %h -> %0d", norm_x, norm_n));
      if (s < 15) begin norm_long = 0; norm_x = 32'(16'h4000 >> s); #1;
        check(norm_n == 5'(s), $sformatf("norm_s %h -> %0d", norm_x, norm_n)); end
    end
    max_a = -16'sd300; max_b = 16'sd200; max_abs = 1; #1; check(max_y == 300 && max_moved, "amax");
    max_abs = 0; #1; check(max_y == 200 && !max_moved, "max");
    as_a = 32'sd1000; as_b = -32'sd3000; as_sub = 0; as_op = 2; as_sh = 3; #1; check(as_y == -32'sd250, "add-shift");
  endtask

  // ---------------- C: reduced floating point ----------------
  function automatic logic [15:0] rnd_ext(int ebase);
    logic [15:0] v = 16'($urandom);
    v[15] = 0;
    v[13:9] = 5'(ebase + $urandom_range(0, 6) - 3);
    return v;
  endfunction

  task automatic part_c();
    rfp_t r, p, x; rfp_t ea, eb;
    big_t nn; int xx;
    for (int t = 0; t < 20; t++) begin
      r = 0;
      for (int k = 0; k < 32; k++) begin
        fp_a_mem = rnd_ext(15); fp_b_mem = rnd_ext(15);
        if (t == 5 && k == 1) fp_b_mem = fp_b_mem ^ 16'h4000;       // exact cancellation below
        if (t == 5 && k == 1) fp_a_mem = 16'h0;
        decode(fp_a_mem[14], int'(fp_a_mem[13:9]), int'(fp_a_mem[8:0]), 9, 15, nn, xx);
        ea = (nn == 0) ? 20'h0 : {fp_a_mem[14], 6'(fp_a_mem[13:9] + 16), fp_a_mem[8:0], 4'h0};
        eb = {fp_b_mem[14], 6'(fp_b_mem[13:9] + 16), fp_b_mem[8:0], 4'h0};
        p = 20'(ref_mul(ea, eb));
        fp_op = (k == 0) ? RFP_MUL : (k % 5 == 4 ? RFP_MSU : RFP_MAC);
        if (t == 5 && k == 1) begin fp_op = RFP_LOAD; p = 0; end
        if (t == 5 && k == 2) begin fp_op = RFP_ADD; fp_a_mem = {1'b0, ~r.s, 5'(r.e - 16), r.m[12:4]}; end
        case (fp_op)
          RFP_MUL:  x = p;
          RFP_MAC:  x = 20'(ref_add(r, p));
          RFP_MSU:  x = 20'(ref_add(r, (p.e == 0) ? p : {~p.s, p.e, p.m}));
          RFP_LOAD: x = ea;
          RFP_ADD:  x = 20'(ref_add(r, {fp_a_mem[14], 6'(fp_a_mem[13:9] + 16), fp_a_mem[8:0], 4'h0}));
          default:  x = r;
        endcase
        if (fp_op != RFP_MUL && fp_op != RFP_LOAD && x.e != 0 && r.e != 0 && x.e + 3 < r.e) n_cancel++;
        r = x;
        @(posedge clk); #1;
        check(fp_acc === r, $sformatf("fp t%0d k%0d op %s %h exp %h", t, k, fp_op.name(), fp_acc, r));
        decode(r.s, int'(r.e), int'(r.m), 13, 31, nn, xx);
        check(fp_acc_mem === 16'(encode(nn, xx, 9, 5, 15)), $sformatf("store %h exp %h", fp_acc_mem, 16'(encode(nn, xx, 9, 5, 15))));
        if (r.e > 46) n_sat++;
        if (r.e != 0 && r.e < 17) n_flush++;
      end
    end
    // very large and very small accumulator values: store saturates / flushes
    fp_a_mem = 16'h3E00; fp_b_mem = 16'h3E00; fp_op = RFP_MUL; @(posedge clk); #1;   // 2^16 * 2^16
    check(fp_acc_mem === 16'h3FFF, "store saturation"); if (fp_acc.e > 46) n_sat++;
    fp_a_mem = 16'h0400; fp_b_mem = 16'h0400; fp_op = RFP_MUL; @(posedge clk); #1;   // 2^-14 * 2^-14
    check(fp_acc_mem === 16'h0000 && fp_acc.e != 0, "store flush"); if (fp_acc.e != 0 && fp_acc.e < 17) n_flush++;
    fp_op = RFP_NOP;
  endtask

  initial begin
    bm_issue = 0; bm_insn = 0; bm_ra_val = 0; bm_rb_val = 0; mp_ctl = '0;
    div_start = 0; div_long = 0; div_num = 0; div_den = 1; norm_x = 0; norm_long = 0;
    max_a = 0; max_b = 0; max_abs = 0; as_a = 0; as_b = 0; as_sub = 0; as_op = 0; as_sh = 0;
    fp_op = RFP_NOP; fp_a_mem = 0; fp_b_mem = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    fork
      part_a();
      part_b();
      part_c();
    join
    repeat (4) @(posedge clk);
    $display("A: crossing loads %0d, crossing stores %0d, stall cycles %0d, loads unsigned/signed/fractional %0d/%0d/%0d, word loads %0d",
             n_split_ld, n_split_st, n_stall, n_mode[0], n_mode[1], n_mode[2], n_word);
    $display("B: zeroed operands %0d, conditional-move wins %0d, loop ends %0d, divisions %0d", n_zeroed, n_wins, n_last, n_div);
    $display("C: cancellations %0d, store saturations %0d, store flushes %0d", n_cancel, n_sat, n_flush);
    check(n_split_ld > 0 && n_split_st > 0 && n_stall > 0 && n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0 && n_word > 0, "A mechanisms");
    check(n_zeroed > 0 && n_wins > 0 && n_last > 0 && n_div > 0, "B mechanisms");
    check(n_cancel > 0 && n_sat > 0 && n_flush > 0, "C mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
