// End-to-end test of the MP-MLQ search data path, running the two inner loops
// of the G.723.1 fixed-codebook search one step per cycle:
//  1. pulse search: for l = 0..58 step 2 (hardware counts 58..0), skipping
//     occupied positions, WrkBlk[l] = L_msu(WrkBlk[l], Pamp, ImrCorr[|l-Ploc|]),
//     then the |WrkBlk[l]| maximum and its index with the conditional move.
//  2. convolution over the pulses only: for l = 59..0 the sum over the pulses of
//     L_mac(Pamp[j], Imr[l-Ploc[j]]) with the conditional operand zeroing
//     l < Ploc[j]; compared with the original loop over all 60 positions.
// References are the C loops written with plain integer arithmetic. One step
// per cycle is checked by the cycle count of each loop.
module tb_mpmlq_datapath;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mpmlq_ctl_t ctl;
  logic [15:0] lc, best_idx; logic lc_last, idx_we;
  logic signed [31:0] acc, best;
  int checks = 0, failures = 0, n_zeroed = 0, n_wins = 0;
  localparam int IMR = 100, IMRC = 300;

  mpmlq_datapath dut (.*);

  function automatic longint clip(longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction
  function automatic longint lmult(longint a, longint b);
    return clip(2 * a * b);
  endfunction

  always @(posedge clk) if (idx_we) n_wins++;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(posedge clk); #1; ctl = '0;
  endtask

  initial begin
    int imr [60], imrc [60], ploc [6], pamp [6], occ [60], np;
    longint wrk [60], wref [60], a1, a, r, r2; int ridx, t0;
    ctl = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      np = (trial % 2 == 0) ? 6 : 5;
      // buffers
      for (int i = 0; i < 60; i++) begin
        imr[i]  = $urandom_range(0, 16000) - 8000;
        imrc[i] = (trial % 5 == 4) ? -32768 : $urandom_range(0, 65535) - 32768;
        ctl.mem_we = 1; ctl.mem_waddr = 10'(IMR + i); ctl.mem_wdata = 16'(imr[i]); step();
        ctl.mem_we = 1; ctl.mem_waddr = 10'(IMRC + i); ctl.mem_wdata = 16'(imrc[i]); step();
      end
      foreach (occ[i]) occ[i] = 0;
      for (int j = 0; j < np; j++) begin
        do ploc[j] = $urandom_range(0, 59); while (occ[ploc[j]] != 0);
        pamp[j] = $urandom_range(0, 16000) - 8000;
        if (pamp[j] == 0) pamp[j] = 1;
        occ[ploc[j]] = pamp[j];
      end
      // ---- loop 1: pulse search with the last placed pulse ----
      for (int i = 0; i < 60; i++) wrk[i] = (trial % 5 == 3) ? -2147483647 + i : longint'(int'($urandom));
      wref = wrk;
      a1 = 0; ridx = 0;
      for (int l = 0; l < 60; l += 2) begin
        if (occ[l] != 0) continue;
        a = clip(wref[l] - lmult(pamp[np-1], imrc[(l > ploc[np-1]) ? l - ploc[np-1] : ploc[np-1] - l]));
        wref[l] = a;
        a = (a == -64'sd2147483648) ? 64'sd2147483647 : (a < 0 ? -a : a);
        if (a > a1) begin a1 = a; ridx = l; end
      end
      ctl.reg_we = 1; ctl.reg_in = 16'(ploc[np-1]);
      ctl.lc_load = 1; ctl.lc_start = 58; ctl.lc_step = 2; ctl.cm_init = 1;
      step();
      t0 = $time;
      for (int l = 58; l >= 0; l -= 2) begin
        automatic int ll = l;
        ctl.base = 10'(IMRC); ctl.agu_abs = 1; ctl.y = 16'(pamp[np-1]);
        ctl.acc_in = 32'(wrk[l]);
        ctl.mac_op = (occ[l] != 0) ? MAC_NOP : MAC_MSU_L;
        ctl.cm_exec = (occ[l] == 0); ctl.cm_abs = 1; ctl.cm_ge = 1;
        ctl.lc_adv = 1;
        checks++;
        if (lc !== 16'(l) || lc_last !== (l == 0)) begin failures++; $display("lc %0d exp %0d", lc, l); end
        if (occ[l] == 0)
          fork begin repeat (2) @(posedge clk); #1;
            checks++;
            if (acc !== 32'(wref[ll])) begin failures++; $display("WrkBlk[%0d] got %h exp %h", ll, acc, 32'(wref[ll])); end
          end join_none
        step();
      end
      checks++;
      if (($time - t0) / 10 != 30) begin failures++; $display("loop 1 took %0d cycles", ($time - t0) / 10); end
      repeat (3) step();
      checks++;
      if (best !== 32'(a1) || (a1 != 0 && best_idx !== 16'(ridx))) begin
        failures++; $display("search best %h/%0d exp %h/%0d", best, best_idx, 32'(a1), ridx);
      end
      // ---- loop 2: convolution over the pulses only ----
      ctl.reg_we = 1; ctl.reg_in = 16'(ploc[0]); ctl.lc_load = 1; ctl.lc_start = 59; ctl.lc_step = 1;
      step();
      t0 = $time;
      for (int l = 59; l >= 0; l--) begin
        automatic int ll = l;
        r = 0;
        for (int j = 0; j < np; j++) if (l - ploc[j] >= 0) r = clip(r + lmult(pamp[j], imr[l - ploc[j]]));
        r2 = 0;   // the original loop over all positions
        for (int j = 0; j <= l; j++) r2 = clip(r2 + lmult(occ[j], imr[l - j]));
        checks++;
        if (r != r2) begin failures++; $display("reference loops differ at l=%0d", l); end
        for (int j = 0; j < np; j++) begin
          if (l - ploc[j] < 0) n_zeroed++;
          ctl.base = 10'(IMR); ctl.agu_abs = 0; ctl.cond_en = 1; ctl.y = 16'(pamp[j]);
          ctl.mac_op = (j == 0) ? MAC_MULT : MAC_MAC;
          ctl.reg_we = 1; ctl.reg_in = 16'(ploc[(j + 1) % np]);
          ctl.lc_adv = (j == np - 1);
          if (j == np - 1)
            fork begin automatic longint rr = r; repeat (2) @(posedge clk); #1;
              checks++;
              if (acc !== 32'(rr)) begin failures++; $display("conv l=%0d got %h exp %h", ll, acc, 32'(rr)); end
            end join_none
          step();
        end
      end
      checks++;
      if (($time - t0) / 10 != 60 * np) begin failures++; $display("loop 2 took %0d cycles", ($time - t0) / 10); end
      repeat (3) step();
    end
    checks++;
    if (n_zeroed == 0 || n_wins == 0) begin failures++; $display("mechanism not exercised"); end
    $display("zeroed operands %0d, conditional-move wins %0d", n_zeroed, n_wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
