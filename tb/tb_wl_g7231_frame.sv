// Workload test: one worst-case frame of G.723.1 6.3 kbit/s fixed-codebook
// search work on the MP-MLQ data path at its default size (1024-word operand
// memory).
//  - 64 impulse-response convolutions over the pulses only, alternating 6 and
//    5 pulses (even and odd subframes): 64 * 60 * 5.5 = 21120 multiply-
//    accumulates, one per cycle, so the MAC phase must take exactly 21120
//    cycles. Every one of the 64 * 60 outputs is compared with the C loop
//    written in plain integer arithmetic.
//  - 288 pulse-position searches of 30 even positions each, one position per
//    cycle: 8640 cycles. The maximum and its index after each search are
//    compared with the reference.
// The counts 64, 288, 60 and 5.5 are the worst-case figures of the G.723.1
// search; buffer contents are random. The cycle totals are printed and
// checked.
module tb_wl_g7231_frame;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mpmlq_ctl_t ctl;
  logic [15:0] lc, best_idx; logic lc_last, idx_we;
  logic signed [31:0] acc, best;
  int checks = 0, failures = 0;
  int conv_cycles = 0, search_cycles = 0;
  localparam int IMR = 512, IMRC = 768;

  mpmlq_datapath dut (.*);

  function automatic longint clip(longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction
  function automatic longint lmult(int a, int b);
    return clip(2 * longint'(a) * longint'(b));
  endfunction

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(posedge clk); #1; ctl = '0;
  endtask

  int imr [60], imrc [60];
  longint conv_exp [60];

  initial begin
    int ploc [6], pamp [6], occ [60], np;
    longint wrk [60], wref [60], a1, a; int ridx;
    ctl = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      imr[i]  = $urandom_range(0, 16000) - 8000;
      imrc[i] = $urandom_range(0, 65535) - 32768;
      ctl.mem_we = 1; ctl.mem_waddr = 10'(IMR + i); ctl.mem_wdata = 16'(imr[i]); step();
      ctl.mem_we = 1; ctl.mem_waddr = 10'(IMRC + i); ctl.mem_wdata = 16'(imrc[i]); step();
    end
    // ---- 64 convolutions ----
    for (int c = 0; c < 64; c++) begin
      np = (c % 2 == 0) ? 6 : 5;
      foreach (occ[i]) occ[i] = 0;
      for (int j = 0; j < np; j++) begin
        do ploc[j] = $urandom_range(0, 59); while (occ[ploc[j]] != 0);
        pamp[j] = $urandom_range(1, 16000) - 8000;
        if (pamp[j] == 0) pamp[j] = 1;
        occ[ploc[j]] = 1;
      end
      for (int l = 0; l < 60; l++) begin
        conv_exp[l] = 0;
        for (int j = 0; j < np; j++)
          if (l >= ploc[j]) conv_exp[l] = clip(conv_exp[l] + lmult(pamp[j], imr[l - ploc[j]]));
      end
      ctl.reg_we = 1; ctl.reg_in = 16'(ploc[0]); ctl.lc_load = 1; ctl.lc_start = 59; ctl.lc_step = 1;
      step();
      for (int l = 59; l >= 0; l--) begin
        for (int j = 0; j < np; j++) begin
          ctl.base = 10'(IMR); ctl.cond_en = 1; ctl.y = 16'(pamp[j]);
          ctl.mac_op = (j == 0) ? MAC_MULT : MAC_MAC;
          ctl.reg_we = 1; ctl.reg_in = 16'(ploc[(j + 1) % np]);
          ctl.lc_adv = (j == np - 1);
          if (j == np - 1)
            fork begin automatic longint e = conv_exp[l]; repeat (2) @(posedge clk); #1;
              checks++;
              if (acc !== 32'(e)) begin failures++; $display("conv got %h exp %h", acc, 32'(e)); end
            end join_none
          conv_cycles++;
          step();
        end
      end
      repeat (2) step();
    end
    // ---- 288 pulse searches ----
    for (int s = 0; s < 288; s++) begin
      automatic int p = $urandom_range(0, 59);
      automatic int amp = $urandom_range(1, 16000) - 8000;
      for (int i = 0; i < 60; i++) wrk[i] = longint'(int'($urandom)) >>> $urandom_range(0, 16);
      wref = wrk; a1 = 0; ridx = 0;
      for (int l = 0; l < 60; l += 2) begin
        a = clip(wref[l] - lmult(amp, imrc[(l > p) ? l - p : p - l]));
        a = (a == -64'sd2147483648) ? 64'sd2147483647 : (a < 0 ? -a : a);
        if (a > a1) begin a1 = a; ridx = l; end
      end
      ctl.reg_we = 1; ctl.reg_in = 16'(p);
      ctl.lc_load = 1; ctl.lc_start = 58; ctl.lc_step = 2; ctl.cm_init = 1;
      step();
      for (int l = 58; l >= 0; l -= 2) begin
        ctl.base = 10'(IMRC); ctl.agu_abs = 1; ctl.y = 16'(amp);
        ctl.acc_in = 32'(wrk[l]); ctl.mac_op = MAC_MSU_L;
        ctl.cm_exec = 1; ctl.cm_abs = 1; ctl.cm_ge = 1; ctl.lc_adv = 1;
        search_cycles++;
        step();
      end
      repeat (3) step();
      checks++;
      if (best !== 32'(a1) || (a1 != 0 && best_idx !== 16'(ridx))) begin
        failures++; $display("search %0d best %h/%0d exp %h/%0d", s, best, best_idx, 32'(a1), ridx);
      end
    end
    $display("convolution MAC cycles %0d (expected 21120), search cycles %0d (expected 8640)",
             conv_cycles, search_cycles);
    checks++;
    if (conv_cycles != 21120) failures++;
    checks++;
    if (search_cycles != 8640) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
