// Workload test: the synthesis filterbank of an MP3 (Layer III) decoder run on
// the reduced floating-point units at their default formats, for one granule
// of one channel (18 time slots of 32 subband samples = 576 output samples).
// Each time slot does what the decoder does:
//   matrixing  V[i] = sum_k N[i][k] * S[k],  N[i][k] = cos((16+i)(2k+1)pi/64),
//              64 outputs of 32 MACs, stored to memory in the 16-bit format
//              into a 1024-entry V history;
//   windowing  pcm[j] = sum_{i=0..15} D[j+32i] * U[j+32i], U taken from the V
//              history as the standard synthesis procedure does: 32 outputs of
//              16 MACs.
// Coefficients and subband samples are held as 16-bit memory words; operands go
// through the load converter into the MAC, and V leaves through the store
// converter. D here is a computed low-pass prototype (Hann-windowed sinc), not
// the standard's table: the test is about arithmetic accuracy, not filter
// response.
// Checks: (1) every MAC result stays within the error bound of its rounding
// steps, N * 2^-13 * sum|terms|, against a real-number sum of the same
// quantised operands; (2) the signal-to-noise ratio of the 576 outputs against
// a full-precision filterbank fed with the unquantised values stays above
// 40 dB (the level is printed); (3) the rms error relative to full scale
// (1.0) stays below 2^-11 / sqrt(12), the rms limit of a limited-accuracy MP3
// decoder, with the input scaled so that the output rms is about that of a
// -20 dB full-scale sine (0.07). This applies the decoder-level limit to the
// filterbank alone, so it is a necessary condition, not a compliance test.
// MAC operations: 18 * 2560 = 46080 cycles.
module tb_wl_rfp_filterbank;
  import rfp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  rfp_op_e op;
  logic [15:0] a_mem, b_mem, acc_mem;
  rfp_t a_i, b_i, acc;
  int checks = 0, failures = 0, mac_cycles = 0;

  rfp_expand u_xa (.x(a_mem), .y(a_i));
  rfp_expand u_xb (.x(b_mem), .y(b_i));
  rfp_mac    u_mac (.clk, .rst_n, .op, .a(a_i), .b(b_i), .acc);
  rfp_round  u_rnd (.x(acc), .y(acc_mem));

  localparam real PI = 3.14159265358979323846;

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // real -> 16-bit memory format, round to nearest (ties away from zero)
  function automatic logic [15:0] enc(real x);
    real a; int e, m; logic s;
    if (x == 0.0) return 16'h0000;
    s = (x < 0.0); a = s ? -x : x; e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    m = int'($floor((a - 1.0) * 512.0 + 0.5));
    if (m == 512) begin m = 0; e++; end
    if (e + XBIAS < 1) return 16'h0000;
    return {1'b0, s, 5'(e + XBIAS), 9'(m)};
  endfunction
  function automatic real pow2(int e);
    real v = 1.0;
    for (int i = 0; i < e; i++) v = v * 2.0;
    for (int i = 0; i > e; i--) v = v / 2.0;
    return v;
  endfunction
  function automatic real dec_x(logic [15:0] w);
    real v;
    if (w[13:9] == 0) return 0.0;
    v = (1.0 + real'(w[8:0]) / 512.0) * pow2(int'(w[13:9]) - XBIAS);
    return w[14] ? -v : v;
  endfunction
  function automatic real dec_i(rfp_t w);
    real v;
    if (w.e == 0) return 0.0;
    v = (1.0 + real'(w.m) / 8192.0) * pow2(int'(w.e) - IBIAS);
    return w.s ? -v : v;
  endfunction
  function automatic real rabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  real         nco [64][32], dwin [512];
  logic [15:0] nq [64][32], dq [512];
  real         vfull [1024];
  logic [15:0] vmem [1024];

  // U index n (0..511) -> V history index
  function automatic int uidx(int n);
    int i = n / 64, j = n % 64;
    return (j < 32) ? i * 128 + j : i * 128 + 96 + (j - 32);
  endfunction

  task automatic mac_step(rfp_op_e o, logic [15:0] a, logic [15:0] b);
    op = o; a_mem = a; b_mem = b; mac_cycles++;
    @(posedge clk); #1;
    op = RFP_NOP;
  endtask

  initial begin
    real s [32], sq [32], sum_q, sum_abs, pcm_full, err, psig, perr, snr, ph [32];
    logic [15:0] sw [32];
    op = RFP_NOP; a_mem = 0; b_mem = 0;
    for (int i = 0; i < 64; i++)
      for (int k = 0; k < 32; k++) begin
        nco[i][k] = $cos(real'((16 + i) * (2 * k + 1)) * PI / 64.0);
        nq[i][k]  = enc(nco[i][k]);
      end
    for (int n = 0; n < 512; n++) begin
      automatic real t = (real'(n) - 255.5) / 32.0;
      dwin[n] = 0.5 * (1.0 - $cos(2.0 * PI * (real'(n) + 0.5) / 512.0)) * $sin(PI * t) / (PI * t) / 16.0;
      dq[n] = enc(dwin[n]);
    end
    foreach (vfull[n]) begin vfull[n] = 0.0; vmem[n] = 16'h0000; end
    foreach (ph[k]) ph[k] = real'($urandom_range(0, 6283)) / 1000.0;
    psig = 0.0; perr = 0.0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 18; t++) begin
      // subband samples: decaying spectrum with slowly varying phases
      for (int k = 0; k < 32; k++) begin
        s[k]  = 1.6 * $exp(-real'(k) / 6.0) * $cos(ph[k] + 0.7 * real'(t * (k + 1)));
        sw[k] = enc(s[k]);
        sq[k] = dec_x(sw[k]);
      end
      for (int n = 1023; n >= 64; n--) begin vfull[n] = vfull[n-64]; vmem[n] = vmem[n-64]; end
      // matrixing
      for (int i = 0; i < 64; i++) begin
        sum_q = 0.0; sum_abs = 0.0; vfull[i] = 0.0;
        for (int k = 0; k < 32; k++) begin
          sum_q   += dec_x(nq[i][k]) * sq[k];
          sum_abs += rabs(dec_x(nq[i][k]) * sq[k]);
          vfull[i] += nco[i][k] * s[k];
          mac_step((k == 0) ? RFP_MUL : RFP_MAC, nq[i][k], sw[k]);
        end
        checks++;
        if (rabs(dec_i(acc) - sum_q) > 32.0 * sum_abs / 8192.0 + 1.0e-9) begin
          failures++; $display("V[%0d] slot %0d: %f, exact %f", i, t, dec_i(acc), sum_q);
        end
        vmem[i] = acc_mem;
      end
      // windowing
      for (int j = 0; j < 32; j++) begin
        sum_q = 0.0; sum_abs = 0.0; pcm_full = 0.0;
        for (int i = 0; i < 16; i++) begin
          automatic int n = j + 32 * i;
          sum_q    += dec_x(dq[n]) * dec_x(vmem[uidx(n)]);
          sum_abs  += rabs(dec_x(dq[n]) * dec_x(vmem[uidx(n)]));
          pcm_full += dwin[n] * vfull[uidx(n)];
          mac_step((i == 0) ? RFP_MUL : RFP_MAC, dq[n], vmem[uidx(n)]);
        end
        checks++;
        if (rabs(dec_i(acc) - sum_q) > 16.0 * sum_abs / 8192.0 + 1.0e-9) begin
          failures++; $display("pcm[%0d] slot %0d: %f, exact %f", j, t, dec_i(acc), sum_q);
        end
        err = dec_i(acc) - pcm_full;
        psig += pcm_full * pcm_full;
        perr += err * err;
      end
    end
    snr = 10.0 * $log10(psig / perr);
    $display("576 output samples, SNR against full precision %0.1f dB, MAC cycles %0d", snr, mac_cycles);
    $display("output rms %g, error rms %g (full scale 1.0)", $sqrt(psig / 576.0), $sqrt(perr / 576.0));
    checks++;
    if (!(snr > 40.0)) failures++;
    checks++;   // limited-accuracy rms limit, applied to the filterbank alone
    if (!($sqrt(perr / 576.0) < (1.0 / 2048.0) / $sqrt(12.0))) failures++;
    checks++;
    if (mac_cycles != 46080) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
