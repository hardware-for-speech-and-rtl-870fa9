// Workload test: a V.42bis-style codeword stream on the bit-addressed memory
// path of the top level at its default size.
// The testbench is the processor. It compresses 4000 characters of text,
// made of words from a random 200-word vocabulary, with an LZW dictionary
// coder of the V.42bis kind: codewords 0-2 are reserved for control, 3-258
// stand for the 256 characters, and new strings take 259 upwards. The codeword width starts at 9 bits and grows to
// 10 and 11 bits as the dictionary passes 512 and 1024 entries; at 2048 it
// stops growing. Each codeword is written with a single bit-store instruction
// at the running bit pointer, so the stream is packed with no padding, exactly
// as it would be sent on the line. The stream is then read back with one
// bit-load instruction per codeword and decompressed, and the text must come
// out unchanged. Checked and counted: codewords of each width (all three
// widths must occur), word-crossing stores and loads (must equal the number
// of codewords that straddle a word boundary), the decoded text, and that the
// word after the packed stream is untouched.
module tb_wl_v42bis_codewords;
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

  localparam int NCHR = 4000, FIRST = 259, DMAX = 2048;
  localparam logic [31:0] SENTINEL = 32'h5A5A_C3C3;

  int checks = 0, failures = 0, stalls = 0;
  always @(posedge clk) if (bm_stall) stalls++;

  initial begin
    #50000000; failures++;
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

  // width of the k-th codeword: enough for every code that can exist then
  function automatic int cw_width(int k);
    int next = FIRST + k;
    if (next < 512) return 9;
    if (next < 1024) return 10;
    return 11;
  endfunction

  byte text [NCHR], outtxt [NCHR + 64];
  int  d_prefix [DMAX], d_char [DMAX];
  int  enc_map [int];                      // (prefix << 8 | char) -> code

  initial begin
    string words [200];
    int codes [$];
    int n, w, p, c, cur, next_code, bp, nwidth [3], ncross, s0, olen, prev, code, first_ch;
    byte stack [$];
    logic [31:0] q;
    bm_issue = 0; bm_insn = 0; bm_ra_val = 0; bm_rb_val = 0;
    mp_ctl = '0; div_start = 0; div_long = 0; div_num = 0; div_den = 1; norm_x = 0; norm_long = 0;
    max_a = 0; max_b = 0; max_abs = 0; as_a = 0; as_b = 0; as_sub = 0; as_op = 0; as_sh = 0;
    fp_op = RFP_NOP; fp_a_mem = 0; fp_b_mem = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;

    // generated text: words drawn from a random 200-word vocabulary
    foreach (words[i]) begin
      words[i] = "";
      repeat ($urandom_range(2, 8)) words[i] = {words[i], string'(byte'(8'd97 + 8'($urandom_range(0, 25))))};
      words[i] = {words[i], " "};
    end
    n = 0;
    while (n < NCHR) begin
      automatic string wd = words[$urandom_range(0, 199)];
      for (int i = 0; i < wd.len() && n < NCHR; i++) begin text[n] = byte'(wd[i]); n++; end
    end

    // compress
    next_code = FIRST;
    cur = int'(text[0]) + 3;
    for (int i = 1; i < NCHR; i++) begin
      c = int'(text[i]) & 255;
      if (enc_map.exists((cur << 8) | c)) cur = enc_map[(cur << 8) | c];
      else begin
        codes.push_back(cur);
        if (next_code < DMAX) begin enc_map[(cur << 8) | c] = next_code; next_code++; end
        cur = c + 3;
      end
    end
    codes.push_back(cur);

    // clear the target region (plus one word) to a sentinel, then pack
    bp = 0;
    foreach (codes[k]) bp += cw_width(k);
    for (int i = 0; i <= (bp + 31) / 32; i++) issue({OP_SW, 5'd0, 5'd3, 5'd4, 11'd0}, 32'(i * 4), SENTINEL, q);
    bp = 0; ncross = 0; nwidth = '{0, 0, 0};
    s0 = stalls;
    foreach (codes[k]) begin
      w = cw_width(k);
      nwidth[w - 9]++;
      if (bp % 32 + w > 32) ncross++;
      issue({OP_BSTOR, 5'(w), 5'd3, 5'd4, 3'b000, 8'd0}, 32'(bp), 32'(codes[k]), q);
      bp += w;
    end
    check(stalls - s0 == ncross, $sformatf("store stalls %0d exp %0d", stalls - s0, ncross));
    issue({OP_LWZ, 5'd6, 5'd3, 16'd0}, 32'(((bp + 31) / 32) * 4), 0, q);
    check(q === SENTINEL, "word after the stream overwritten");
    check(nwidth[0] > 0 && nwidth[1] > 0 && nwidth[2] > 0, "not all codeword widths used");

    // unpack and decompress
    s0 = stalls;
    p = 0; olen = 0; prev = -1; next_code = FIRST;
    for (int k = 0; k < codes.size(); k++) begin
      w = cw_width(k);
      issue({OP_BLOAD, 5'd7, 5'd3, 5'(w), 3'b000, 8'd0}, 32'(p), 0, q);
      p += w;
      code = int'(q);
      check(code == codes[k], $sformatf("codeword %0d read %0d exp %0d", k, code, codes[k]));
      // expand code (or the KwKwK case) onto a stack
      stack.delete();
      cur = (code >= next_code) ? prev : code;
      while (cur >= FIRST) begin stack.push_front(byte'(d_char[cur])); cur = d_prefix[cur]; end
      first_ch = cur - 3;
      stack.push_front(byte'(first_ch));
      if (code >= next_code) stack.push_back(byte'(first_ch));
      foreach (stack[i]) if (olen < NCHR + 64) begin outtxt[olen] = stack[i]; olen++; end
      if (prev >= 0 && next_code < DMAX) begin
        d_prefix[next_code] = prev; d_char[next_code] = int'(stack[0]) & 255; next_code++;
      end
      prev = code;
    end
    check(stalls - s0 == ncross, $sformatf("load stalls %0d exp %0d", stalls - s0, ncross));
    check(olen == NCHR, $sformatf("decoded %0d characters exp %0d", olen, NCHR));
    begin
      int bad = 0;
      for (int i = 0; i < NCHR; i++) if (outtxt[i] != text[i]) bad++;
      check(bad == 0, $sformatf("%0d characters differ", bad));
    end
    $display("%0d characters -> %0d codewords (9/10/11 bits: %0d/%0d/%0d), %0d bits packed (%0.1f%% of 8-bit text), %0d straddle a word boundary",
             NCHR, codes.size(), nwidth[0], nwidth[1], nwidth[2], bp, 100.0 * real'(bp) / real'(8 * NCHR), ncross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
