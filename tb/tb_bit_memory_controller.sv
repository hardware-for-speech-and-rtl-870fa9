// Self-checking test of the bit memory controller with the bit-mask memory.
// A bit-level reference memory (one entry per bit, bit address 0 = MSB of word 0)
// is kept in the testbench. Random bit stores and loads of every length, offset
// and mode are compared against it, as are ordinary word accesses. The latency
// of single-word (1 cycle) and word-crossing (2 cycles) loads and the stall on
// crossing accesses are checked, and back-to-back loads must run one per cycle.
module tb_bit_memory_controller;
  localparam int AW = 6;
  localparam int NBITS = 32 * (2**AW);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, req_we, use_bit_mode, rvalid, stall;
  logic [4:0] length; logic [2:0] mode;
  logic [31:0] addr, wdata, rdata;
  logic mem_en, mem_we; logic [AW-1:0] mem_addr; logic [31:0] mem_wmask, mem_wdata, mem_rdata;

  bit_memory_controller #(.AW(AW)) dut (.*);
  bitmask_dmem #(.AW(AW), .DW(32)) mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
                                        .wmask(mem_wmask), .wdata(mem_wdata), .rdata(mem_rdata));

  bit refm [NBITS];
  int checks = 0, failures = 0, n_span_ld = 0, n_span_st = 0, n_stall = 0;

  function automatic logic [31:0] ref_load(int b, int len, logic [2:0] md);
    logic [31:0] v = 0;
    for (int i = 0; i < len; i++) v = {v[30:0], refm[(b + i) % NBITS]};
    if (md[1]) return v << (32 - len);
    if (md[0] && v[len-1]) for (int i = len; i < 32; i++) v[i] = 1'b1;
    return v;
  endfunction

  task automatic ref_store(int b, int len, logic [2:0] md, logic [31:0] d);
    logic [31:0] v = md[1] ? d >> (32 - len) : d;
    for (int i = 0; i < len; i++) refm[(b + i) % NBITS] = v[len-1-i];
  endtask

  task automatic idle();
    req_valid = 0; req_we = 0; use_bit_mode = 0; length = 0; mode = 0; addr = 0; wdata = 0;
  endtask

  // one access, waits for completion; returns load data and cycles to rvalid
  task automatic access(input logic we, input logic bm, input int b, input int len,
                        input logic [2:0] md, input logic [31:0] d,
                        output logic [31:0] q, output int lat);
    req_valid = 1; req_we = we; use_bit_mode = bm; length = 5'(len); mode = md;
    addr = 32'(b); wdata = d; lat = 0; q = 0;
    @(posedge clk); #1;
    idle();
    if (!we) begin
      lat = 1;
      while (!rvalid) begin
        if (stall) n_stall++;
        @(posedge clk); #1; lat++;
      end
      q = rdata;
    end else begin
      while (stall) begin n_stall++; lat++; @(posedge clk); #1; end
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, d; int lat, b, len, span; logic [2:0] md;
    idle();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // clear memory with word stores
    for (int w = 0; w < 2**AW; w++) access(1, 0, w*4, 0, 0, 0, q, lat);
    foreach (refm[i]) refm[i] = 0;
    for (int it = 0; it < 3000; it++) begin
      len = $urandom_range(1, 32);
      b   = $urandom_range(0, NBITS - 33);
      md  = 3'($urandom_range(0, 7));
      span = ((b % 32) + len > 32);
      if ($urandom_range(0, 1) == 0) begin
        d = $urandom;
        access(1, 1, b, len % 32, md, d, q, lat);
        ref_store(b, len, md, d);
        checks++;
        if (lat != span) begin failures++; $display("store stall %0d exp %0d", lat, span); end
        if (span) n_span_st++;
      end else begin
        access(0, 1, b, len % 32, md, 0, q, lat);
        checks++;
        if (q !== ref_load(b, len, md) || lat != 1 + span) begin
          failures++;
          $display("load b=%0d len=%0d md=%0d got %h exp %h lat %0d", b, len, md, q, ref_load(b, len, md), lat);
        end
        if (span) n_span_ld++;
      end
    end
    // ordinary word accesses are transparent
    for (int it = 0; it < 50; it++) begin
      int w = $urandom_range(0, 2**AW - 1);
      d = $urandom;
      access(1, 0, w*4, 0, 0, d, q, lat);
      for (int i = 0; i < 32; i++) refm[w*32 + i] = d[31-i];
      access(0, 0, w*4, 0, 0, 0, q, lat);
      checks++;
      if (q !== d || lat != 1) begin failures++; $display("word access %h %h", q, d); end
    end
    // back-to-back single-word loads: one per cycle
    req_valid = 1; req_we = 0; use_bit_mode = 1; length = 8; mode = 0; addr = 0;
    @(posedge clk); #1;
    checks++; if (!(rvalid && req_ready)) begin failures++; $display("no overlap"); end
    if (rdata !== ref_load(0, 8, 0)) begin failures++; $display("b2b 1"); end
    addr = 40;
    @(posedge clk); #1;
    idle();
    checks++; if (!rvalid || rdata !== ref_load(40, 8, 0)) begin failures++; $display("b2b 2"); end
    checks++;
    if (n_span_ld == 0 || n_span_st == 0 || n_stall == 0) begin failures++; $display("no crossing access"); end
    $display("crossing loads %0d crossing stores %0d stall cycles %0d", n_span_ld, n_span_st, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
