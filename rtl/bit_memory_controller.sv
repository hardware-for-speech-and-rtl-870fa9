// Bit memory controller (BMC): loads and stores variables of 1 to 32 bits at
// any bit address of a 32-bit wide data memory.
//
// Addressing: in bit mode addr is a bit address. Bit address 0 is the most
// significant bit of word 0, so a variable is a run of len bits read MSB first,
// possibly continuing into the next word (this bit order is this design's
// choice). Outside bit mode addr is a byte address and a whole word moves
// unchanged, which keeps the ordinary load/store instructions transparent.
//
// Load: the word (and, for a variable crossing a word boundary, the next word)
// is read, shifted so the variable lands either at the top of the 32-bit
// result (fractional mode, lower bits cleared) or at the bottom (integer mode,
// upper bits zero- or sign-extended by Mode[0]).
// Store: the register value is shifted into position and a 64-bit write mask of
// len ones is generated from the bit offset and length; the upper half goes with
// the first word and the lower half with the second. The memory applies the mask
// itself, so no read-modify-write is needed.
//
// Timing: the memory has one cycle read latency. A load that fits in one word
// gives rvalid/rdata the cycle after it was accepted; a load crossing a word
// boundary needs a second read and gives its result one cycle later. A store
// crossing a boundary needs a second write. While a second access occupies the
// memory port, stall is high and req_ready is low; the processor must hold its
// request. Back-to-back single-word accesses run at one per cycle.
// The algorithm (shift, mask, sign extension, 64-bit write mask, stall on the
// second access) follows the bit memory scheme; the handshake, the Mode bit
// positions and the bit order are this design's choices, as are the separate
// load and store shifters (a shared one would need a bubble after each load,
// since a new request is accepted while a load's data is being aligned).
module bit_memory_controller
  import bitmem_pkg::*;
#(
  parameter int AW = 10               // word address bits of the data memory
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor side
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_we,
  input  logic          use_bit_mode,
  input  logic [4:0]    length,
  input  logic [2:0]    mode,
  input  logic [31:0]   addr,
  input  logic [31:0]   wdata,
  output logic          rvalid,
  output logic [31:0]   rdata,
  output logic          stall,
  // memory side
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [31:0]   mem_wmask,
  output logic [31:0]   mem_wdata,
  input  logic [31:0]   mem_rdata
);
  typedef enum logic [1:0] {PH_NONE, PH_RD1, PH_RD2, PH_ST2} phase_e;

  typedef struct packed {
    logic          bit_mode;
    logic          span;
    logic [AW-1:0] word;
    logic [4:0]    off;
    logic [5:0]    len;
    logic [2:0]    mode;
    logic [31:0]   d2;       // second-word store data
    logic [31:0]   m2;       // second-word store mask
  } op_t;

  phase_e      phase, phase_n;
  op_t         cur, nxt;
  logic [31:0] w0_q;

  // ---- decode of the incoming request ----
  logic [5:0]  len6;
  logic [4:0]  off;
  logic        span;
  logic [31:0] top_data, len_mask;
  logic [63:0] data64, mask64;
  logic        accept;

  assign len6     = (length == 5'd0) ? 6'd32 : {1'b0, length};
  assign off      = addr[4:0];
  assign span     = use_bit_mode && ({1'b0, off} + len6 > 6'd32);
  assign len_mask = ~32'h0 << (6'd32 - len6);
  assign top_data = mode[MODE_FRAC] ? wdata : (wdata << (6'd32 - len6));
  assign data64   = {top_data, 32'h0} >> off;
  assign mask64   = {len_mask, 32'h0} >> off;

  assign req_ready = (phase == PH_NONE) || (phase == PH_RD2) ||
                     (phase == PH_RD1 && !cur.span);
  assign stall     = !req_ready;
  assign accept    = req_valid && req_ready;

  // ---- memory port and next state ----
  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wmask = '0;
    mem_wdata = '0;
    phase_n   = PH_NONE;
    nxt       = cur;
    unique case (phase)
      PH_RD1: if (cur.span) begin
        mem_en   = 1'b1;
        mem_addr = cur.word + 1'b1;
        phase_n  = PH_RD2;
      end
      PH_ST2: begin
        mem_en    = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = cur.word + 1'b1;
        mem_wmask = cur.m2;
        mem_wdata = cur.d2;
      end
      default: ;
    endcase
    if (accept) begin
      nxt.bit_mode = use_bit_mode;
      nxt.span     = span;
      nxt.off      = use_bit_mode ? off : 5'd0;
      nxt.len      = use_bit_mode ? len6 : 6'd32;
      nxt.mode     = mode;
      nxt.word     = use_bit_mode ? addr[AW+4:5] : addr[AW+1:2];
      nxt.d2       = data64[31:0];
      nxt.m2       = mask64[31:0];
      mem_en       = 1'b1;
      mem_we       = req_we;
      mem_addr     = nxt.word;
      mem_wmask    = use_bit_mode ? mask64[63:32] : ~32'h0;
      mem_wdata    = use_bit_mode ? data64[63:32] : wdata;
      phase_n      = !req_we ? PH_RD1 : (span ? PH_ST2 : PH_NONE);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_NONE;
      cur   <= '0;
      w0_q  <= '0;
    end else begin
      phase <= phase_n;
      cur   <= nxt;
      if (phase == PH_RD1) w0_q <= mem_rdata;
    end
  end

  // ---- load alignment, masking and extension ----
  logic [63:0] both;
  logic [31:0] window, frac_val, int_val;

  assign both     = (phase == PH_RD2) ? {w0_q, mem_rdata} : {mem_rdata, 32'h0};
  assign window   = 32'((both << cur.off) >> 32);
  assign frac_val = window & (~32'h0 << (6'd32 - cur.len));
  assign int_val  = cur.mode[MODE_SIGNED] ? 32'($signed(window) >>> (6'd32 - cur.len))
                                          : window >> (6'd32 - cur.len);

  assign rvalid = (phase == PH_RD2) || (phase == PH_RD1 && !cur.span);
  always_comb begin
    if (!cur.bit_mode)           rdata = mem_rdata;
    else if (cur.mode[MODE_FRAC]) rdata = frac_val;
    else                          rdata = int_val;
  end

  // A second access must never coincide with a newly accepted request.
  a_no_accept_in_stall: assert property (@(posedge clk) disable iff (!rst_n)
                                         stall |-> !accept);
endmodule
