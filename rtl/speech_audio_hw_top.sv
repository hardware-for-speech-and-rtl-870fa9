// Top level: three independent accelerator designs for speech and audio coding,
// side by side, each with its own ports.
//
//  A. Bit-addressed load/store path of a 32-bit RISC processor: the load/store
//     decoder turns an instruction and the value of its base register into the
//     access signals (Use_Bit_Mode, Length, Mode, address); the bit memory
//     controller performs it on a 32-bit memory with a per-bit write mask. The
//     processor itself is outside: it supplies the instruction (bm_issue,
//     bm_insn) with its RA and RB register values and receives load results
//     with the destination register index. bm_ready low means the processor
//     must stall and keep presenting the same instruction.
//  B. G.723.1 MP-MLQ search accelerators: the search data path (loop counter,
//     offset AGU, operand memory, conditional-operand MAC, conditional move with
//     loop index) driven by a per-cycle control word, plus the bit-serial
//     divider, the normalisation unit, the amax/max unit and the merged
//     add-shift ALU slice as separate functional units.
//  C. Reduced floating-point MAC for an MP3 decoder: two 16-bit memory words
//     are widened to the 20-bit internal format, multiplied/accumulated, and
//     the accumulator is also presented rounded to the 15-bit memory format.
//
// All sequential parts share clk and the active-low asynchronous reset rst_n.
module speech_audio_hw_top
  import bitmem_pkg::*;
  import dsp_pkg::*;
  import rfp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // ---- A: bit memory load/store path ----
  input  logic               bm_issue,
  input  logic [31:0]        bm_insn,
  input  logic [31:0]        bm_ra_val,
  input  logic [31:0]        bm_rb_val,
  output logic               bm_ready,
  output logic               bm_stall,
  output logic               bm_rvalid,
  output logic [31:0]        bm_rdata,
  output logic [4:0]         bm_rd,
  // ---- B: MP-MLQ search data path ----
  input  mpmlq_ctl_t         mp_ctl,
  output logic [15:0]        mp_lc,
  output logic               mp_lc_last,
  output logic signed [31:0] mp_acc,
  output logic signed [31:0] mp_best,
  output logic [15:0]        mp_best_idx,
  output logic               mp_idx_we,
  // ---- B: divider ----
  input  logic               div_start,
  input  logic               div_long,
  input  logic [31:0]        div_num,
  input  logic [15:0]        div_den,
  output logic               div_busy,
  output logic               div_done,
  output logic [31:0]        div_quot,
  // ---- B: normalisation ----
  input  logic [31:0]        norm_x,
  input  logic               norm_long,
  output logic [4:0]         norm_n,
  // ---- B: amax / max ----
  input  logic signed [15:0] max_a,
  input  logic signed [15:0] max_b,
  input  logic               max_abs,
  output logic signed [15:0] max_y,
  output logic               max_moved,
  // ---- B: add-shift ----
  input  logic signed [31:0] as_a,
  input  logic signed [31:0] as_b,
  input  logic               as_sub,
  input  logic [1:0]         as_op,
  input  logic [4:0]         as_sh,
  output logic signed [31:0] as_y,
  // ---- C: reduced floating point ----
  input  rfp_op_e            fp_op,
  input  logic [15:0]        fp_a_mem,
  input  logic [15:0]        fp_b_mem,
  output rfp_t               fp_acc,
  output logic [15:0]        fp_acc_mem
);
  // ================= A =================
  localparam int BM_AW = 10;
  lsu_ctl_t        lsu;
  logic            mem_en, mem_we;
  logic [BM_AW-1:0] mem_addr;
  logic [31:0]     mem_wmask, mem_wdata, mem_rdata;
  logic [4:0]      rd_q;

  bit_lsu_decode u_dec (.insn(bm_insn), .ra_val(bm_ra_val), .ctl(lsu));

  bit_memory_controller #(.AW(BM_AW)) u_bmc (
    .clk, .rst_n,
    .req_valid(bm_issue && lsu.valid), .req_ready(bm_ready), .req_we(lsu.we),
    .use_bit_mode(lsu.use_bit_mode), .length(lsu.length), .mode(lsu.mode),
    .addr(lsu.addr), .wdata(bm_rb_val),
    .rvalid(bm_rvalid), .rdata(bm_rdata), .stall(bm_stall),
    .mem_en, .mem_we, .mem_addr, .mem_wmask, .mem_wdata, .mem_rdata);

  bitmask_dmem #(.AW(BM_AW), .DW(32)) u_dmem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wmask(mem_wmask),
    .wdata(mem_wdata), .rdata(mem_rdata));

  // destination register of the load in flight
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                      rd_q <= '0;
    else if (bm_issue && lsu.valid && bm_ready && !lsu.we) rd_q <= lsu.rd;
  end
  assign bm_rd = rd_q;

  // ================= B =================
  mpmlq_datapath #(.AW(10)) u_mp (
    .clk, .rst_n, .ctl(mp_ctl), .lc(mp_lc), .lc_last(mp_lc_last), .acc(mp_acc),
    .best(mp_best), .best_idx(mp_best_idx), .idx_we(mp_idx_we));

  serial_divider u_div (
    .clk, .rst_n, .start(div_start), .long_div(div_long), .num(div_num),
    .den(div_den), .busy(div_busy), .done(div_done), .quot(div_quot));

  norm_unit u_norm (.x(norm_x), .long_op(norm_long), .n(norm_n));

  max16_unit u_max (.a(max_a), .b(max_b), .use_abs(max_abs), .y(max_y), .moved(max_moved));

  add_shift_unit #(.W(32)) u_as (.a(as_a), .b(as_b), .sub(as_sub), .op(as_op), .sh(as_sh), .y(as_y));

  // ================= C =================
  rfp_t fa, fb;
  rfp_expand u_xa (.x(fp_a_mem), .y(fa));
  rfp_expand u_xb (.x(fp_b_mem), .y(fb));
  rfp_mac    u_fmac (.clk, .rst_n, .op(fp_op), .a(fa), .b(fb), .acc(fp_acc));
  rfp_round  u_rnd (.x(fp_acc), .y(fp_acc_mem));
endmodule
