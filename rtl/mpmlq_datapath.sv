// Data path of the MP-MLQ fixed-codebook search accelerator for G.723.1.
// The units of the accelerator are chained as the inner loops of the search
// need them:
//   loop counter -> offset AGU (l - REG, optional abs) -> operand memory
//   -> MAC (with conditional zero operand) -> 32-bit conditional move that also
//   stores the loop index.
// With it one step of either inner loop takes one cycle:
//   pulse search:  Acc0 = L_msu(WrkBlk[l], Pamp, ImrCorr[|l - Ploc|]);
//                  if (|Acc0| >= Acc1) { Acc1 = |Acc0|; index = l; }
//   impulse-response convolution over the pulses only:
//                  Acc0 = L_mac(Acc0, Pamp[j], Imr[l - Ploc[j]]) if l >= Ploc[j]
// where the AGU sign flag zeroes the operand of an out-of-range step instead
// of branching.
// Pipeline (this design's choice): in the cycle a control word is applied the
// AGU forms the address and the memory read starts (REG and the loop counter are
// the values held in that cycle); one cycle later the operand and the delayed
// MAC control update the accumulator; one cycle after that the conditional move
// compares the accumulator and, on a win, stores the loop counter value that
// belonged to the step. The instruction sequencer is outside; ctl is the decoded
// instruction of each cycle.
module mpmlq_datapath
  import dsp_pkg::*;
#(
  parameter int AW = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  mpmlq_ctl_t         ctl,
  output logic [15:0]        lc,
  output logic               lc_last,
  output logic signed [31:0] acc,
  output logic signed [31:0] best,
  output logic [15:0]        best_idx,
  output logic               idx_we
);
  logic [AW-1:0]      raddr;
  logic               neg;
  logic signed [15:0] opnd;

  hw_loop_counter #(.W(16)) u_lc (
    .clk, .rst_n, .load(ctl.lc_load), .start(ctl.lc_start), .step(ctl.lc_step),
    .adv(ctl.lc_adv), .count(lc), .last(lc_last));

  offset_agu #(.AW(AW), .W(16)) u_agu (
    .clk, .rst_n, .reg_we(ctl.reg_we), .reg_in(ctl.reg_in), .lc,
    .base(ctl.base[AW-1:0]), .use_abs(ctl.agu_abs), .addr(raddr), .neg);

  op_ram16 #(.AW(AW)) u_mem (
    .clk, .we(ctl.mem_we), .waddr(ctl.mem_waddr[AW-1:0]), .wdata(ctl.mem_wdata),
    .raddr, .rdata(opnd));

  // stage 2 control: MAC and the operand flag, aligned with the memory data
  typedef struct packed {
    mac_op_e     mac_op;
    logic        int_mode;
    logic        auto_mode;
    logic        cond_en;
    logic        neg;
    logic [15:0] y;
    logic [31:0] acc_in;
    logic        cm_exec;
    logic        cm_abs;
    logic        cm_ge;
    logic [15:0] idx;
  } s2_t;
  typedef struct packed {
    logic        cm_exec;
    logic        cm_abs;
    logic        cm_ge;
    logic [15:0] idx;
  } s3_t;

  s2_t s2;
  s3_t s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2 <= '0;
      s3 <= '0;
    end else begin
      s2.mac_op    <= ctl.mac_op;
      s2.int_mode  <= ctl.int_mode;
      s2.auto_mode <= ctl.auto_mode;
      s2.cond_en   <= ctl.cond_en;
      s2.neg       <= neg;
      s2.y         <= ctl.y;
      s2.acc_in    <= ctl.acc_in;
      s2.cm_exec   <= ctl.cm_exec;
      s2.cm_abs    <= ctl.cm_abs;
      s2.cm_ge     <= ctl.cm_ge;
      s2.idx       <= lc;
      s3.cm_exec   <= s2.cm_exec;
      s3.cm_abs    <= s2.cm_abs;
      s3.cm_ge     <= s2.cm_ge;
      s3.idx       <= s2.idx;
    end
  end

  dsp_mac u_mac (
    .clk, .rst_n, .op(s2.mac_op), .x(opnd), .y(s2.y), .acc_in(s2.acc_in),
    .int_mode(s2.int_mode), .auto_mode(s2.auto_mode), .cond_en(s2.cond_en),
    .cond_neg(s2.neg), .acc);

  cond_move_idx #(.W(32)) u_cm (
    .clk, .rst_n, .init(ctl.cm_init), .init_val('0), .exec(s3.cm_exec), .acr1(acc),
    .use_abs(s3.cm_abs), .ge_mode(s3.cm_ge), .loop_idx(s3.idx), .acr2(best),
    .best_idx, .idx_we, .max_out());
endmodule
