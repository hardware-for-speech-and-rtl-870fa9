// 32-bit conditional move with optional absolute value and loop-index capture.
// Replaces the five-instruction sequence of an analysis-by-synthesis search,
//   a32 = L_abs(a32) (optional); if (a32 > b32) { b32 = a32; index = i; }
// by one single-cycle instruction. ACR1 (acr1) passes an adder that forms its
// saturated absolute value; the result is compared with the reference register
// ACR2; the sign of the comparison selects whether ACR2 takes the new value, and
// in that case the loop counter is written to the index register (idx_we tells
// a register file to do the same). max_out carries the larger of the two values
// in the same cycle so that the winner can be written back to ACR1 instead of
// (or as well as) ACR2, the data-driven destination choice. ge_mode turns '>' into '>=' so that a
// down-counting hardware loop picks the same index as an up-counting C loop.
// Timing: combinational compare, ACR2 and the index register update at the
// clock edge when exec is high. init loads ACR2 with init_val and clears the
// index. Structure per the conditional-move proposal; keeping ACR2 and the index
// in the unit instead of the register file is this design's choice.
module cond_move_idx
  import dsp_pkg::*;
#(
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                init,
  input  logic signed [W-1:0] init_val,
  input  logic                exec,
  input  logic signed [W-1:0] acr1,
  input  logic                use_abs,
  input  logic                ge_mode,
  input  logic [15:0]         loop_idx,
  output logic signed [W-1:0] acr2,
  output logic [15:0]         best_idx,
  output logic                idx_we,
  output logic signed [W-1:0] max_out
);
  localparam logic signed [W-1:0] VMAX = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] VMIN = {1'b1, {(W-1){1'b0}}};

  logic signed [W-1:0] cand;
  logic signed [W:0]   diff;
  logic                win;

  always_comb begin
    if (use_abs && acr1 < 0) cand = (acr1 == VMIN) ? VMAX : -acr1;
    else                     cand = acr1;
    diff = (W+1)'(acr2) - (W+1)'(cand);        // sign decides the move
    win  = ge_mode ? (diff[W] || diff == '0) : diff[W];
  end

  assign idx_we  = exec && win;
  assign max_out = win ? cand : acr2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acr2     <= '0;
      best_idx <= '0;
    end else if (init) begin
      acr2     <= init_val;
      best_idx <= '0;
    end else if (idx_we) begin
      acr2     <= cand;
      best_idx <= loop_idx;
    end
  end
endmodule
