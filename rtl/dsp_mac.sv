// 16x16-bit multiply-accumulate unit of the speech-coding data path.
// Fractional mode doubles the product and saturates (L_mult); integer mode
// uses the plain product (the _I operations of G.723.1). auto_mode feeds the
// x operand to both multiplier inputs (autocorrelation). With cond_en set and
// cond_neg high (the address flag of the AGU) a multiplexer replaces x by zero,
// so a multiplication whose operand lies outside its buffer adds nothing: the
// conditional operand. Accumulation saturates to 32 bits as L_mac / L_msu.
// The *_L operations accumulate onto acc_in (e.g. a work-buffer element)
// instead of the accumulator. Single cycle: acc updates at the clock edge.
// Function per the accelerator proposal; saturation and the *_L forms are this
// design's choice to keep bit exactness with the ITU code.
module dsp_mac
  import dsp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  mac_op_e            op,
  input  logic signed [15:0] x,
  input  logic signed [15:0] y,
  input  logic signed [31:0] acc_in,
  input  logic               int_mode,
  input  logic               auto_mode,
  input  logic               cond_en,
  input  logic               cond_neg,
  output logic signed [31:0] acc
);
  logic signed [15:0] xe, ye;
  logic signed [31:0] prod, acc_n;

  assign xe   = (cond_en && cond_neg) ? 16'sd0 : x;
  assign ye   = auto_mode ? xe : y;
  assign prod = mul16(xe, ye, int_mode);

  always_comb begin
    unique case (op)
      MAC_CLR:   acc_n = '0;
      MAC_LOAD:  acc_n = acc_in;
      MAC_MULT:  acc_n = prod;
      MAC_MAC:   acc_n = sat_add32(acc, prod);
      MAC_MSU:   acc_n = sat_sub32(acc, prod);
      MAC_MAC_L: acc_n = sat_add32(acc_in, prod);
      MAC_MSU_L: acc_n = sat_sub32(acc_in, prod);
      default:   acc_n = acc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= acc_n;
  end
endmodule
