// Address generator with segment addressing, offset and absolute value.
// The offset is the difference between the loop counter and a value held in
// REG (a pulse position, constant over the loop); optionally its absolute value
// is taken. The address is the segment start plus the offset, so a buffer such
// as ImrCorr[abs(l - Ploc)] or Imr[l - Ploc] is fetched in one cycle without
// using the arithmetic unit. The sign bit of the subtraction (neg) leaves the
// unit as a data-dependent control: when the offset is negative the fetched
// operand lies outside the buffer and the multiplier must use zero instead.
// Timing: addr and neg are combinational from lc, REG and base; REG loads on the
// clock edge when reg_we. Structure as in the accelerator proposal; the widths
// are this design's choice.
module offset_agu #(
  parameter int AW = 10,
  parameter int W  = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          reg_we,
  input  logic [W-1:0]  reg_in,
  input  logic [W-1:0]  lc,
  input  logic [AW-1:0] base,
  input  logic          use_abs,
  output logic [AW-1:0] addr,
  output logic          neg
);
  logic [W-1:0] reg_q;
  logic [W:0]   diff, off;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      reg_q <= '0;
    else if (reg_we) reg_q <= reg_in;
  end

  assign diff = {lc[W-1], lc} - {reg_q[W-1], reg_q};
  assign neg  = diff[W];
  assign off  = (use_abs && neg) ? -diff : diff;
  assign addr = base + off[AW-1:0];
endmodule
