// Normalisation unit (NORM_S / NORM_L): returns the left shift that brings a
// signed 16-bit or 32-bit value to normalised form, i.e. the number of
// redundant sign bits. Zero gives 0 and -1 gives 15 or 31, as in the ITU basic
// operations. For NORM_S the operand is x[15:0]. Combinational: the sign-
// flipped operand goes through a leading-zero count.
module norm_unit (
  input  logic [31:0] x,
  input  logic        long_op,
  output logic [4:0]  n
);
  logic [31:0] v, t;
  logic [5:0]  lz;

  always_comb begin
    v  = long_op ? x : {x[15:0], 16'h0};
    t  = v[31] ? ~v : v;                // leading zeros of t = sign bits of v
    lz = 6'd32;
    for (int i = 0; i < 32; i++)
      if (t[i]) lz = 6'(31 - i);
    if (v == '0) n = 5'd0;
    else         n = 5'(lz - 6'd1);      // at most 15 for NORM_S: t[15:0] = 0 or 16'hFFFF
  end
endmodule
