// Reduced floating-point adder/subtractor on the 20-bit internal format.
// The operand of smaller magnitude is shifted right by the exponent difference
// (alignment) keeping guard, round and sticky bits; the significands are added
// or subtracted; the result is normalised (one right shift after a carry, or a
// left shift by the leading-zero count after cancellation: the post scaling)
// and rounded to nearest, ties away from zero. Equal magnitudes of opposite
// sign give +0. Combinational.
module rfp_add
  import rfp_pkg::*;
(
  input  rfp_t a,
  input  rfp_t b,
  input  logic sub,
  output rfp_t y
);
  localparam int SW = IM + 4;            // 1.m plus guard, round, sticky

  rfp_t                 big, sml;
  logic                 bs, eff_sub;
  logic [IE-1:0]        d;
  logic [SW-1:0]        sa, sb, sb_sh;
  logic                 sticky;
  logic [SW:0]          sum;
  logic [SW-1:0]        nrm;
  logic [4:0]           lz;
  logic signed [IE+2:0] e;

  always_comb begin
    bs = b.s ^ sub;
    if ({a.e, a.m} >= {b.e, b.m}) begin
      big = a; sml = '{s: bs, e: b.e, m: b.m};
    end else begin
      big = '{s: bs, e: b.e, m: b.m}; sml = a;
    end
    eff_sub = big.s ^ sml.s;
    d  = big.e - sml.e;
    sa = {1'b1, big.m, 3'b000};
    sb = (sml.e == '0) ? '0 : {1'b1, sml.m, 3'b000};
    if (d >= IE'(SW)) begin
      sb_sh  = '0;
      sticky = |sb;
    end else begin
      sb_sh  = sb >> d;
      sticky = |(sb & ~(~SW'(0) << d));
    end
    sb_sh[0] = sb_sh[0] | sticky;
    sum = eff_sub ? {1'b0, sa} - {1'b0, sb_sh} : {1'b0, sa} + {1'b0, sb_sh};
    e   = (IE+3)'(big.e);
    lz  = 5'd0;
    if (sum[SW]) begin
      nrm = sum[SW:1];
      nrm[0] = nrm[0] | sum[0];
      e = e + (IE+3)'(1);
    end else begin
      for (int i = 0; i < SW; i++)
        if (sum[i]) lz = 5'(SW - 1 - i);
      nrm = sum[SW-1:0] << lz;
      e   = e - (IE+3)'(lz);
    end
    if (big.e == '0)            y = (sml.e == '0) ? RFP_ZERO : sml;
    else if (sum == '0)         y = RFP_ZERO;
    else                        y = rfp_pack(big.s, e, nrm[SW-1 -: IM+2]);
  end
endmodule
