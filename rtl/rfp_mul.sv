// Reduced floating-point multiplier on the 20-bit internal format.
// The 14-bit significands (hidden one and 13 mantissa bits) are multiplied;
// the product in [1,4) is normalised by at most one right shift, rounded to
// nearest (ties away), and the exponents are added and re-biased. A zero
// operand gives zero; overflow saturates, underflow flushes to zero.
// Combinational.
module rfp_mul
  import rfp_pkg::*;
(
  input  rfp_t a,
  input  rfp_t b,
  output rfp_t y
);
  logic [2*IM+1:0]       p;
  logic [IM+1:0]         sig;
  logic signed [IE+2:0]  e;

  always_comb begin
    p = {1'b1, a.m} * {1'b1, b.m};
    e = (IE+3)'(a.e) + (IE+3)'(b.e) - (IE+3)'(IBIAS);
    if (p[2*IM+1]) begin
      sig = p[2*IM+1 -: IM+2];
      e   = e + (IE+3)'(1);
    end else begin
      sig = p[2*IM -: IM+2];
    end
    if (a.e == '0 || b.e == '0) y = RFP_ZERO;
    else                        y = rfp_pack(a.s ^ b.s, e, sig);
  end
endmodule
