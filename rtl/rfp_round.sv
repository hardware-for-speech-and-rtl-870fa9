// Store converter of the reduced floating point: a 20-bit internal value is
// rounded to the 15-bit external format before it is written to the 16-bit
// memory (bit 15 written as zero). The mantissa is rounded to nearest, ties away
// from zero (a carry out increments the exponent); an exponent above the
// external range saturates to the largest external magnitude, one below it
// flushes to zero. Combinational.
module rfp_round
  import rfp_pkg::*;
(
  input  rfp_t        x,
  output logic [15:0] y
);
  logic [XM:0]       r;
  logic signed [7:0] e;
  rfpx_t             yv;

  always_comb begin
    r = {1'b0, x.m[IM-1 -: XM]} + (XM+1)'(x.m[IM-XM-1]);
    e = 8'(x.e) - 8'(IBIAS - XBIAS) + 8'(r[XM]);
    if (x.e == '0 || e <= 0)  yv = '0;
    else if (e > 2**XE - 1)   yv = '{s: x.s, e: '1, m: '1};
    else                      yv = '{s: x.s, e: e[XE-1:0], m: r[XM-1:0]};
    y = {1'b0, yv};
  end
endmodule
