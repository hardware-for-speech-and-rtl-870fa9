// Load converter of the reduced floating point: widens a 15-bit external
// value read from the 16-bit memory (bit 15 unused) to the 20-bit internal
// format. The exponent is re-biased (+16) and the mantissa padded with zeros,
// so the conversion is exact. A zero exponent stays zero. Combinational.
module rfp_expand
  import rfp_pkg::*;
(
  input  logic [15:0] x,
  output rfp_t        y
);
  rfpx_t xv;
  assign xv = x[XW-1:0];
  always_comb begin
    if (xv.e == '0) y = RFP_ZERO;
    else            y = '{s: xv.s, e: IE'(xv.e) + IE'(IBIAS - XBIAS), m: {xv.m, {(IM-XM){1'b0}}}};
  end
endmodule
