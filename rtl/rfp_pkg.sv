// Reduced floating-point formats for a low-power MP3 decoder data path.
// Internal (register and data path) format, 20 bits: sign, 6-bit exponent,
// 13-bit mantissa. External (memory) format, 15 bits in a 16-bit word: sign,
// 5-bit exponent, 9-bit mantissa. Both use an implied leading one (value =
// (-1)^s * 1.m * 2^(e - bias)), bias 2^(E-1)-1 (31 and 15). Exponent 0 encodes
// zero; there are no subnormals, infinities or NaNs: a result beyond the range
// saturates to the largest magnitude and one below it flushes to zero. Rounding
// is to nearest with ties away from zero. The field widths follow the reduced
// floating-point proposal; bias, hidden one, zero encoding, saturation and
// rounding are this design's choices.
package rfp_pkg;
  localparam int IE = 6;                 // internal exponent bits
  localparam int IM = 13;                // internal mantissa bits
  localparam int XE = 5;                 // external exponent bits
  localparam int XM = 9;                 // external mantissa bits
  localparam int IW = 1 + IE + IM;       // 20
  localparam int XW = 1 + XE + XM;       // 15
  localparam int IBIAS = 2**(IE-1) - 1;  // 31
  localparam int XBIAS = 2**(XE-1) - 1;  // 15

  typedef struct packed {
    logic          s;
    logic [IE-1:0] e;
    logic [IM-1:0] m;
  } rfp_t;

  typedef struct packed {
    logic          s;
    logic [XE-1:0] e;
    logic [XM-1:0] m;
  } rfpx_t;

  typedef enum logic [2:0] {
    RFP_NOP, RFP_CLR, RFP_LOAD, RFP_MUL, RFP_MAC, RFP_MSU, RFP_ADD
  } rfp_op_e;

  localparam rfp_t RFP_ZERO = '0;

  // Pack a normalised result: sig holds the leading one at bit IM+1 and the
  // round bit at bit 0; exp is the biased exponent (may be out of range).
  function automatic rfp_t rfp_pack(logic s, logic signed [IE+2:0] exp,
                                    logic [IM+1:0] sig);
    logic [IM+1:0]      r;     // {carry-out, 1.m} after rounding
    logic signed [IE+2:0] e;
    rfp_t               y;
    r = {1'b0, sig[IM+1:1]} + (IM+2)'(sig[0]);
    e = exp;
    if (r[IM+1]) begin
      e = e + (IE+3)'(1);
      r = r >> 1;
    end
    if (e <= 0)                  y = RFP_ZERO;
    else if (e > 2**IE - 1)      y = '{s: s, e: '1, m: '1};
    else                         y = '{s: s, e: e[IE-1:0], m: r[IM-1:0]};
    return y;
  endfunction
endpackage
