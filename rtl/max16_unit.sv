// 16-bit amax / max instruction unit.
// amax a16,b16 computes b16 = max(abs_s(a16), b16); max a16,b16 computes
// b16 = max(a16, b16). This folds the frequent pattern
//   a16 = abs_s(a16); if (a16 > b16) b16 = a16;
// into one instruction. Combinational: y is the new b16 value, moved tells
// that a16 (or its absolute value) replaced b16. abs_s(-32768) saturates to
// 32767 as in the ITU basic operations.
module max16_unit
  import dsp_pkg::*;
(
  input  logic signed [15:0] a,
  input  logic signed [15:0] b,
  input  logic               use_abs,
  output logic signed [15:0] y,
  output logic               moved
);
  logic signed [15:0] cand;
  assign cand  = use_abs ? sat_abs16(a) : a;
  assign moved = cand > b;
  assign y     = moved ? cand : b;
endmodule
