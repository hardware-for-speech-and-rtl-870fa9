// ALU slice with the merged add-shift instruction.
// An addition or subtraction that is usually followed by a right shift is
// done in one instruction by routing the adder output straight into the
// shifter; the only extra hardware is the multiplexer in front of the shifter
// and the decoding. op: 0 add/sub (y = a +/- b), 1 shift (y = a >>> sh),
// 2 merged add-shift (y = (a +/- b) >>> sh). Combinational. Wrap-around
// addition and arithmetic shift are this design's choice.
module add_shift_unit #(
  parameter int W = 32
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  input  logic                  sub,
  input  logic [1:0]            op,
  input  logic [$clog2(W)-1:0]  sh,
  output logic signed [W-1:0]   y
);
  logic signed [W-1:0] sum, shin;
  assign sum  = sub ? a - b : a + b;
  assign shin = (op == 2'd2) ? sum : a;   // the added path: adder -> shifter
  assign y    = (op == 2'd0) ? sum : (shin >>> sh);
endmodule
