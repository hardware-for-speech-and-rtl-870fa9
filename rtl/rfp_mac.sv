// Reduced floating-point multiply-accumulate unit with a 20-bit accumulator.
// Because every result is normalised, the accumulator needs neither guard
// bits nor double precision: it has the same 20-bit format as the registers.
// The product is rounded to the internal format (rfp_mul) and then added to or
// subtracted from the accumulator (rfp_add), so a MAC rounds twice.
// Operations: CLR (acc = 0), LOAD (acc = a), MUL (acc = a*b), MAC (acc += a*b),
// MSU (acc -= a*b), ADD (acc += a). Single cycle: acc updates at the clock edge.
module rfp_mac
  import rfp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  rfp_op_e op,
  input  rfp_t    a,
  input  rfp_t    b,
  output rfp_t    acc
);
  rfp_t prod, addend, sum;

  rfp_mul u_mul (.a, .b, .y(prod));
  assign addend = (op == RFP_ADD) ? a : prod;
  rfp_add u_add (.a(acc), .b(addend), .sub(op == RFP_MSU), .y(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= RFP_ZERO;
    else begin
      unique case (op)
        RFP_CLR:                  acc <= RFP_ZERO;
        RFP_LOAD:                 acc <= a;
        RFP_MUL:                  acc <= prod;
        RFP_MAC, RFP_MSU, RFP_ADD: acc <= sum;
        default: ;
      endcase
    end
  end
endmodule
