// Bit-serial fractional divider for the DIV_S and DIV_32 operations.
// Restoring division producing one quotient bit per clock cycle, so the
// latency is about the number of quotient bits instead of a long software
// routine. DIV_S: 16-bit num / 16-bit den, both positive with num <= den,
// Q15 result in quot[15:0] after 15 iteration cycles (as the ITU div_s).
// DIV_32 (long_div): Q31 numerator num[31:0] / Q15 denominator den, positive
// with num <= den<<16, Q31 result after 31 iteration cycles. Equal operands
// give the largest positive value. start is accepted while busy is low; done
// pulses for one cycle with the result on quot, which holds until the next
// start. Bit-serial operation follows the accelerator proposal; the operand
// format of the long division is this design's choice.
module serial_divider (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        long_div,
  input  logic [31:0] num,
  input  logic [15:0] den,
  output logic        busy,
  output logic        done,
  output logic [31:0] quot
);
  logic [32:0] rem;
  logic [31:0] dval;
  logic [4:0]  cnt;
  logic [32:0] rem2;

  assign rem2 = {rem[31:0], 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem  <= '0;
      dval <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      quot <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        dval <= long_div ? {den, 16'h0} : {16'h0, den};
        rem  <= long_div ? {1'b0, num} : {17'h0, num[15:0]};
        quot <= '0;
        cnt  <= long_div ? 5'd31 : 5'd15;
        busy <= 1'b1;
        if (long_div ? (num == {den, 16'h0}) : (num[15:0] == den)) begin
          quot <= long_div ? 32'h7FFF_FFFF : 32'h0000_7FFF;
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (busy) begin
        if (rem2 >= {1'b0, dval}) begin
          rem  <= rem2 - {1'b0, dval};
          quot <= {quot[30:0], 1'b1};
        end else begin
          rem  <= rem2;
          quot <= {quot[30:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 5'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
