// Hardware loop counter with a programmable step that counts down.
// load sets the counter to start and remembers step; each adv subtracts the
// step. last is high while the counter holds the final index of the loop, i.e.
// the next step would go below zero. The counter value feeds the offset address
// calculation and the loop-index capture of the conditional move. A step of two
// serves the even-position pulse search of the G.723.1 coder. Counting down and
// the variable step follow the accelerator proposal; the end condition (down to
// zero) is this design's choice.
module hw_loop_counter #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] start,
  input  logic [W-1:0] step,
  input  logic         adv,
  output logic [W-1:0] count,
  output logic         last
);
  logic [W-1:0] step_q;

  assign last = count < step_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      step_q <= W'(1);
    end else if (load) begin
      count  <= start;
      step_q <= step;
    end else if (adv) begin
      count  <= count - step_q;
    end
  end
endmodule
