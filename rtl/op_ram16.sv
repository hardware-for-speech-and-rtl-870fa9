// 16-bit operand memory of the speech-coding data path (buffers such as Imr and
// ImrCorr). One write port for filling the buffers and one synchronous read port
// driven by the address generator: data appears one cycle after raddr. The size
// is this design's choice.
module op_ram16 #(
  parameter int AW = 10
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic signed [15:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic signed [15:0] rdata
);
  logic signed [15:0] mem [2**AW];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
