// Data memory with a write mask down to single bits.
// A compiled SRAM with a bit-resolution write mask is what lets the bit memory
// controller store a variable without a read-modify-write: only the bits whose
// mask bit is set are written. One port, synchronous: a read returns the word
// on rdata in the cycle after en; a write (en and we) updates the masked bits at
// the clock edge, and rdata then shows the old word. Written as an array; the
// size (AW address bits) is this design's choice.
module bitmask_dmem #(
  parameter int AW = 10,
  parameter int DW = 32
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wmask,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      if (we) mem[addr] <= (mem[addr] & ~wmask) | (wdata & wmask);
    end
  end
endmodule
