// Shared types and constants of the bit-addressed load/store path.
// The custom load and store instructions carry a 5-bit length (0 means 32)
// and a 3-bit interpretation mode next to an 8-bit offset. Mode bit 0 selects
// signed interpretation and bit 1 fractional placement; bit 2 is reserved.
// The opcode values are this design's choice: the OpenRISC custom opcodes
// l.cust1 and l.cust2 carry the bit load and bit store.
package bitmem_pkg;
  localparam logic [5:0] OP_LWZ   = 6'h21;  // ordinary word load
  localparam logic [5:0] OP_SW    = 6'h35;  // ordinary word store
  localparam logic [5:0] OP_BLOAD = 6'h1C;  // bit load  (l.cust1)
  localparam logic [5:0] OP_BSTOR = 6'h1D;  // bit store (l.cust2)

  localparam int MODE_SIGNED = 0;
  localparam int MODE_FRAC   = 1;

  // Decoded load/store request, as presented to the bit memory controller.
  typedef struct packed {
    logic        valid;         // instruction is a load or store
    logic        we;            // store
    logic        use_bit_mode;  // Use_Bit_Mode
    logic [4:0]  length;        // Length[4:0], 0 = 32 bits
    logic [2:0]  mode;          // Mode[2:0]
    logic [31:0] addr;          // bit address (bit mode) or byte address
    logic [4:0]  rd;            // destination register of a load
    logic [4:0]  rb;            // data register of a store
  } lsu_ctl_t;
endpackage
