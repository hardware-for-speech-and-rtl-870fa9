// Load/store decoder of the bit-addressed memory path.
// It recognises the ordinary word load (l.lwz) and store (l.sw) and the two
// custom bit-oriented instructions. In the custom ones the 16-bit immediate is
// cut into Length[4:0], Mode[2:0] and an 8-bit signed offset, so a bit load or
// store reaches -128..127 bits around the bit address held in RA, while the
// ordinary accesses keep their 16-bit byte offset. For stores the immediate is
// split around the RB field (insn[25:21] and insn[10:0]), so Length comes from
// insn[25:21]. The output is the three extra processor signals (Use_Bit_Mode,
// Length, Mode) together with the effective address and the register indices.
// Purely combinational. The field layout follows the instruction encoding of
// the bit memory scheme; the opcode values are this design's choice.
module bit_lsu_decode
  import bitmem_pkg::*;
(
  input  logic [31:0] insn,
  input  logic [31:0] ra_val,
  output lsu_ctl_t    ctl
);
  logic [5:0]  opc;
  logic [15:0] imm_ld, imm_st;
  logic [7:0]  imm8;

  assign opc    = insn[31:26];
  assign imm_ld = insn[15:0];
  assign imm_st = {insn[25:21], insn[10:0]};
  assign imm8   = insn[7:0];

  always_comb begin
    ctl        = '0;
    ctl.rd     = insn[25:21];
    ctl.rb     = insn[15:11];
    unique case (opc)
      OP_LWZ: begin
        ctl.valid = 1'b1;
        ctl.addr  = ra_val + {{16{imm_ld[15]}}, imm_ld};
      end
      OP_SW: begin
        ctl.valid = 1'b1;
        ctl.we    = 1'b1;
        ctl.addr  = ra_val + {{16{imm_st[15]}}, imm_st};
      end
      OP_BLOAD: begin
        ctl.valid        = 1'b1;
        ctl.use_bit_mode = 1'b1;
        ctl.length       = imm_ld[15:11];
        ctl.mode         = imm_ld[10:8];
        ctl.addr         = ra_val + {{24{imm8[7]}}, imm8};
      end
      OP_BSTOR: begin
        ctl.valid        = 1'b1;
        ctl.we           = 1'b1;
        ctl.use_bit_mode = 1'b1;
        ctl.length       = imm_st[15:11];
        ctl.mode         = imm_st[10:8];
        ctl.addr         = ra_val + {{24{imm8[7]}}, imm8};
      end
      default: ;
    endcase
  end
endmodule
