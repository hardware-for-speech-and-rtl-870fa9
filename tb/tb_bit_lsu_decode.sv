// Self-checking test of the load/store decoder: random instruction words of the
// four load/store opcodes (and others) are built field by field and the decoded
// signals and effective address are compared with values formed from those fields.
module tb_bit_lsu_decode;
  import bitmem_pkg::*;
  logic [31:0] insn, ra_val;
  lsu_ctl_t ctl;
  int checks = 0, failures = 0;
  bit_lsu_decode dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] rd, ra, rb, len; logic [2:0] md; logic [7:0] off; logic [15:0] imm;
    logic [5:0] opc; int sel;
    lsu_ctl_t exp;
    for (int i = 0; i < 2000; i++) begin
      rd = 5'($urandom); ra = 5'($urandom); rb = 5'($urandom); len = 5'($urandom);
      md = 3'($urandom); off = 8'($urandom); imm = 16'($urandom); ra_val = $urandom;
      sel = $urandom_range(0, 4);
      exp = '0;
      case (sel)
        0: begin opc = OP_LWZ; insn = {opc, rd, ra, imm};
             exp.valid = 1; exp.addr = ra_val + 32'(signed'(imm)); end
        1: begin opc = OP_SW; insn = {opc, imm[15:11], ra, rb, imm[10:0]};
             exp.valid = 1; exp.we = 1; exp.addr = ra_val + 32'(signed'(imm)); end
        2: begin opc = OP_BLOAD; insn = {opc, rd, ra, len, md, off};
             exp.valid = 1; exp.use_bit_mode = 1; exp.length = len; exp.mode = md;
             exp.addr = ra_val + 32'(signed'(off)); end
        3: begin opc = OP_BSTOR; insn = {opc, len, ra, rb, md, off};
             exp.valid = 1; exp.we = 1; exp.use_bit_mode = 1; exp.length = len; exp.mode = md;
             exp.addr = ra_val + 32'(signed'(off)); end
        default: begin opc = 6'h11; insn = {opc, rd, ra, imm}; end
      endcase
      #1;
      checks++;
      if (ctl.valid !== exp.valid || ctl.we !== exp.we || ctl.use_bit_mode !== exp.use_bit_mode ||
          (exp.valid && ctl.addr !== exp.addr) || (exp.use_bit_mode && (ctl.length !== exp.length || ctl.mode !== exp.mode)) ||
          (sel == 0 || sel == 2) && ctl.rd !== rd || (sel == 1 || sel == 3) && ctl.rb !== rb) begin
        failures++;
        $display("sel %0d insn %h got %p", sel, insn, ctl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
