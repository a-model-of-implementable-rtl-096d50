// tb_semp_decode: directed checks of the decoder on encodings built with the
// testbench assembler: unit, operation, register fields, immediates, branch
// targets, HI/LO destinations and r0 suppression.
module tb_semp_decode;
  import semp_pkg::*;
  import semp_asm_pkg::*;
  logic [31:0] instr, pc; dec_t d;
  int checks = 0, failures = 0;
  semp_decode dut (.instr, .pc, .valid(1'b1), .d);
  function automatic void chk(input bit ok, input string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endfunction
  initial begin
    pc = 32'h100;
    instr = ADDU(3, 1, 2); #1;
    chk(d.fu == FU_SIMPLE && d.op == OP_ADD && d.src1 == 1 && d.src2 == 2 && d.dst == 3 && d.has_dst && d.use1 && d.use2 && !d.use_imm, "addu");
    instr = ADDIU(5, 6, -3); #1;
    chk(d.op == OP_ADD && d.use_imm && d.imm == 32'hffff_fffd && d.dst == 5 && d.src1 == 6 && !d.use2, "addiu sign-extends");
    instr = ORI(5, 6, 16'h8001); #1;
    chk(d.op == OP_OR && d.imm == 32'h0000_8001, "ori zero-extends");
    instr = LUI(7, 16'h1234); #1;
    chk(d.op == OP_LUI && d.imm == 32'h1234 && !d.use1 && d.dst == 7, "lui");
    instr = SRA(4, 9, 7); #1;
    chk(d.op == OP_SRA && d.src1 == 9 && d.imm == 7 && d.use_imm, "sra");
    instr = SLLV(4, 9, 2); #1;
    chk(d.op == OP_SLL && d.src1 == 9 && d.src2 == 2 && !d.use_imm, "sllv");
    instr = ADDU(0, 1, 2); #1;
    chk(!d.has_dst, "write to r0 dropped");
    instr = BEQ(1, 2, -4); #1;
    chk(d.op == OP_BEQ && d.is_cbr && !d.has_dst && d.target == 32'h104 - 16, "beq target");
    instr = BGEZ(3, 5); #1;
    chk(d.op == OP_BGEZ && d.is_cbr && d.target == 32'h104 + 20 && !d.has_dst, "bgez");
    instr = I(1, 3, 17, 2); #1;
    chk(d.op == OP_BGEZ && d.has_dst && d.dst == 31, "bgezal links");
    instr = JAL(32'h0000_2340); #1;
    chk(d.op == OP_J && d.is_jump && d.target == 32'h2340 && d.dst == 31 && d.has_dst, "jal");
    instr = JR(31); #1;
    chk(d.op == OP_JR && d.is_jr && !d.has_dst && d.src1 == 31, "jr");
    instr = JALR(4, 8); #1;
    chk(d.op == OP_JR && d.has_dst && d.dst == 4, "jalr");
    instr = MULT(3, 4); #1;
    chk(d.fu == FU_COMPLEX && d.op == OP_MULT && d.dst == AREG_LO && d.has_dst && d.has_dst2, "mult");
    instr = DIVU(3, 4); #1;
    chk(d.fu == FU_COMPLEX && d.op == OP_DIVU, "divu");
    instr = MFHI(9); #1;
    chk(d.op == OP_MOV && d.src1 == AREG_HI && d.dst == 9, "mfhi");
    instr = MTLO(9); #1;
    chk(d.op == OP_MOV && d.src1 == 9 && d.dst == AREG_LO && d.has_dst, "mtlo");
    instr = LBU(2, -8, 29); #1;
    chk(d.fu == FU_MEM && d.op == OP_LOAD && d.msize == SZ_B && !d.msigned && d.imm == -8 && d.dst == 2 && d.src1 == 29, "lbu");
    instr = LH(2, 6, 29); #1;
    chk(d.msize == SZ_H && d.msigned, "lh");
    instr = SW(2, 12, 29); #1;
    chk(d.fu == FU_MEM && d.op == OP_STORE && d.msize == SZ_W && d.use2 && d.src2 == 2 && !d.has_dst, "sw");
    instr = BREAK(); #1;
    chk(d.fu == FU_NONE && d.op == OP_HALT, "break halts");
    instr = 32'hfc00_0000; #1;
    chk(d.op == OP_NOP && !d.has_dst, "unknown is nop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
