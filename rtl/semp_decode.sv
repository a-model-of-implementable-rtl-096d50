// semp_decode: combinational decoder for one instruction (ID stage).
//
// Decodes the integer subset of the MIPS-II instruction set on which the
// processor's instruction set is based: register and immediate ALU
// operations, shifts, loads and stores of bytes, halfwords and words,
// conditional branches, jumps (with link), HI/LO moves, and MULT/MULTU/
// DIV/DIVU, which write LO and HI and therefore carry a second destination.
// HI and LO are architectural registers 32 and 33 and are renamed like the
// others. The processor's own thread-control instructions are not published;
// BREAK and SYSCALL halt the issuing thread instead. Branches have no delay
// slot. ADD/ADDI/SUB do not trap on overflow. Unknown encodings decode as a
// no-operation. These are this design's choices.
//
// Interface: instr/pc in, dec_t out, no clock.
module semp_decode
  import semp_pkg::*;
(
  input  logic [31:0] instr,
  input  logic [31:0] pc,
  input  logic        valid,
  output dec_t        d
);
  logic [5:0]  opc, funct;
  logic [4:0]  rs, rt, rd, sh;
  logic [15:0] i16;
  word_t       sext, zext, pc4;

  assign opc   = instr[31:26];
  assign rs    = instr[25:21];
  assign rt    = instr[20:16];
  assign rd    = instr[15:11];
  assign sh    = instr[10:6];
  assign funct = instr[5:0];
  assign i16   = instr[15:0];
  assign sext  = {{16{i16[15]}}, i16};
  assign zext  = {16'b0, i16};
  assign pc4   = pc + 32'd4;

  always_comb begin
    d          = '0;
    d.valid    = valid;
    d.pc       = pc;
    d.fu       = FU_SIMPLE;
    d.op       = OP_NOP;
    d.src1     = {1'b0, rs};
    d.src2     = {1'b0, rt};
    d.msize    = SZ_W;
    d.target   = pc4 + {sext[29:0], 2'b00};
    unique case (opc)
      6'd0: begin // SPECIAL
        d.use1 = 1'b1; d.use2 = 1'b1; d.dst = {1'b0, rd}; d.has_dst = 1'b1;
        unique case (funct)
          6'd0, 6'd2, 6'd3: begin // SLL SRL SRA (shift rt by shamt)
            d.op = (funct == 6'd0) ? OP_SLL : (funct == 6'd2) ? OP_SRL : OP_SRA;
            d.src1 = {1'b0, rt}; d.use2 = 1'b0; d.use_imm = 1'b1; d.imm = {27'b0, sh};
          end
          6'd4, 6'd6, 6'd7: begin // SLLV SRLV SRAV (shift rt by rs)
            d.op = (funct == 6'd4) ? OP_SLL : (funct == 6'd6) ? OP_SRL : OP_SRA;
            d.src1 = {1'b0, rt}; d.src2 = {1'b0, rs};
          end
          6'd8, 6'd9: begin // JR JALR
            d.op = OP_JR; d.is_jr = 1'b1; d.use2 = 1'b0;
            d.has_dst = (funct == 6'd9);
          end
          6'd12, 6'd13: begin // SYSCALL BREAK: halt this thread
            d.op = OP_HALT; d.fu = FU_NONE; d.use1 = 1'b0; d.use2 = 1'b0; d.has_dst = 1'b0;
          end
          6'd16: begin d.op = OP_MOV; d.src1 = AREG_HI[AREG_W-1:0]; d.use2 = 1'b0; end // MFHI
          6'd18: begin d.op = OP_MOV; d.src1 = AREG_LO[AREG_W-1:0]; d.use2 = 1'b0; end // MFLO
          6'd17: begin d.op = OP_MOV; d.use2 = 1'b0; d.dst = AREG_HI[AREG_W-1:0]; end  // MTHI
          6'd19: begin d.op = OP_MOV; d.use2 = 1'b0; d.dst = AREG_LO[AREG_W-1:0]; end  // MTLO
          6'd24, 6'd25, 6'd26, 6'd27: begin
            d.fu = FU_COMPLEX;
            d.op = (funct == 6'd24) ? OP_MULT : (funct == 6'd25) ? OP_MULTU :
                   (funct == 6'd26) ? OP_DIV : OP_DIVU;
            d.dst = AREG_LO[AREG_W-1:0]; d.has_dst2 = 1'b1;
          end
          6'd32, 6'd33: d.op = OP_ADD;
          6'd34, 6'd35: d.op = OP_SUB;
          6'd36: d.op = OP_AND;
          6'd37: d.op = OP_OR;
          6'd38: d.op = OP_XOR;
          6'd39: d.op = OP_NOR;
          6'd42: d.op = OP_SLT;
          6'd43: d.op = OP_SLTU;
          default: begin d.op = OP_NOP; d.has_dst = 1'b0; d.use1 = 1'b0; d.use2 = 1'b0; end
        endcase
      end
      6'd1: begin // REGIMM: BLTZ BGEZ BLTZAL BGEZAL
        d.use1 = 1'b1; d.is_cbr = 1'b1;
        d.op = rt[0] ? OP_BGEZ : OP_BLTZ;
        if (rt[4]) begin d.has_dst = 1'b1; d.dst = 6'd31; end
      end
      6'd2, 6'd3: begin // J JAL
        d.op = OP_J; d.is_jump = 1'b1;
        d.target = {pc4[31:28], instr[25:0], 2'b00};
        if (opc == 6'd3) begin d.has_dst = 1'b1; d.dst = 6'd31; end
      end
      6'd4, 6'd5: begin d.op = (opc == 6'd4) ? OP_BEQ : OP_BNE; d.use1 = 1'b1; d.use2 = 1'b1; d.is_cbr = 1'b1; end
      6'd6, 6'd7: begin d.op = (opc == 6'd6) ? OP_BLEZ : OP_BGTZ; d.use1 = 1'b1; d.is_cbr = 1'b1; end
      6'd8, 6'd9, 6'd10, 6'd11, 6'd12, 6'd13, 6'd14, 6'd15: begin
        d.use1 = (opc != 6'd15); d.use_imm = 1'b1; d.dst = {1'b0, rt}; d.has_dst = 1'b1;
        d.imm = (opc >= 6'd12) ? zext : sext;
        unique case (opc)
          6'd8, 6'd9: d.op = OP_ADD;
          6'd10:      d.op = OP_SLT;
          6'd11:      d.op = OP_SLTU;
          6'd12:      d.op = OP_AND;
          6'd13:      d.op = OP_OR;
          6'd14:      d.op = OP_XOR;
          default:    d.op = OP_LUI;
        endcase
      end
      6'd32, 6'd33, 6'd35, 6'd36, 6'd37: begin // LB LH LW LBU LHU
        d.fu = FU_MEM; d.op = OP_LOAD; d.use1 = 1'b1; d.imm = sext;
        d.dst = {1'b0, rt}; d.has_dst = 1'b1;
        d.msize   = (opc[1:0] == 2'b00) ? SZ_B : (opc[1:0] == 2'b01) ? SZ_H : SZ_W;
        d.msigned = !opc[2];
      end
      6'd40, 6'd41, 6'd43: begin // SB SH SW
        d.fu = FU_MEM; d.op = OP_STORE; d.use1 = 1'b1; d.use2 = 1'b1; d.imm = sext;
        d.msize = (opc[1:0] == 2'b00) ? SZ_B : (opc[1:0] == 2'b01) ? SZ_H : SZ_W;
      end
      default: d.op = OP_NOP;
    endcase
    // writes to r0 are discarded
    if (d.has_dst && d.dst == '0) d.has_dst = 1'b0;
    if (!valid) d = '0;
  end
endmodule
