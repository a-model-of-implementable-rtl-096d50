// semp_simple_alu: single-cycle integer ALU (EX stage of the two simple ALU
// pipelines).
//
// Computes arithmetic, logic, shift, compare, LUI and register-move results,
// and resolves branches and jumps: it reports the outcome, the correct next
// PC and whether the front end followed a different next PC (pred_npc), and
// produces the link value PC+4. Combinational; the surrounding pipeline
// registers give the one-cycle EX stage. Two simple ALUs exist in the
// processor; the operation set follows the MIPS-II integer instructions.
module semp_simple_alu
  import semp_pkg::*;
(
  input  op_e   op,
  input  word_t a,
  input  word_t b,
  input  word_t pc,
  input  word_t target,
  input  word_t pred_npc,
  output word_t result,
  output logic  taken,
  output word_t npc,
  output logic  mispred
);
  word_t pc4;
  assign pc4 = pc + 32'd4;

  always_comb begin
    result = '0;
    taken  = 1'b0;
    unique case (op)
      OP_ADD:  result = a + b;
      OP_SUB:  result = a - b;
      OP_AND:  result = a & b;
      OP_OR:   result = a | b;
      OP_XOR:  result = a ^ b;
      OP_NOR:  result = ~(a | b);
      OP_SLT:  result = {31'b0, $signed(a) < $signed(b)};
      OP_SLTU: result = {31'b0, a < b};
      OP_SLL:  result = a << b[4:0];
      OP_SRL:  result = a >> b[4:0];
      OP_SRA:  result = word_t'($signed(a) >>> b[4:0]);
      OP_LUI:  result = {b[15:0], 16'b0};
      OP_MOV:  result = a;
      OP_BEQ:  taken = (a == b);
      OP_BNE:  taken = (a != b);
      OP_BLEZ: taken = ($signed(a) <= 0);
      OP_BGTZ: taken = ($signed(a) > 0);
      OP_BLTZ: begin taken = a[31];  result = pc4; end
      OP_BGEZ: begin taken = !a[31]; result = pc4; end
      OP_J:    begin taken = 1'b1;   result = pc4; end
      OP_JR:   begin taken = 1'b1;   result = pc4; end
      default: result = '0;
    endcase
    if (op == OP_JR)  npc = a;
    else if (taken)   npc = target;
    else              npc = pc4;
    mispred = (npc != pred_npc);
  end
endmodule
