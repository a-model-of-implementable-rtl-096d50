// tb_semp_simple_alu: random and directed checks of the simple ALU against a
// reference model written here, including branch outcome, next PC and
// mispredict flag.
module tb_semp_simple_alu;
  import semp_pkg::*;
  op_e op; word_t a, b, pc, target, pred, res, npc; logic tk, mp;
  int checks = 0, failures = 0;
  semp_simple_alu dut (.op, .a, .b, .pc, .target, .pred_npc(pred), .result(res), .taken(tk), .npc, .mispred(mp));
  initial begin
    word_t er, en; logic et;
    op_e ops [] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOR, OP_SLT, OP_SLTU, OP_SLL, OP_SRL,
                    OP_SRA, OP_LUI, OP_MOV, OP_BEQ, OP_BNE, OP_BLEZ, OP_BGTZ, OP_BLTZ, OP_BGEZ, OP_J, OP_JR};
    for (int n = 0; n < 3000; n++) begin
      op = ops[$urandom_range(0, ops.size()-1)];
      a = $urandom; b = (n % 3 == 0) ? a : $urandom;
      if (n % 7 == 0) a = 0;
      pc = {$urandom, 2'b00}; target = {$urandom, 2'b00};
      pred = (n % 2) ? pc + 4 : target;
      #1;
      er = 0; et = 0;
      case (op)
        OP_ADD: er = a + b;  OP_SUB: er = a - b;  OP_AND: er = a & b;  OP_OR: er = a | b;
        OP_XOR: er = a ^ b;  OP_NOR: er = ~(a | b);
        OP_SLT: er = ($signed(a) < $signed(b)) ? 1 : 0;
        OP_SLTU: er = (a < b) ? 1 : 0;
        OP_SLL: er = a << (b % 32); OP_SRL: er = a >> (b % 32);
        OP_SRA: er = word_t'($signed(a) >>> (b % 32));
        OP_LUI: er = b << 16; OP_MOV: er = a;
        OP_BEQ: et = a == b; OP_BNE: et = a != b;
        OP_BLEZ: et = $signed(a) <= 0; OP_BGTZ: et = $signed(a) > 0;
        OP_BLTZ: begin et = $signed(a) < 0; er = pc + 4; end
        OP_BGEZ: begin et = $signed(a) >= 0; er = pc + 4; end
        OP_J, OP_JR: begin et = 1; er = pc + 4; end
        default: ;
      endcase
      en = (op == OP_JR) ? a : et ? target : pc + 4;
      checks++;
      if (res !== er || tk !== et || npc !== en || mp !== (en != pred)) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h res=%h/%h tk=%b npc=%h/%h", op.name(), a, b, res, er, tk, npc, en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
