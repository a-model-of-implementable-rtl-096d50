// semp_asm_pkg: a tiny MIPS-II assembler for testbenches (instruction
// encoders), plus the two-thread test program used by the system-level
// testbenches and the reference values it must leave in memory.
package semp_asm_pkg;
  function automatic logic [31:0] R(input int op, rs, rt, rd, sh, fn);
    return {6'(op), 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] I(input int op, rs, rt, imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] J(input int op, logic [31:0] target);
    return {6'(op), target[27:2]};
  endfunction
  function automatic logic [31:0] ADDU (input int rd, rs, rt); return R(0, rs, rt, rd, 0, 33); endfunction
  function automatic logic [31:0] SUBU (input int rd, rs, rt); return R(0, rs, rt, rd, 0, 35); endfunction
  function automatic logic [31:0] AND_ (input int rd, rs, rt); return R(0, rs, rt, rd, 0, 36); endfunction
  function automatic logic [31:0] OR_  (input int rd, rs, rt); return R(0, rs, rt, rd, 0, 37); endfunction
  function automatic logic [31:0] XOR_ (input int rd, rs, rt); return R(0, rs, rt, rd, 0, 38); endfunction
  function automatic logic [31:0] NOR_ (input int rd, rs, rt); return R(0, rs, rt, rd, 0, 39); endfunction
  function automatic logic [31:0] SLT  (input int rd, rs, rt); return R(0, rs, rt, rd, 0, 42); endfunction
  function automatic logic [31:0] SLTU (input int rd, rs, rt); return R(0, rs, rt, rd, 0, 43); endfunction
  function automatic logic [31:0] SLL  (input int rd, rt, sh); return R(0, 0, rt, rd, sh, 0); endfunction
  function automatic logic [31:0] SRL  (input int rd, rt, sh); return R(0, 0, rt, rd, sh, 2); endfunction
  function automatic logic [31:0] SRA  (input int rd, rt, sh); return R(0, 0, rt, rd, sh, 3); endfunction
  function automatic logic [31:0] SLLV (input int rd, rt, rs); return R(0, rs, rt, rd, 0, 4); endfunction
  function automatic logic [31:0] JR   (input int rs);         return R(0, rs, 0, 0, 0, 8); endfunction
  function automatic logic [31:0] JALR (input int rd, rs);     return R(0, rs, 0, rd, 0, 9); endfunction
  function automatic logic [31:0] BREAK();                     return R(0, 0, 0, 0, 0, 13); endfunction
  function automatic logic [31:0] MFHI (input int rd);         return R(0, 0, 0, rd, 0, 16); endfunction
  function automatic logic [31:0] MFLO (input int rd);         return R(0, 0, 0, rd, 0, 18); endfunction
  function automatic logic [31:0] MTLO (input int rs);         return R(0, rs, 0, 0, 0, 19); endfunction
  function automatic logic [31:0] MULT (input int rs, rt);     return R(0, rs, rt, 0, 0, 24); endfunction
  function automatic logic [31:0] MULTU(input int rs, rt);     return R(0, rs, rt, 0, 0, 25); endfunction
  function automatic logic [31:0] DIV  (input int rs, rt);     return R(0, rs, rt, 0, 0, 26); endfunction
  function automatic logic [31:0] DIVU (input int rs, rt);     return R(0, rs, rt, 0, 0, 27); endfunction
  function automatic logic [31:0] ADDIU(input int rt, rs, imm); return I(9, rs, rt, imm); endfunction
  function automatic logic [31:0] SLTI (input int rt, rs, imm); return I(10, rs, rt, imm); endfunction
  function automatic logic [31:0] ANDI (input int rt, rs, imm); return I(12, rs, rt, imm); endfunction
  function automatic logic [31:0] ORI  (input int rt, rs, imm); return I(13, rs, rt, imm); endfunction
  function automatic logic [31:0] XORI (input int rt, rs, imm); return I(14, rs, rt, imm); endfunction
  function automatic logic [31:0] LUI  (input int rt, imm);     return I(15, 0, rt, imm); endfunction
  function automatic logic [31:0] LB   (input int rt, off, rs); return I(32, rs, rt, off); endfunction
  function automatic logic [31:0] LH   (input int rt, off, rs); return I(33, rs, rt, off); endfunction
  function automatic logic [31:0] LW   (input int rt, off, rs); return I(35, rs, rt, off); endfunction
  function automatic logic [31:0] LBU  (input int rt, off, rs); return I(36, rs, rt, off); endfunction
  function automatic logic [31:0] LHU  (input int rt, off, rs); return I(37, rs, rt, off); endfunction
  function automatic logic [31:0] SB   (input int rt, off, rs); return I(40, rs, rt, off); endfunction
  function automatic logic [31:0] SH   (input int rt, off, rs); return I(41, rs, rt, off); endfunction
  function automatic logic [31:0] SW   (input int rt, off, rs); return I(43, rs, rt, off); endfunction
  // branch offsets are in instructions relative to the next instruction
  function automatic logic [31:0] BEQ  (input int rs, rt, off); return I(4, rs, rt, off); endfunction
  function automatic logic [31:0] BNE  (input int rs, rt, off); return I(5, rs, rt, off); endfunction
  function automatic logic [31:0] BLEZ (input int rs, off);     return I(6, rs, 0, off); endfunction
  function automatic logic [31:0] BGTZ (input int rs, off);     return I(7, rs, 0, off); endfunction
  function automatic logic [31:0] BLTZ (input int rs, off);     return I(1, rs, 0, off); endfunction
  function automatic logic [31:0] BGEZ (input int rs, off);     return I(1, rs, 1, off); endfunction
  function automatic logic [31:0] JAL  (input logic [31:0] t);  return J(3, t); endfunction
  function automatic logic [31:0] JMP  (input logic [31:0] t);  return J(2, t); endfunction

  localparam logic [31:0] T0_BASE = 32'h0000_0000;
  localparam logic [31:0] T1_BASE = 32'h0000_1000;
  localparam logic [31:0] D0      = 32'h0000_2000;  // thread 0 results
  localparam logic [31:0] D1      = 32'h0000_3000;  // thread 1 results
  localparam int          NRES0   = 12;
  localparam int          NRES1   = 8;

  // thread 0: loop sum, multiply, signed divide, call/return, loads, byte
  // and halfword accesses, shifts and compares
  function automatic void prog0(ref logic [31:0] p [$]);
    p.delete();
    p.push_back(ADDIU(1, 0, 0));        // 00 sum = 0
    p.push_back(ADDIU(2, 0, 1));        // 04 i = 1
    p.push_back(ADDIU(3, 0, 11));       // 08
    p.push_back(ADDU(1, 1, 2));         // 0c loop: sum += i
    p.push_back(ADDIU(2, 2, 1));        // 10
    p.push_back(BNE(2, 3, -3));         // 14 -> 0c
    p.push_back(LUI(4, 0));             // 18
    p.push_back(ORI(4, 4, D0));         // 1c r4 = D0
    p.push_back(SW(1, 0, 4));           // 20 [0] = 55
    p.push_back(ADDIU(5, 0, 7));        // 24
    p.push_back(MULT(1, 5));            // 28
    p.push_back(MFLO(6));               // 2c
    p.push_back(SW(6, 4, 4));           // 30 [1] = 385
    p.push_back(ADDIU(7, 0, -100));     // 34
    p.push_back(DIV(7, 5));             // 38 -100 / 7
    p.push_back(MFLO(8));               // 3c -14
    p.push_back(MFHI(9));               // 40 -2
    p.push_back(SW(8, 8, 4));           // 44 [2]
    p.push_back(SW(9, 12, 4));          // 48 [3]
    p.push_back(JAL(32'h0000_0090));    // 4c call f
    p.push_back(SW(11, 16, 4));         // 50 [4] = 110
    p.push_back(LW(12, 0, 4));          // 54 55
    p.push_back(LW(13, 4, 4));          // 58 385
    p.push_back(ADDU(14, 12, 13));      // 5c 440
    p.push_back(SW(14, 20, 4));         // 60 [5] = 440
    p.push_back(SW(0, 24, 4));          // 64 [6] = 0
    p.push_back(SB(5, 25, 4));          // 68 byte 1 of [6] = 7
    p.push_back(ADDIU(15, 0, -2));      // 6c
    p.push_back(SH(15, 26, 4));         // 70 half 1 of [6] = 0xfffe -> [6]=0x0007fffe
    p.push_back(LB(16, 27, 4));         // 74 0xfe -> -2
    p.push_back(LHU(17, 26, 4));        // 78 0xfffe
    p.push_back(JMP(32'h0000_00a0));    // 7c -> a0
    p.push_back(BREAK());               // 80 (skipped)
    p.push_back(BREAK());               // 84
    p.push_back(BREAK());               // 88
    p.push_back(BREAK());               // 8c
    p.push_back(ADDU(11, 1, 1));        // 90 f: r11 = 2*sum
    p.push_back(JR(31));                // 94
    p.push_back(BREAK());               // 98
    p.push_back(BREAK());               // 9c
    p.push_back(SW(16, 28, 4));         // a0 [7] = -2
    p.push_back(SW(17, 32, 4));         // a4 [8] = 0xfffe
    p.push_back(SRA(18, 15, 1));        // a8 -1
    p.push_back(SLT(19, 15, 0));        // ac 1
    p.push_back(SLL(20, 19, 4));        // b0 16
    p.push_back(ADDU(20, 20, 18));      // b4 15
    p.push_back(SW(20, 36, 4));         // b8 [9] = 15
    p.push_back(MULTU(15, 5));          // bc 0xfffffffe * 7
    p.push_back(MFHI(21));              // c0 6
    p.push_back(MFLO(22));              // c4 0xfffffff2
    p.push_back(SW(21, 40, 4));         // c8 [10]
    p.push_back(SW(22, 44, 4));         // cc [11]
    p.push_back(BREAK());               // d0
  endfunction

  function automatic void exp0(ref logic [31:0] e [NRES0]);
    logic [63:0] m;
    int sum;
    sum = 0;
    for (int i = 1; i < 11; i++) sum += i;
    e[0] = sum; e[1] = sum * 7; e[2] = -100 / 7; e[3] = -100 % 7; e[4] = 2 * sum;
    e[5] = sum + sum * 7; e[6] = 32'h0007_fffe; e[7] = -2; e[8] = 32'h0000_fffe;
    e[9] = 15;
    m = 64'(32'hffff_fffe) * 64'd7;
    e[10] = m[63:32]; e[11] = m[31:0];
  endfunction

  // thread 1: array fill and sum over many cache blocks, Fibonacci,
  // factorial through repeated multiplication
  function automatic void prog1(ref logic [31:0] p [$]);
    p.delete();
    p.push_back(ORI(4, 0, D1));         // 00 r4 = D1
    p.push_back(ORI(5, 0, 16'h3800));   // 04 r5 = array base
    p.push_back(ADDIU(6, 0, 0));        // 08 i = 0
    p.push_back(ADDIU(7, 0, 24));       // 0c n = 24
    p.push_back(MULT(6, 6));            // 10 fill: i*i
    p.push_back(MFLO(8));               // 14
    p.push_back(SW(8, 0, 5));           // 18 a[i] (stride 16 bytes)
    p.push_back(ADDIU(5, 5, 16));       // 1c
    p.push_back(ADDIU(6, 6, 1));        // 20
    p.push_back(BNE(6, 7, -6));         // 24 -> 10
    p.push_back(ORI(5, 0, 16'h3800));   // 28
    p.push_back(ADDIU(9, 0, 0));        // 2c s = 0
    p.push_back(ADDIU(6, 0, 0));        // 30
    p.push_back(LW(8, 0, 5));           // 34 sum loop
    p.push_back(ADDU(9, 9, 8));         // 38
    p.push_back(ADDIU(5, 5, 16));       // 3c
    p.push_back(ADDIU(6, 6, 1));        // 40
    p.push_back(SLT(10, 6, 7));         // 44
    p.push_back(BGTZ(10, -6));          // 48 -> 34
    p.push_back(SW(9, 0, 4));           // 4c [0] = sum of squares
    p.push_back(ADDIU(1, 0, 0));        // 50 fib a
    p.push_back(ADDIU(2, 0, 1));        // 54 fib b
    p.push_back(ADDIU(3, 0, 20));       // 58 count
    p.push_back(ADDU(11, 1, 2));        // 5c fib loop
    p.push_back(OR_(1, 2, 0));          // 60
    p.push_back(OR_(2, 11, 0));         // 64
    p.push_back(ADDIU(3, 3, -1));       // 68
    p.push_back(BGTZ(3, -5));           // 6c -> 5c
    p.push_back(SW(1, 4, 4));           // 70 [1] = fib(20)
    p.push_back(ADDIU(12, 0, 1));       // 74 fact
    p.push_back(ADDIU(13, 0, 10));      // 78
    p.push_back(MULTU(12, 13));         // 7c fact loop
    p.push_back(MFLO(12));              // 80
    p.push_back(ADDIU(13, 13, -1));     // 84
    p.push_back(BNE(13, 0, -4));        // 88 -> 7c
    p.push_back(SW(12, 8, 4));          // 8c [2] = 10!
    p.push_back(DIVU(12, 7));           // 90 10! / 24
    p.push_back(MFLO(14));              // 94
    p.push_back(MFHI(15));              // 98
    p.push_back(SW(14, 12, 4));         // 9c [3]
    p.push_back(SW(15, 16, 4));         // a0 [4]
    p.push_back(NOR_(16, 0, 0));        // a4 -1
    p.push_back(SLTU(17, 0, 16));       // a8 1
    p.push_back(XORI(18, 16, 16'h00ff));// ac 0xffffff00
    p.push_back(SW(17, 20, 4));         // b0 [5]
    p.push_back(SW(18, 24, 4));         // b4 [6]
    p.push_back(BLTZ(16, 1));           // b8 taken, skip next
    p.push_back(SW(0, 28, 4));          // bc (skipped)
    p.push_back(ADDIU(19, 0, 77));      // c0
    p.push_back(SW(19, 28, 4));         // c4 [7] = 77
    p.push_back(BREAK());               // c8
  endfunction

  function automatic void exp1(ref logic [31:0] e [NRES1]);
    int s, a, b, t;
    longint f;
    s = 0;
    for (int i = 0; i < 24; i++) s += i * i;
    a = 0; b = 1;
    for (int i = 0; i < 20; i++) begin t = a + b; a = b; b = t; end
    f = 1;
    for (int i = 10; i > 0; i--) f *= i;
    e[0] = s; e[1] = a; e[2] = 32'(f); e[3] = 32'(f / 24); e[4] = 32'(f % 24);
    e[5] = 1; e[6] = 32'hffff_ff00; e[7] = 77;
  endfunction
endpackage
