// semp_pkg: shared constants and types of the SEMP two-thread SMT processor
// and its memory system.
//
// The resource counts (2 hardware contexts, 2-wide issue, 92 physical
// registers, 24-entry reorder buffer, 8-entry issue queue and memory access
// queue, 512-entry pattern history table with a 2-bit global history, 32-bit
// data) follow the published resource table of the processor. Everything else
// here (micro-op encoding, field widths, the memory request format) is this
// design's own choice.
package semp_pkg;

  localparam int unsigned NTHREAD   = 2;   // hardware contexts
  localparam int unsigned XLEN      = 32;  // data width
  localparam int unsigned NARCH     = 34;  // r0..r31, LO (32), HI (33) per thread
  localparam int unsigned NPREG     = 92;  // physical registers
  localparam int unsigned PREG_W    = 7;
  localparam int unsigned AREG_W    = 6;
  localparam int unsigned ROB_DEPTH = 24;  // per thread
  localparam int unsigned ROB_W     = 5;
  localparam int unsigned IQ_DEPTH  = 8;   // per thread
  localparam int unsigned MAQ_DEPTH = 8;   // shared
  localparam int unsigned AREG_LO   = 32;
  localparam int unsigned AREG_HI   = 33;

  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [AREG_W-1:0] areg_t;
  typedef logic [ROB_W-1:0]  robidx_t;
  typedef logic [XLEN-1:0]   word_t;

  // functional unit class of a micro-op
  typedef enum logic [1:0] {FU_SIMPLE, FU_COMPLEX, FU_MEM, FU_NONE} fu_e;

  typedef enum logic [4:0] {
    OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOR, OP_SLT, OP_SLTU,
    OP_SLL, OP_SRL, OP_SRA, OP_LUI, OP_MOV,
    OP_BEQ, OP_BNE, OP_BLEZ, OP_BGTZ, OP_BLTZ, OP_BGEZ, OP_J, OP_JR,
    OP_MULT, OP_MULTU, OP_DIV, OP_DIVU,
    OP_LOAD, OP_STORE, OP_HALT, OP_NOP
  } op_e;

  typedef enum logic [1:0] {SZ_B, SZ_H, SZ_W} msize_e;

  // decoded instruction (architectural register names)
  typedef struct packed {
    logic    valid;
    fu_e     fu;
    op_e     op;
    areg_t   src1;     // rs
    areg_t   src2;     // rt
    logic    use1;
    logic    use2;
    logic    use_imm;  // second ALU operand is imm
    word_t   imm;      // extended immediate / shift amount
    word_t   target;   // branch / jump target
    areg_t   dst;
    logic    has_dst;
    logic    has_dst2; // multiply/divide also write HI
    logic    is_cbr;   // conditional branch (predicted)
    logic    is_jump;  // direct jump (always taken, target known)
    logic    is_jr;    // register jump
    msize_e  msize;
    logic    msigned;
    word_t   pc;
  } dec_t;

  // renamed micro-op as held in the issue queue / memory access queue
  typedef struct packed {
    logic    valid;
    logic    tid;
    fu_e     fu;
    op_e     op;
    preg_t   ps1;
    preg_t   ps2;
    logic    use1;
    logic    use2;
    logic    use_imm;
    word_t   imm;
    word_t   target;
    preg_t   pd;
    logic    has_dst;
    preg_t   pd2;
    logic    has_dst2;
    robidx_t rob;
    msize_e  msize;
    logic    msigned;
    word_t   pc;
    word_t   pred_npc; // next PC the front end followed
  } uop_t;

  // result reported to a reorder buffer
  typedef struct packed {
    logic    valid;
    logic    tid;
    robidx_t rob;
    logic    taken;     // branch outcome
    logic    mispred;   // front end followed the wrong path
    word_t   npc;       // correct next PC
  } cmpl_t;

  // one retired instruction, as reported by a reorder buffer
  typedef struct packed {
    logic    valid;
    areg_t   dst;
    logic    has_dst;
    preg_t   pd;
    preg_t   old_pd;
    logic    has_dst2;
    preg_t   pd2;
    preg_t   old_pd2;
    logic    is_cbr;
    logic    taken;
    logic [1:0] ghr;    // history the prediction used
    word_t   pc;
    logic    flush;     // mispredicted branch or halt: squash younger
    logic    halt;
    word_t   npc;
  } retire_t;

  // reorder buffer entry written at dispatch
  typedef struct packed {
    logic       done;
    areg_t      dst;
    logic       has_dst;
    preg_t      pd;
    preg_t      old_pd;
    logic       has_dst2;
    preg_t      pd2;
    preg_t      old_pd2;
    logic       is_cbr;
    logic       halt;
    logic [1:0] ghr;
    word_t      pc;
  } rob_entry_t;

  // cache line request to main memory (16-byte lines)
  typedef struct packed {
    logic         valid;
    logic         we;
    logic [31:4]  line;    // line address
    logic [15:0]  be;      // byte enables of a write
    logic [127:0] wdata;
  } mem_req_t;

  typedef struct packed {
    logic         valid;   // read data / write done
    logic [127:0] rdata;
  } mem_rsp_t;

  // event strobes of the core, one per cycle, for performance counting
  typedef struct packed {
    logic [1:0] retired;       // instructions retired this cycle, per thread (any)
    logic       flush;         // mispredict / halt recovery
    logic       id_redirect;   // predicted-taken branch or jump redirected fetch
    logic       rename_stall;  // rename held for lack of resources
    logic       bypass;        // an operand came over a bypass path
    logic       dual_thread_issue; // both threads issued in the same cycle
    logic       complex_busy;  // complex ALU iterating
    logic       lsu_wait;      // load/store unit waiting for the data cache
  } perf_t;

endpackage
