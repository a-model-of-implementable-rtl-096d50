// semp_core: SEMP, a two-thread simultaneous multithreading (SMT) processor
// core with two-wide out-of-order issue.
//
// Pipeline (one instruction group of one thread per cycle in the front end):
//   IF  semp_fetch: fetch selector picks a thread, I-cache returns 2 instr.
//   ID  two semp_decode, per-thread semp_bpred; a predicted-taken
//       conditional branch or a jump redirects that thread's fetch.
//   RN  semp_rename maps the group onto the shared physical registers and
//       dispatches it: every instruction to its thread's reorder buffer
//       (semp_rob), ALU operations to its thread's issue queue
//       (semp_issue_queue), loads and stores to the shared memory access
//       queue (semp_lsu).
//   IW  semp_select issues up to two simple-ALU operations and one
//       complex-ALU operation per cycle from both queues together.
//   RR  shared register file (semp_prf) read, with write-through forwarding.
//   EX  two semp_simple_alu (1 cycle) and one semp_complex_alu (iterative);
//       operands may come over the EX bypass from the simple ALUs' results.
//   RW  register write; completion reported to the reorder buffer.
//   RT  up to two instructions per thread retire per cycle.
// Loads and stores run EX, MA, RW inside semp_lsu.
//
// Per-thread resources (program counter, reorder buffer, issue queue, branch
// prediction) and shared ones (ALUs, register file, caches) are as the
// document describes, with the sizes of its resource table. A simple-ALU
// result marks its register ready for issue in the cycle the producer issues,
// so a dependent instruction issues in the next cycle and takes the value from
// the bypass; complex-ALU and load results mark their register ready when
// they are written. Mispredicted branches and halts are recovered when they
// retire: the thread's younger instructions are squashed everywhere, its map
// table is restored from the retirement map, and fetch restarts at the
// correct address. The issue policy, recovery at retirement and the single
// retire stage are this design's choices.
//
// Interface: run starts both threads (at RESET_PC0 / RESET_PC1); the
// instruction port fetches 8 aligned bytes, the data port reads or writes one
// word with byte enables; both answer with rsp_valid one cycle after the
// request on a hit, later on a miss. halted[t] rises when thread t retires
// BREAK or SYSCALL.
module semp_core
  import semp_pkg::*;
#(
  parameter logic [31:0] RESET_PC0 = 32'h0000_0000,
  parameter logic [31:0] RESET_PC1 = 32'h0000_1000
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                run,
  // instruction memory side
  output logic                ireq_valid,
  input  logic                ireq_ready,
  output word_t               ireq_addr,
  input  logic                irsp_valid,
  input  logic [63:0]         irsp_data,
  // data memory side
  output logic                dreq_valid,
  input  logic                dreq_ready,
  output logic                dreq_we,
  output logic [3:0]          dreq_be,
  output word_t               dreq_addr,
  output word_t               dreq_wdata,
  input  logic                drsp_valid,
  input  word_t               drsp_rdata,
  // status
  output logic [NTHREAD-1:0]  halted,
  output perf_t               perf
);
  // ---------------------------------------------------------------- state
  logic [NPREG-1:0] ready, spec_ready;   // written / issuable
  logic [NTHREAD-1:0] flush;
  word_t [NTHREAD-1:0] flush_target;
  retire_t [NTHREAD-1:0][1:0] ret;
  logic [NTHREAD-1:0][NPREG-1:0] rob_free_mask;
  robidx_t [NTHREAD-1:0] rob_head;
  logic [NTHREAD-1:0][5:0] rob_count;
  logic [NTHREAD-1:0] rob_empty;

  // ---------------------------------------------------------------- IF
  logic fq_valid, fq_tid, fq_pop;
  word_t fq_pc;
  logic [1:0][31:0] fq_instr;
  logic [1:0] fq_vmask;
  logic id_redirect;
  word_t id_target;

  semp_fetch #(.RESET_PC0(RESET_PC0), .RESET_PC1(RESET_PC1)) u_fetch (
    .clk, .rst, .active({run && !halted[1], run && !halted[0]}),
    .ireq_valid, .ireq_ready, .ireq_addr, .irsp_valid, .irsp_data,
    .fq_valid, .fq_tid, .fq_pc, .fq_instr, .fq_vmask, .fq_pop,
    .id_redirect, .id_tid(fq_tid), .id_target, .flush, .flush_target);

  // ---------------------------------------------------------------- ID
  dec_t [1:0] dec_raw;
  logic [NTHREAD-1:0][1:0] bp_taken;
  logic [NTHREAD-1:0][1:0] bp_ghr;
  logic [NTHREAD-1:0][1:0] bp_push;
  logic [1:0][31:0] lk_pc;
  logic [1:0] slot_taken, slot_keep;
  word_t [1:0] slot_npc;
  logic id_fire;

  // ID/RN pipeline register
  logic       idrn_valid, idrn_tid;
  dec_t [1:0] idrn_d;
  word_t [1:0] idrn_npc;
  logic [1:0] idrn_ghr;
  logic       rn_fire;

  assign lk_pc[0] = fq_pc;
  assign lk_pc[1] = fq_pc + 32'd4;

  for (genvar k = 0; k < 2; k++) begin : g_dec
    semp_decode u_dec (.instr(fq_instr[k]), .pc(lk_pc[k]), .valid(fq_valid && fq_vmask[k]), .d(dec_raw[k]));
  end

  always_comb begin
    logic stop;
    stop = 1'b0;
    slot_keep = '0; slot_taken = '0; id_target = '0;
    for (int k = 0; k < 2; k++) begin
      slot_npc[k] = lk_pc[k] + 32'd4;
      if (dec_raw[k].valid && !stop) begin
        slot_keep[k] = 1'b1;
        if (dec_raw[k].is_jump || (dec_raw[k].is_cbr && bp_taken[fq_tid][k])) begin
          slot_taken[k] = 1'b1;
          slot_npc[k]   = dec_raw[k].target;
          id_target     = dec_raw[k].target;
          stop          = 1'b1;
        end
      end
    end
  end

  assign id_fire     = fq_valid && !flush[fq_tid] && (!idrn_valid || rn_fire || flush[idrn_tid]);
  assign fq_pop      = id_fire;
  assign id_redirect = id_fire && (slot_taken != 2'b00);

  for (genvar t = 0; t < NTHREAD; t++) begin : g_bp
    logic [1:0] upv, upt;
    logic [1:0][31:0] upc;
    logic [1:0][1:0]  ugh;
    always_comb
      for (int k = 0; k < 2; k++) begin
        upv[k] = ret[t][k].valid && ret[t][k].is_cbr;
        upt[k] = ret[t][k].taken;
        upc[k] = ret[t][k].pc;
        ugh[k] = ret[t][k].ghr;
        bp_push[t][k] = id_fire && fq_tid == t && slot_keep[k] && dec_raw[k].is_cbr;
      end
    semp_bpred u_bp (.clk, .rst, .lk_pc, .lk_taken(bp_taken[t]), .spec_ghr(bp_ghr[t]),
      .spec_push(bp_push[t]), .up_valid(upv), .up_pc(upc), .up_ghr(ugh), .up_taken(upt),
      .restore(flush[t]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idrn_valid <= 1'b0; idrn_tid <= 1'b0; idrn_d <= '0; idrn_npc <= '0; idrn_ghr <= '0;
    end else if (id_fire) begin
      idrn_valid <= 1'b1;
      idrn_tid   <= fq_tid;
      idrn_ghr   <= bp_ghr[fq_tid];
      if (!slot_keep[0]) begin   // only the second word is valid: move it to slot 0
        idrn_d[0]   <= dec_raw[1];
        idrn_npc[0] <= slot_npc[1];
        idrn_d[1]   <= '0;
        idrn_npc[1] <= '0;
      end else begin
        idrn_d[0]   <= dec_raw[0];
        idrn_npc[0] <= slot_npc[0];
        idrn_d[1]   <= slot_keep[1] ? dec_raw[1] : '0;
        idrn_npc[1] <= slot_npc[1];
      end
    end else if (rn_fire || (idrn_valid && flush[idrn_tid])) begin
      idrn_valid <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- RN
  preg_t [1:0] ps1, ps2, pd, old_pd, pd2, old_pd2;
  logic can_alloc;
  logic [6:0] free_count;
  logic [NTHREAD-1:0][3:0] iq_free;
  logic [3:0] maq_free;
  int n_rob, n_iq, n_maq;
  logic rn_ok;
  dec_t [1:0] rn_d;

  always_comb begin
    for (int k = 0; k < 2; k++) rn_d[k] = idrn_valid ? idrn_d[k] : '0;
    n_rob = 0; n_iq = 0; n_maq = 0;
    for (int k = 0; k < 2; k++)
      if (rn_d[k].valid) begin
        n_rob++;
        if (rn_d[k].fu == FU_SIMPLE || rn_d[k].fu == FU_COMPLEX) n_iq++;
        if (rn_d[k].fu == FU_MEM) n_maq++;
      end
  end

  assign rn_ok = idrn_valid && !flush[idrn_tid]
               && (int'(rob_count[idrn_tid]) + n_rob <= ROB_DEPTH)
               && (n_iq <= int'(iq_free[idrn_tid]))
               && (n_maq <= int'(maq_free))
               && can_alloc;
  assign rn_fire = rn_ok;

  semp_rename u_rn (.clk, .rst, .tid(idrn_tid), .d(rn_d), .fire(rn_fire),
    .ps1, .ps2, .pd, .old_pd, .pd2, .old_pd2, .can_alloc, .free_count,
    .ret, .flush, .free_mask(rob_free_mask[0] | rob_free_mask[1]));

  // dispatch
  rob_entry_t [1:0] disp_e;
  robidx_t [NTHREAD-1:0][1:0] disp_idx;
  uop_t [1:0] disp_u;
  logic [NTHREAD-1:0][1:0] rob_disp, iq_ins;
  logic [1:0] maq_ins;

  always_comb begin
    rob_disp = '0; iq_ins = '0; maq_ins = '0;
    for (int k = 0; k < 2; k++) begin
      disp_e[k]          = '0;
      disp_e[k].done     = (rn_d[k].fu == FU_NONE);
      disp_e[k].dst      = rn_d[k].dst;
      disp_e[k].has_dst  = rn_d[k].has_dst;
      disp_e[k].pd       = pd[k];
      disp_e[k].old_pd   = old_pd[k];
      disp_e[k].has_dst2 = rn_d[k].has_dst2;
      disp_e[k].pd2      = pd2[k];
      disp_e[k].old_pd2  = old_pd2[k];
      disp_e[k].is_cbr   = rn_d[k].is_cbr;
      disp_e[k].halt     = (rn_d[k].op == OP_HALT);
      disp_e[k].ghr      = idrn_ghr;
      disp_e[k].pc       = rn_d[k].pc;

      disp_u[k]          = '0;
      disp_u[k].valid    = rn_d[k].valid;
      disp_u[k].tid      = idrn_tid;
      disp_u[k].fu       = rn_d[k].fu;
      disp_u[k].op       = rn_d[k].op;
      disp_u[k].ps1      = ps1[k];
      disp_u[k].ps2      = ps2[k];
      disp_u[k].use1     = rn_d[k].use1;
      disp_u[k].use2     = rn_d[k].use2;
      disp_u[k].use_imm  = rn_d[k].use_imm;
      disp_u[k].imm      = rn_d[k].imm;
      disp_u[k].target   = rn_d[k].target;
      disp_u[k].pd       = pd[k];
      disp_u[k].has_dst  = rn_d[k].has_dst;
      disp_u[k].pd2      = pd2[k];
      disp_u[k].has_dst2 = rn_d[k].has_dst2;
      disp_u[k].rob      = disp_idx[idrn_tid][k];
      disp_u[k].msize    = rn_d[k].msize;
      disp_u[k].msigned  = rn_d[k].msigned;
      disp_u[k].pc       = rn_d[k].pc;
      disp_u[k].pred_npc = idrn_npc[k];

      if (rn_fire && rn_d[k].valid) begin
        rob_disp[idrn_tid][k] = 1'b1;
        if (rn_d[k].fu == FU_SIMPLE || rn_d[k].fu == FU_COMPLEX) iq_ins[idrn_tid][k] = 1'b1;
        if (rn_d[k].fu == FU_MEM) maq_ins[k] = 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- IW
  uop_t [NTHREAD-1:0][IQ_DEPTH-1:0] iq_ent;
  logic [NTHREAD-1:0][IQ_DEPTH-1:0] iq_valid, iq_ready, iq_clr;
  uop_t [1:0] sel_s;
  logic [1:0] sel_s_v;
  uop_t sel_c;
  logic sel_c_v;
  logic prio;
  logic cx_busy;
  logic rr_c_v, ex_c_v;

  for (genvar t = 0; t < NTHREAD; t++) begin : g_iq
    semp_issue_queue u_iq (.clk, .rst, .flush(flush[t]), .ins_valid(iq_ins[t]), .ins(disp_u),
      .rdy_vec(spec_ready), .issue_clr(iq_clr[t]), .ent(iq_ent[t]), .ent_valid(iq_valid[t]),
      .ent_ready(iq_ready[t]), .free_count(iq_free[t]));
  end

  semp_select u_sel (.prio, .ent(iq_ent), .ready(iq_ready),
    .complex_free(!cx_busy && !rr_c_v && !ex_c_v),
    .simple_uop(sel_s), .simple_valid(sel_s_v), .complex_uop(sel_c), .complex_valid(sel_c_v),
    .clr(iq_clr));

  // ---------------------------------------------------------------- RR
  uop_t [1:0] rr_s;
  logic [1:0] rr_s_v;
  uop_t       rr_c;
  preg_t [7:0] prf_ra;
  word_t [7:0] prf_rd;
  logic  [7:0] prf_fwd;
  logic  [3:0] prf_we;
  preg_t [3:0] prf_wa;
  word_t [3:0] prf_wd;

  assign prf_ra[0] = rr_s[0].ps1;
  assign prf_ra[1] = rr_s[0].ps2;
  assign prf_ra[2] = rr_s[1].ps1;
  assign prf_ra[3] = rr_s[1].ps2;
  assign prf_ra[4] = rr_c.ps1;
  assign prf_ra[5] = rr_c.ps2;

  semp_prf #(.NRD(8), .NWR(4)) u_prf (.clk, .rst, .raddr(prf_ra), .rdata(prf_rd), .rfwd(prf_fwd),
    .we(prf_we), .waddr(prf_wa), .wdata(prf_wd));

  // ---------------------------------------------------------------- EX
  uop_t [1:0]  ex_s;
  logic [1:0]  ex_s_v;
  word_t [1:0] ex_a, ex_b;
  uop_t        ex_c;
  word_t       ex_ca, ex_cb;
  // RW registers of the simple ALUs
  logic [1:0]  rw_v;
  uop_t [1:0]  rw_u;
  word_t [1:0] rw_res, rw_npc;
  logic [1:0]  rw_tk, rw_mp;

  function automatic word_t bypass(input preg_t p, input word_t v,
                                   input logic [1:0] bv, input uop_t [1:0] bu, input word_t [1:0] br);
    word_t r;
    r = v;
    for (int j = 0; j < 2; j++) if (bv[j] && bu[j].has_dst && bu[j].pd == p) r = br[j];
    return r;
  endfunction

  function automatic logic hit(input preg_t p, input logic use_it,
                               input logic [1:0] bv, input uop_t [1:0] bu);
    logic h;
    h = 1'b0;
    for (int j = 0; j < 2; j++) if (use_it && bv[j] && bu[j].has_dst && bu[j].pd == p) h = 1'b1;
    return h;
  endfunction

  word_t [1:0] alu_a, alu_b, alu_res, alu_npc;
  logic  [1:0] alu_tk, alu_mp;
  word_t cx_a, cx_b;
  logic  ex_bypass;

  always_comb begin
    ex_bypass = 1'b0;
    for (int k = 0; k < 2; k++) begin
      alu_a[k] = bypass(ex_s[k].ps1, ex_a[k], rw_v, rw_u, rw_res);
      alu_b[k] = ex_s[k].use_imm ? ex_s[k].imm : bypass(ex_s[k].ps2, ex_b[k], rw_v, rw_u, rw_res);
      if (ex_s_v[k] && (hit(ex_s[k].ps1, ex_s[k].use1, rw_v, rw_u) || hit(ex_s[k].ps2, ex_s[k].use2, rw_v, rw_u)))
        ex_bypass = 1'b1;
    end
    cx_a = bypass(ex_c.ps1, ex_ca, rw_v, rw_u, rw_res);
    cx_b = bypass(ex_c.ps2, ex_cb, rw_v, rw_u, rw_res);
    if (ex_c_v && (hit(ex_c.ps1, ex_c.use1, rw_v, rw_u) || hit(ex_c.ps2, ex_c.use2, rw_v, rw_u)))
      ex_bypass = 1'b1;
  end

  for (genvar k = 0; k < 2; k++) begin : g_alu
    semp_simple_alu u_alu (.op(ex_s[k].op), .a(alu_a[k]), .b(alu_b[k]), .pc(ex_s[k].pc),
      .target(ex_s[k].target), .pred_npc(ex_s[k].pred_npc), .result(alu_res[k]),
      .taken(alu_tk[k]), .npc(alu_npc[k]), .mispred(alu_mp[k]));
  end

  // complex ALU
  uop_t  cx_u;
  logic  cx_wr_lo, cx_wr_hi;
  word_t cx_res;
  logic  cx_kill;
  assign cx_kill = flush[cx_u.tid] && cx_busy;

  semp_complex_alu u_cx (.clk, .rst, .start(ex_c_v && !flush[ex_c.tid]), .op(ex_c.op),
    .a(cx_a), .b(cx_b), .kill(cx_kill), .busy(cx_busy), .wr_lo(cx_wr_lo), .wr_hi(cx_wr_hi),
    .result(cx_res));

  // ---------------------------------------------------------------- LSU
  logic lsu_wr;
  preg_t lsu_pd;
  word_t lsu_wd;
  cmpl_t lsu_cmpl;
  logic lsu_wait;

  semp_lsu u_lsu (.clk, .rst, .ins_valid(maq_ins), .ins(disp_u), .free_count(maq_free),
    .flush, .rob_head, .rdy_vec(ready), .raddr(prf_ra[7:6]), .rdata(prf_rd[7:6]),
    .dreq_valid, .dreq_ready, .dreq_we, .dreq_be, .dreq_addr, .dreq_wdata,
    .drsp_valid, .drsp_rdata, .wr_en(lsu_wr), .wr_pd(lsu_pd), .wr_data(lsu_wd),
    .cmpl(lsu_cmpl), .waiting(lsu_wait));

  // ---------------------------------------------------------------- RW
  cmpl_t [3:0] cmpl;
  always_comb begin
    for (int k = 0; k < 2; k++) begin
      prf_we[k] = rw_v[k] && rw_u[k].has_dst && !flush[rw_u[k].tid];
      prf_wa[k] = rw_u[k].pd;
      prf_wd[k] = rw_res[k];
      cmpl[k]         = '0;
      cmpl[k].valid   = rw_v[k] && !flush[rw_u[k].tid];
      cmpl[k].tid     = rw_u[k].tid;
      cmpl[k].rob     = rw_u[k].rob;
      cmpl[k].taken   = rw_tk[k];
      cmpl[k].mispred = rw_mp[k];
      cmpl[k].npc     = rw_npc[k];
    end
    prf_we[2] = (cx_wr_lo || cx_wr_hi) && !flush[cx_u.tid];
    prf_wa[2] = cx_wr_hi ? cx_u.pd2 : cx_u.pd;
    prf_wd[2] = cx_res;
    cmpl[2]       = '0;
    cmpl[2].valid = cx_wr_hi && !flush[cx_u.tid];
    cmpl[2].tid   = cx_u.tid;
    cmpl[2].rob   = cx_u.rob;
    cmpl[2].npc   = cx_u.pc + 32'd4;
    prf_we[3] = lsu_wr;
    prf_wa[3] = lsu_pd;
    prf_wd[3] = lsu_wd;
    cmpl[3]   = lsu_cmpl;
  end

  // ---------------------------------------------------------------- RT
  for (genvar t = 0; t < NTHREAD; t++) begin : g_rob
    semp_rob #(.TID(t[0])) u_rob (.clk, .rst, .disp_valid(rob_disp[t]), .disp(disp_e),
      .disp_idx(disp_idx[t]), .count(rob_count[t]), .cmpl, .ret(ret[t]), .flush(flush[t]),
      .free_mask(rob_free_mask[t]), .head_idx(rob_head[t]), .empty(rob_empty[t]));
    always_comb begin
      flush_target[t] = ret[t][0].npc;
      if (ret[t][1].valid && ret[t][1].flush) flush_target[t] = ret[t][1].npc;
    end
  end

  // ---------------------------------------------------------------- pipeline registers
  always_ff @(posedge clk) begin
    if (rst) begin
      rr_s <= '0; rr_s_v <= '0; rr_c <= '0; rr_c_v <= 1'b0;
      ex_s <= '0; ex_s_v <= '0; ex_a <= '0; ex_b <= '0;
      ex_c <= '0; ex_c_v <= 1'b0; ex_ca <= '0; ex_cb <= '0;
      rw_v <= '0; rw_u <= '0; rw_res <= '0; rw_npc <= '0; rw_tk <= '0; rw_mp <= '0;
      cx_u <= '0;
      prio <= 1'b0;
      halted <= '0;
      ready <= '1; spec_ready <= '1;
    end else begin
      prio <= !prio;
      // IW -> RR
      for (int k = 0; k < 2; k++) begin
        rr_s[k]   <= sel_s[k];
        rr_s_v[k] <= sel_s_v[k] && !flush[sel_s[k].tid];
      end
      rr_c   <= sel_c;
      rr_c_v <= sel_c_v && !flush[sel_c.tid];
      // RR -> EX
      for (int k = 0; k < 2; k++) begin
        ex_s[k]   <= rr_s[k];
        ex_s_v[k] <= rr_s_v[k] && !flush[rr_s[k].tid];
        ex_a[k]   <= prf_rd[2*k];
        ex_b[k]   <= prf_rd[2*k+1];
      end
      ex_c   <= rr_c;
      ex_c_v <= rr_c_v && !flush[rr_c.tid];
      ex_ca  <= prf_rd[4];
      ex_cb  <= prf_rd[5];
      // EX -> RW
      for (int k = 0; k < 2; k++) begin
        rw_v[k]   <= ex_s_v[k] && !flush[ex_s[k].tid];
        rw_u[k]   <= ex_s[k];
        rw_res[k] <= alu_res[k];
        rw_npc[k] <= alu_npc[k];
        rw_tk[k]  <= alu_tk[k];
        rw_mp[k]  <= alu_mp[k];
      end
      if (ex_c_v) cx_u <= ex_c;

      // scoreboards
      for (int k = 0; k < 2; k++)
        if (sel_s_v[k] && sel_s[k].has_dst) spec_ready[sel_s[k].pd] <= 1'b1;
      for (int w = 0; w < 4; w++)
        if (prf_we[w]) begin
          ready[prf_wa[w]]      <= 1'b1;
          spec_ready[prf_wa[w]] <= 1'b1;
        end
      if (rn_fire)
        for (int k = 0; k < 2; k++) begin
          if (rn_d[k].valid && rn_d[k].has_dst)  begin ready[pd[k]]  <= 1'b0; spec_ready[pd[k]]  <= 1'b0; end
          if (rn_d[k].valid && rn_d[k].has_dst2) begin ready[pd2[k]] <= 1'b0; spec_ready[pd2[k]] <= 1'b0; end
        end

      for (int t = 0; t < NTHREAD; t++)
        for (int k = 0; k < 2; k++)
          if (ret[t][k].valid && ret[t][k].halt) halted[t] <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- events
  always_comb begin
    perf = '0;
    for (int t = 0; t < NTHREAD; t++)
      perf.retired[t] = ret[t][0].valid;
    perf.flush        = |flush;
    perf.id_redirect  = id_redirect;
    perf.rename_stall = idrn_valid && !rn_ok && !flush[idrn_tid];
    perf.bypass       = ex_bypass || (|(prf_fwd[5:0] & {rr_c_v & rr_c.use2, rr_c_v & rr_c.use1,
                          rr_s_v[1] & rr_s[1].use2, rr_s_v[1] & rr_s[1].use1,
                          rr_s_v[0] & rr_s[0].use2, rr_s_v[0] & rr_s[0].use1}));
    perf.dual_thread_issue = (|(iq_clr[0])) && (|(iq_clr[1]));
    perf.complex_busy = cx_busy;
    perf.lsu_wait     = lsu_wait;
  end
endmodule
