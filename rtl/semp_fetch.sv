// semp_fetch: program counters, fetch selector and fetch queue (IF stage).
//
// Each thread has its own program counter (PC #0, PC #1). Every cycle the
// fetch selector picks one active thread, alternating between threads, and
// sends the aligned 8-byte address to the instruction cache, which returns
// two instructions; a PC that points at the second word of the pair fetches
// only that word. Returned groups go into a two-entry fetch queue read by
// the decode stage. At most one fetch is outstanding; a new fetch is sent
// only when the queue will have room for its group, so the queue never
// overflows and a cache hit sustains one group per cycle.
//
// Redirects: id_redirect (a predicted-taken branch or a jump found at decode)
// moves the thread's PC and discards that thread's younger groups and its
// outstanding fetch; flush (a mispredict or halt at retirement) does the same
// for everything of the thread, including the queue head. A thread with
// active low is not fetched. The two PCs and the selector come from the
// processor's block diagram; round-robin selection, the two-instruction
// fetch and the queue are this design's choices.
module semp_fetch
  import semp_pkg::*;
#(
  parameter logic [31:0] RESET_PC0 = 32'h0000_0000,
  parameter logic [31:0] RESET_PC1 = 32'h0000_1000,
  parameter int unsigned FQD       = 2
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [NTHREAD-1:0]         active,
  // instruction cache
  output logic                       ireq_valid,
  input  logic                       ireq_ready,
  output word_t                      ireq_addr,
  input  logic                       irsp_valid,
  input  logic [63:0]                irsp_data,
  // fetch queue head
  output logic                       fq_valid,
  output logic                       fq_tid,
  output word_t                      fq_pc,      // address of slot 0
  output logic [1:0][31:0]           fq_instr,
  output logic [1:0]                 fq_vmask,
  input  logic                       fq_pop,
  // redirects
  input  logic                       id_redirect,
  input  logic                       id_tid,
  input  word_t                      id_target,
  input  logic [NTHREAD-1:0]         flush,
  input  word_t [NTHREAD-1:0]        flush_target
);
  typedef struct packed {
    logic        tid;
    word_t       pc;
    logic [63:0] instr;
    logic [1:0]  vmask;
  } grp_t;

  word_t  pc [NTHREAD];
  grp_t   fq [FQD];
  logic [FQD-1:0] fqv;
  logic   inf, inf_tid, inf_kill;
  word_t  inf_pc;
  logic   rr;
  logic   sel_ok, sel_tid;
  logic   issue;
  grp_t   nq [FQD];
  logic [FQD-1:0] nqv;
  int unsigned ncnt;

  function automatic logic killed(input logic t, input logic incl_head_ok);
    killed = flush[t] || (incl_head_ok && id_redirect && id_tid == t);
  endfunction

  assign fq_valid = fqv[0];
  assign fq_tid   = fq[0].tid;
  assign fq_pc    = fq[0].pc;
  assign fq_instr[0] = fq[0].instr[63:32];
  assign fq_instr[1] = fq[0].instr[31:0];
  assign fq_vmask = fq[0].vmask;

  // next queue contents: pop, drop killed groups, append the arriving group
  always_comb begin
    int n;
    n = 0;
    for (int i = 0; i < FQD; i++) begin nq[i] = '0; nqv[i] = 1'b0; end
    for (int i = 0; i < FQD; i++)
      if (fqv[i] && !(i == 0 && fq_pop) && !killed(fq[i].tid, 1'b1)) begin
        nq[n] = fq[i]; nqv[n] = 1'b1; n++;
      end
    if (inf && irsp_valid && !inf_kill && !killed(inf_tid, 1'b1) && n < FQD) begin
      nq[n].tid   = inf_tid;
      nq[n].pc    = {inf_pc[31:3], 3'b000};
      nq[n].instr = irsp_data;
      nq[n].vmask = inf_pc[2] ? 2'b10 : 2'b11;
      nqv[n]      = 1'b1;
      n++;
    end
    ncnt = n;
  end

  // fetch selector
  always_comb begin
    logic t;
    sel_ok = 1'b0; sel_tid = 1'b0;
    for (int k = 0; k < NTHREAD; k++) begin
      t = (k == 0) ? rr : !rr;
      if (!sel_ok && active[t] && !killed(t, 1'b1)) begin
        sel_ok = 1'b1; sel_tid = t;
      end
    end
  end

  assign ireq_valid = sel_ok && (!inf || irsp_valid) && (ncnt < FQD);
  assign ireq_addr  = {pc[sel_tid][31:3], 3'b000};
  assign issue      = ireq_valid && ireq_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc[0] <= RESET_PC0;
      pc[1] <= RESET_PC1;
      for (int i = 0; i < FQD; i++) fq[i] <= '0;
      fqv <= '0;
      inf <= 1'b0; inf_tid <= 1'b0; inf_kill <= 1'b0; inf_pc <= '0;
      rr <= 1'b0;
    end else begin
      for (int i = 0; i < FQD; i++) fq[i] <= nq[i];
      fqv <= nqv;
      if (inf && (irsp_valid)) inf <= 1'b0;
      if (inf && killed(inf_tid, 1'b1)) inf_kill <= 1'b1;
      if (issue) begin
        inf      <= 1'b1;
        inf_tid  <= sel_tid;
        inf_pc   <= pc[sel_tid];
        inf_kill <= 1'b0;
        pc[sel_tid] <= {pc[sel_tid][31:3], 3'b000} + 32'd8;
        rr <= !sel_tid;
      end
      if (id_redirect) pc[id_tid] <= id_target;
      for (int t = 0; t < NTHREAD; t++)
        if (flush[t]) pc[t] <= flush_target[t];
    end
  end
endmodule
