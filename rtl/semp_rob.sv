// semp_rob: reorder buffer of one hardware thread (RT1/RT2 stages).
//
// A 24-entry circular buffer, as in the processor's resource table; each
// thread has its own, the reorder buffer being one of the per-thread
// resources. Up to two instructions are written in program order at dispatch
// (disp_valid), results arrive out of order on NCMPL completion ports (only
// those tagged with this thread are taken), and up to two completed
// instructions leave from the head per cycle, in order. A retiring conditional
// branch or jump that was mispredicted, or a halt, is the last instruction to
// leave in its cycle and squashes everything behind it: the buffer empties on
// the next edge and free_mask names the physical registers the squashed
// instructions had allocated, so the rename stage can return them.
//
// Retirement here is a single stage; the two-stage retire of the original
// pipeline (RT1, RT2) is folded into one cycle. That and the entry format are
// this design's choices.
module semp_rob
  import semp_pkg::*;
#(
  parameter int unsigned DEPTH = ROB_DEPTH,
  parameter int unsigned NCMPL = 4,
  parameter bit          TID   = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst,
  // dispatch
  input  logic [1:0]            disp_valid,   // slot 1 only with slot 0
  input  rob_entry_t [1:0]      disp,
  output robidx_t [1:0]         disp_idx,
  output logic [5:0]            count,
  // completion
  input  cmpl_t [NCMPL-1:0]     cmpl,
  // retirement
  output retire_t [1:0]         ret,
  output logic                  flush,
  output logic [NPREG-1:0]      free_mask,
  output robidx_t               head_idx,
  output logic                  empty
);
  rob_entry_t  e   [DEPTH];
  logic        v   [DEPTH];
  logic        tk  [DEPTH];
  logic        mp  [DEPTH];
  word_t       np  [DEPTH];
  robidx_t     head, tail;
  logic [5:0]  cnt;
  logic [1:0]  nret;

  function automatic robidx_t inc(input robidx_t i, input int unsigned n);
    int unsigned s;
    s = int'(i) + n;
    if (s >= DEPTH) s = s - DEPTH;
    return robidx_t'(s);
  endfunction

  assign count    = cnt;
  assign head_idx = head;
  assign empty    = (cnt == 0);
  assign disp_idx[0] = tail;
  assign disp_idx[1] = inc(tail, 1);

  // retirement selection
  always_comb begin
    robidx_t h;
    ret   = '0;
    nret  = '0;
    flush = 1'b0;
    for (int k = 0; k < 2; k++) begin
      h = inc(head, k);
      if (!flush && nret == 2'(k) && v[h] && e[h].done) begin
        ret[k].valid    = 1'b1;
        ret[k].dst      = e[h].dst;
        ret[k].has_dst  = e[h].has_dst;
        ret[k].pd       = e[h].pd;
        ret[k].old_pd   = e[h].old_pd;
        ret[k].has_dst2 = e[h].has_dst2;
        ret[k].pd2      = e[h].pd2;
        ret[k].old_pd2  = e[h].old_pd2;
        ret[k].is_cbr   = e[h].is_cbr;
        ret[k].taken    = tk[h];
        ret[k].ghr      = e[h].ghr;
        ret[k].pc       = e[h].pc;
        ret[k].halt     = e[h].halt;
        ret[k].flush    = mp[h] || e[h].halt;
        ret[k].npc      = np[h];
        flush           = ret[k].flush;
        nret            = nret + 2'd1;
      end
    end
  end

  // registers held by the instructions a flush squashes
  always_comb begin
    logic retiring;
    free_mask = '0;
    retiring  = 1'b0;
    if (flush)
      for (int i = 0; i < DEPTH; i++) begin
        retiring = (robidx_t'(i) == head) || (nret == 2'd2 && robidx_t'(i) == inc(head, 1));
        if (v[i] && !retiring) begin
          if (e[i].has_dst)  free_mask[e[i].pd]  = 1'b1;
          if (e[i].has_dst2) free_mask[e[i].pd2] = 1'b1;
        end
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      head <= '0; tail <= '0; cnt <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        v[i] <= 1'b0; e[i] <= '0; tk[i] <= 1'b0; mp[i] <= 1'b0; np[i] <= '0;
      end
    end else if (flush) begin
      head <= '0; tail <= '0; cnt <= '0;
      for (int i = 0; i < DEPTH; i++) v[i] <= 1'b0;
    end else begin
      for (int c = 0; c < NCMPL; c++)
        if (cmpl[c].valid && cmpl[c].tid == TID && v[cmpl[c].rob]) begin
          e[cmpl[c].rob].done <= 1'b1;
          tk[cmpl[c].rob] <= cmpl[c].taken;
          mp[cmpl[c].rob] <= cmpl[c].mispred;
          np[cmpl[c].rob] <= cmpl[c].npc;
        end
      for (int k = 0; k < 2; k++)
        if (ret[k].valid) v[inc(head, k)] <= 1'b0;
      for (int k = 0; k < 2; k++)
        if (disp_valid[k]) begin
          v[inc(tail, k)]  <= 1'b1;
          e[inc(tail, k)]  <= disp[k];
          tk[inc(tail, k)] <= 1'b0;
          mp[inc(tail, k)] <= 1'b0;
          np[inc(tail, k)] <= disp[k].pc + 32'd4;
        end
      head <= inc(head, int'(nret));
      tail <= inc(tail, int'(disp_valid[0]) + int'(disp_valid[1]));
      cnt  <= cnt + 6'(disp_valid[0]) + 6'(disp_valid[1]) - 6'(nret);
    end
  end

  // dispatch never overruns the buffer
  assert property (@(posedge clk) disable iff (rst)
    (32'(cnt) + 32'(disp_valid[0]) + 32'(disp_valid[1]) <= DEPTH));
endmodule
