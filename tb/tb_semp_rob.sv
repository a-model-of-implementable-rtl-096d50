// tb_semp_rob: dispatches numbered instructions into a reorder buffer,
// completes them in random order (some mispredicted, some halts), and checks
// that they retire in program order, at most two per cycle, only when
// complete, that a mispredict or halt is the last to retire and squashes the
// rest (free_mask = their registers), and that the count stays right.
module tb_semp_rob;
  import semp_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] dv; rob_entry_t [1:0] de; robidx_t [1:0] di; logic [5:0] cnt;
  cmpl_t [3:0] cm; retire_t [1:0] ret; logic flush; logic [NPREG-1:0] fm; robidx_t head; logic empty;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  semp_rob #(.TID(1'b1)) dut (.clk, .rst, .disp_valid(dv), .disp(de), .disp_idx(di), .count(cnt), .cmpl(cm),
    .ret, .flush, .free_mask(fm), .head_idx(head), .empty);
  typedef struct { int seq; robidx_t idx; int pd; bit done; bit mp; bit halt; } e_t;
  e_t q [$];
  int seq = 0, next_ret = 0, nret_total = 0, nflush = 0;
  function automatic void chk(input bit ok, input string s); checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end endfunction
  initial begin
    dv = 0; de = '0; cm = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 5000; n++) begin
      int nd;
      @(negedge clk);
      dv = 0; cm = '0;
      nd = $urandom_range(0, 2);
      if (q.size() + nd > ROB_DEPTH) nd = ROB_DEPTH - q.size();
      for (int k = 0; k < nd; k++) begin
        dv[k] = 1; de[k] = '0; de[k].pc = 32'(seq + k) << 2; de[k].has_dst = 1; de[k].pd = preg_t'((seq + k) % NPREG);
        de[k].halt = ($urandom_range(0, 60) == 0); de[k].done = de[k].halt;
      end
      // complete up to four random incomplete entries
      for (int c = 0; c < 4; c++) if (q.size() > 0) begin
        int j; j = $urandom_range(0, q.size()-1);
        if (!q[j].done) begin
          cm[c].valid = 1; cm[c].tid = 1; cm[c].rob = q[j].idx;
          cm[c].mispred = ($urandom_range(0, 30) == 0); cm[c].npc = 32'h40;
          q[j].done = 1; q[j].mp = cm[c].mispred;
        end
      end
      // a completion for the other thread is ignored
      if (q.size() > 0 && !q[0].done && cm[3].valid == 0) begin cm[3].valid = 1; cm[3].tid = 0; cm[3].rob = q[0].idx; end
      #1;
      chk(cnt == 6'(q.size()), "count");
      // expected retirement (completions land at the edge: only previously done entries retire)
      begin
        int exp_n; bit fl; logic [NPREG-1:0] efm;
        exp_n = 0; fl = 0; efm = '0;
        for (int k = 0; k < 2; k++)
          if (!fl && q.size() > k && exp_n == k && q[k].done && !(cm[0].valid && cm[0].rob == q[k].idx) &&
              !(cm[1].valid && cm[1].rob == q[k].idx) && !(cm[2].valid && cm[2].rob == q[k].idx) &&
              !(cm[3].valid && cm[3].tid && cm[3].rob == q[k].idx)) begin
            exp_n++; fl = q[k].mp || q[k].halt;
          end
        if (fl) for (int j = exp_n; j < q.size(); j++) efm[q[j].pd] = 1;
        for (int k = 0; k < 2; k++) begin
          chk(ret[k].valid == (k < exp_n), $sformatf("retire slot %0d valid", k));
          if (k < exp_n) chk(ret[k].pc == 32'(q[k].seq) << 2, "retire order");
        end
        chk(flush == fl, "flush");
        chk(fm == efm, "free mask");
        for (int k = 0; k < nd; k++) begin
          e_t x; x.seq = seq + k; x.idx = di[k]; x.pd = (seq + k) % NPREG; x.done = de[k].halt; x.mp = 0; x.halt = de[k].halt;
          q.push_back(x);
        end
        seq += nd;
        // completions that came this cycle for entries retiring now were excluded above
        for (int k = 0; k < exp_n; k++) void'(q.pop_front());
        nret_total += exp_n;
        if (fl) begin q.delete(); nflush++; end
      end
      @(posedge clk);
      #1 if (flush === 1'b0 && 0) ;
    end
    chk(nret_total > 1000 && nflush > 10, "enough retirements and flushes");
    $display("retired %0d, flushes %0d", nret_total, nflush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
