// tb_semp_issue_queue: two issue queues and the shared selector. Random
// micro-ops are inserted, register ready bits change at random, and the
// selector's picks are removed. Checked against a model kept here: entry
// contents and count, readiness (wakeup), that picks are ready, of the right
// unit class, at most two simple and one complex per cycle, taken from the
// preferred thread first, and that flush empties a queue.
module tb_semp_issue_queue;
  import semp_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] flush; logic [1:0][1:0] insv; uop_t [1:0] ins;
  logic [NPREG-1:0] rdy;
  uop_t [1:0][IQ_DEPTH-1:0] ent; logic [1:0][IQ_DEPTH-1:0] ev, er, clr;
  logic [1:0][3:0] fc;
  logic prio, cfree; uop_t [1:0] su; logic [1:0] sv; uop_t cu; logic cv;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  for (genvar t = 0; t < 2; t++) begin : g
    semp_issue_queue dut (.clk, .rst, .flush(flush[t]), .ins_valid(insv[t]), .ins, .rdy_vec(rdy),
      .issue_clr(clr[t]), .ent(ent[t]), .ent_valid(ev[t]), .ent_ready(er[t]), .free_count(fc[t]));
  end
  semp_select sel (.prio, .ent, .ready(er), .complex_free(cfree), .simple_uop(su), .simple_valid(sv),
    .complex_uop(cu), .complex_valid(cv), .clr);
  int cnt [2];
  function automatic void chk(input bit ok, input string s); checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end endfunction
  initial begin
    int n_issued; n_issued = 0;
    cnt[0] = 0; cnt[1] = 0;
    flush = 0; insv = '0; ins = '0; rdy = '0; prio = 0; cfree = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 4000; n++) begin
      int t, ns, nc;
      @(negedge clk);
      flush = 0; insv = '0;
      t = $urandom_range(0, 1);
      for (int k = 0; k < 2; k++) begin
        ins[k] = '0; ins[k].valid = 1; ins[k].tid = 1'(t);
        ins[k].fu = ($urandom_range(0, 3) == 0) ? FU_COMPLEX : FU_SIMPLE;
        ins[k].ps1 = preg_t'($urandom_range(0, NPREG-1)); ins[k].ps2 = preg_t'($urandom_range(0, NPREG-1));
        ins[k].use1 = $urandom_range(0, 1); ins[k].use2 = $urandom_range(0, 1);
        ins[k].pc = $urandom;
      end
      for (int k = 0; k < 2; k++) if (cnt[t] + k < IQ_DEPTH && $urandom_range(0, 2) != 0 && (k == 0 || insv[t][0])) insv[t][k] = 1;
      for (int i = 0; i < 6; i++) rdy[$urandom_range(0, NPREG-1)] = $urandom_range(0, 1);
      prio = $urandom_range(0, 1); cfree = $urandom_range(0, 1);
      #1;
      // readiness and selection rules
      ns = 0; nc = 0;
      for (int q = 0; q < 2; q++) begin
        int v; v = 0;
        for (int i = 0; i < IQ_DEPTH; i++) begin
          v += ev[q][i];
          chk(er[q][i] == (ev[q][i] && (!ent[q][i].use1 || rdy[ent[q][i].ps1]) && (!ent[q][i].use2 || rdy[ent[q][i].ps2])), "wakeup");
          if (clr[q][i]) begin
            chk(er[q][i], "picked entry is ready");
            if (ent[q][i].fu == FU_COMPLEX) nc++; else ns++;
          end
        end
        chk(v == cnt[q] && fc[q] == 4'(IQ_DEPTH - cnt[q]), "occupancy");
      end
      chk(ns <= 2 && nc <= (cfree ? 1 : 0), "issue width");
      chk(ns == int'(sv[0]) + int'(sv[1]) && nc == int'(cv), "valid flags match picks");
      // a ready simple entry of the preferred thread is never passed over for the other thread
      begin
        int rp; rp = 0;
        for (int i = 0; i < IQ_DEPTH; i++) if (er[prio][i] && ent[prio][i].fu != FU_COMPLEX) rp++;
        if (rp >= 2) chk(!(|clr[!prio] & sv[1] & (su[1].tid != prio)), "priority to preferred thread");
      end
      n_issued += ns + nc;
      @(posedge clk);
      for (int q = 0; q < 2; q++) cnt[q] = cnt[q] - $countones(clr[q]) + int'(insv[q][0]) + int'(insv[q][1]);
      if ($urandom_range(0, 50) == 0) begin
        int c1;
        @(negedge clk); insv = '0; flush = 2'b01; cfree = 0; rdy = '0; #1;
        c1 = $countones(clr[1]);
        @(posedge clk);
        cnt[1] = cnt[1] - c1;
        #1 chk(ev[0] == '0, "flush empties queue");
        cnt[0] = 0;
      end
    end
    chk(n_issued > 1000, "issued enough");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
