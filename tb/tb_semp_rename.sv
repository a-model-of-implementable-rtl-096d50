// tb_semp_rename: drives random rename groups, in-order retirement and
// flushes for both threads and compares source mappings, previous mappings,
// allocated registers (lowest free first), the free count and map recovery
// with a reference model kept here.
module tb_semp_rename;
  import semp_pkg::*;
  logic clk = 0, rst = 1;
  logic tid; dec_t [1:0] d; logic fire;
  preg_t [1:0] ps1, ps2, pd, opd, pd2, opd2; logic can; logic [6:0] fc;
  retire_t [1:0][1:0] ret; logic [1:0] flush; logic [NPREG-1:0] fmask;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  semp_rename dut (.clk, .rst, .tid, .d, .fire, .ps1, .ps2, .pd, .old_pd(opd), .pd2, .old_pd2(opd2),
    .can_alloc(can), .free_count(fc), .ret, .flush, .free_mask(fmask));

  int spec [2][NARCH], arch [2][NARCH];
  bit freed [NPREG];
  typedef struct { int dst; int pd; int opd; } inst_t;
  inst_t fl [2][$];
  function automatic void chk(input bit ok, input string s); checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end endfunction
  function automatic int lowest_free(input int skip);
    for (int i = 0; i < NPREG; i++) if (freed[i] && i != skip) return i;
    return -1;
  endfunction
  function automatic int nfree();
    int n; n = 0; foreach (freed[i]) n += freed[i]; return n;
  endfunction

  initial begin
    for (int t = 0; t < 2; t++) for (int r = 0; r < NARCH; r++) begin spec[t][r] = t*NARCH + r; arch[t][r] = t*NARCH + r; end
    for (int i = 0; i < NPREG; i++) freed[i] = (i >= 68);
    d = '0; fire = 0; ret = '0; flush = 0; fmask = '0; tid = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      int s1, s2, ds, l0, l1;
      @(negedge clk);
      d = '0; ret = '0; flush = 0; fmask = '0; fire = 0;
      tid = 1'($urandom_range(0, 1));
      for (int k = 0; k < 2; k++) begin
        d[k].valid = (k == 0) || $urandom_range(0, 1);
        d[k].src1 = areg_t'($urandom_range(0, 33)); d[k].src2 = areg_t'($urandom_range(0, 33));
        d[k].dst = areg_t'($urandom_range(1, 33)); d[k].has_dst = $urandom_range(0, 3) != 0;
      end
      // retire: oldest in-flight instructions of a random thread
      begin
        int rt; rt = $urandom_range(0, 1);
        if (rt == tid) rt = 1 - rt;   // keep retirement on the other thread this cycle
        for (int k = 0; k < 2; k++)
          if (fl[rt].size() > k && $urandom_range(0, 1)) begin
            if (k == 1 && !ret[rt][0].valid) break;
            ret[rt][k].valid = 1; ret[rt][k].has_dst = 1;
            ret[rt][k].dst = areg_t'(fl[rt][k].dst); ret[rt][k].pd = preg_t'(fl[rt][k].pd); ret[rt][k].old_pd = preg_t'(fl[rt][k].opd);
          end
      end
      #1;
      // expected renaming
      l0 = lowest_free(-1); l1 = lowest_free(l0);
      begin
        int a; a = 0;
        for (int k = 0; k < 2; k++) begin
          int m1, m2, mo;
          m1 = spec[tid][d[k].src1]; m2 = spec[tid][d[k].src2]; mo = spec[tid][d[k].dst];
          if (k == 1 && d[0].valid && d[0].has_dst) begin
            if (d[1].src1 == d[0].dst) m1 = pd[0];
            if (d[1].src2 == d[0].dst) m2 = pd[0];
            if (d[1].dst == d[0].dst) mo = pd[0];
          end
          if (d[k].valid) begin
            chk(ps1[k] == m1 && ps2[k] == m2, $sformatf("sources slot %0d", k));
            if (d[k].has_dst) begin
              chk(opd[k] == mo, "previous mapping");
              if (((a == 0) ? l0 : l1) >= 0) chk(pd[k] == ((a == 0) ? l0 : l1), $sformatf("allocation slot %0d got %0d want %0d", k, pd[k], (a == 0) ? l0 : l1));
              a++;
            end
          end
        end
        chk(can == (nfree() >= a), "can_alloc");
        chk(fc == nfree(), "free count");
        fire = can && $urandom_range(0, 3) != 0;
        #1;
      end
      @(posedge clk);
      for (int t = 0; t < 2; t++) for (int k = 0; k < 2; k++) if (ret[t][k].valid) begin
        arch[t][ret[t][k].dst] = ret[t][k].pd; freed[ret[t][k].old_pd] = 1; void'(fl[t].pop_front());
      end
      if (fire) for (int k = 0; k < 2; k++) if (d[k].valid && d[k].has_dst) begin
        inst_t x; x.dst = d[k].dst; x.pd = pd[k]; x.opd = opd[k];
        spec[tid][d[k].dst] = pd[k]; freed[pd[k]] = 0; fl[tid].push_back(x);
      end
      // occasional flush of one thread with all its in-flight registers
      if ($urandom_range(0, 40) == 0) begin
        int ft; ft = $urandom_range(0, 1);
        @(negedge clk);
        d = '0; fire = 0; ret = '0; flush = 0; fmask = '0;
        flush[ft] = 1;
        foreach (fl[ft][i]) fmask[fl[ft][i].pd] = 1;
        @(posedge clk);
        foreach (fl[ft][i]) freed[fl[ft][i].pd] = 1;
        fl[ft].delete();
        for (int r = 0; r < NARCH; r++) spec[ft][r] = arch[ft][r];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
