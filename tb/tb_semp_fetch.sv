// tb_semp_fetch: program counters, fetch selector and fetch queue.
// The instruction memory model returns each word's own address as its
// contents, refuses requests and delays answers at random. A reference
// program counter per thread checks every group the decode side takes:
// thread, address, valid-slot mask and both instructions, across decode
// redirects (taken together with the redirecting group), retirement flushes
// and threads switched off. A final phase with an always-ready one-cycle
// memory checks the rate (one group per cycle) and that the selector
// alternates between the two threads.
module tb_semp_fetch;
  import semp_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] active; logic ireq_valid, ireq_ready, irsp_valid; word_t ireq_addr; logic [63:0] irsp_data;
  logic fq_valid, fq_tid, fq_pop; word_t fq_pc; logic [1:0][31:0] fq_instr; logic [1:0] fq_vmask;
  logic id_redirect, id_tid; word_t id_target; logic [1:0] flush; word_t [1:0] flush_target;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  semp_fetch dut (.*);
  function automatic void chk(input bit ok, input string s); checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end endfunction

  bit slow = 1;
  logic rdy_r; int del = -1; word_t a_r;
  assign ireq_ready = rdy_r && del <= 0;   // a new request may go in the answer cycle
  assign irsp_valid = del == 0;
  assign irsp_data  = {a_r, a_r + 32'd4};
  always @(posedge clk) begin
    if (rst) del <= -1;
    else if (ireq_valid && ireq_ready) begin a_r <= ireq_addr; del <= slow ? $urandom_range(0, 2) : 0; end
    else if (del >= 0) del <= del - 1;
  end

  word_t exp_pc [2];
  int off_cycles [2];
  int n_grp = 0, n_redir = 0, n_flush = 0, n_odd = 0, n_grp_t [2];
  logic last_tid; int alt_ok = 0, alt_n = 0;
  always @(posedge clk) if (!rst) begin
    for (int t = 0; t < 2; t++) off_cycles[t] = active[t] ? 0 : off_cycles[t] + 1;
    if (fq_valid && fq_pop) begin
      word_t e; e = exp_pc[fq_tid];
      chk(fq_pc == {e[31:3], 3'b000}, $sformatf("thread %0d group at %h, expected %h", fq_tid, fq_pc, e));
      chk(fq_vmask == (e[2] ? 2'b10 : 2'b11), "valid-slot mask");
      chk(fq_instr[0] == fq_pc && fq_instr[1] == fq_pc + 4, "instructions of the group");
      chk(off_cycles[fq_tid] < 8, "no fetch for a switched-off thread");
      n_grp++; n_grp_t[fq_tid]++; if (e[2]) n_odd++;
      if (!slow) begin alt_n++; if (fq_tid != last_tid) alt_ok++; end
      last_tid = fq_tid;
      exp_pc[fq_tid] = {fq_pc[31:3], 3'b000} + 8;
      if (id_redirect) begin chk(id_tid == fq_tid, "tb redirects the popped thread"); exp_pc[fq_tid] = id_target; n_redir++; end
    end
    for (int t = 0; t < 2; t++) if (flush[t]) begin exp_pc[t] = flush_target[t]; n_flush++; end
  end

  initial begin
    int g0;
    active = 2'b11; fq_pop = 0; id_redirect = 0; id_tid = 0; id_target = 0; flush = 0; flush_target = '0; rdy_r = 1;
    exp_pc[0] = 32'h0000_0000; exp_pc[1] = 32'h0000_1000; n_grp_t[0] = 0; n_grp_t[1] = 0;
    off_cycles[0] = 0; off_cycles[1] = 0; last_tid = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      rdy_r = ($urandom_range(0, 3) != 0);
      fq_pop = fq_valid && ($urandom_range(0, 3) != 0);
      id_redirect = 0; flush = 0;
      if (fq_pop && $urandom_range(0, 5) == 0) begin
        id_redirect = 1; id_tid = fq_tid; id_target = {16'h0, 14'($urandom), 2'b00};
      end
      if ($urandom_range(0, 30) == 0) begin
        int t; t = $urandom_range(0, 1);
        flush[t] = 1; flush_target[t] = {16'h0, 14'($urandom), 2'b00};
        if (fq_valid && fq_tid == 1'(t)) begin fq_pop = 0; id_redirect = 0; end
        if (id_redirect && id_tid == 1'(t)) id_redirect = 0;
      end
      if ($urandom_range(0, 200) == 0) active = 2'($urandom_range(1, 3));
    end
    // rate phase
    @(negedge clk); active = 2'b11; flush = 2'b11; flush_target[0] = 32'h100; flush_target[1] = 32'h2000;
    id_redirect = 0; fq_pop = 0;
    slow = 0; rdy_r = 1;
    @(negedge clk); flush = 0;
    repeat (10) begin @(negedge clk); fq_pop = fq_valid; end
    g0 = n_grp;
    for (int c = 0; c < 200; c++) begin @(negedge clk); fq_pop = fq_valid; end
    $display("groups %0d (t0 %0d t1 %0d, odd start %0d), redirects %0d, flushes %0d; rate phase %0d groups in 200 cycles, alternations %0d/%0d",
             n_grp, n_grp_t[0], n_grp_t[1], n_odd, n_redir, n_flush, n_grp - g0, alt_ok, alt_n);
    chk(n_grp - g0 >= 199, "one group per cycle with one-cycle memory");
    chk(alt_ok >= alt_n - 2, "selector alternates threads");
    chk(n_redir > 100 && n_flush > 100 && n_odd > 50 && n_grp_t[0] > 1000 && n_grp_t[1] > 1000, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (60000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
