// tb_semp_core: the whole SMT core with ideal-but-variable memory.
// A memory model in the testbench holds the two test programs (thread 0 at
// its reset address, thread 1 at its own) and their data; the instruction and
// data ports are refused and answered with random delays of one or more
// cycles. Both threads must halt with the expected results in memory, a store
// on a squashed path must never reach memory, and every core mechanism (decode
// redirect, mispredict flush, rename stall, bypass, dual-thread issue,
// iterative complex ALU, load/store waits) must occur. With one-cycle memory
// the first instruction must retire in the ninth cycle after run, one cycle
// per pipeline stage IF ID RN IW RR EX RW RT1 RT2.
module tb_semp_core;
  import semp_pkg::*;
  import semp_asm_pkg::*;
  logic clk = 0, rst = 1, run = 0;
  logic ireq_valid, ireq_ready, irsp_valid; word_t ireq_addr; logic [63:0] irsp_data;
  logic dreq_valid, dreq_ready, dreq_we, drsp_valid; logic [3:0] dreq_be; word_t dreq_addr, dreq_wdata, drsp_rdata;
  logic [1:0] halted; perf_t perf;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  semp_core dut (.*);
  function automatic void chk(input bit ok, input string s); checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end endfunction

  word_t mem [16384];   // 64 KB
  bit    slow;          // random delays on/off
  // instruction port
  int i_del = -1; word_t i_a;
  assign ireq_ready = (i_del <= 0) && (!slow || ($urandom_range(0, 3) != 0));
  assign irsp_valid = (i_del == 0);
  assign irsp_data  = {mem[i_a[15:2]], mem[i_a[15:2] + 1]};
  // data port
  int d_del = -1; word_t d_a;
  assign dreq_ready = (d_del <= 0) && (!slow || ($urandom_range(0, 3) != 0));
  assign drsp_valid = (d_del == 0);
  assign drsp_rdata = mem[d_a[15:2]];
  always @(posedge clk) begin
    if (rst) begin i_del <= -1; d_del <= -1; end
    else begin
      if (ireq_valid && ireq_ready) begin i_a <= ireq_addr; i_del <= slow ? $urandom_range(0, 3) : 0; end
      else if (i_del >= 0) i_del <= i_del - 1;
      if (dreq_valid && dreq_ready) begin
        d_a <= dreq_addr; d_del <= slow ? $urandom_range(0, 5) : 0;
        if (dreq_we) for (int b = 0; b < 4; b++) if (dreq_be[3-b]) mem[dreq_addr[15:2]][31-8*b -: 8] <= dreq_wdata[31-8*b -: 8];
      end else if (d_del >= 0) d_del <= d_del - 1;
    end
  end

  int cyc = 0, n_ret = 0, n_redirect = 0, n_flush = 0, n_stall = 0, n_bypass = 0, n_dual = 0, n_cx = 0, n_lsw = 0;
  int first_ret = -1, run_cyc = 0;
  always @(posedge clk) if (!rst && run) begin
    cyc++;
    n_ret += int'(perf.retired[0]) + int'(perf.retired[1]);
    if (first_ret < 0 && |perf.retired) first_ret = cyc;
    n_redirect += int'(perf.id_redirect); n_flush += int'(perf.flush); n_stall += int'(perf.rename_stall);
    n_bypass += int'(perf.bypass); n_dual += int'(perf.dual_thread_issue); n_cx += int'(perf.complex_busy);
    n_lsw += int'(perf.lsu_wait);
  end

  task automatic run_programs(input bit s, output int cycles);
    logic [31:0] p0 [$], p1 [$];
    logic [31:0] e0 [NRES0];
    logic [31:0] e1 [NRES1];
    prog0(p0); prog1(p1); exp0(e0); exp1(e1);
    for (int k = 0; k < 16384; k++) mem[k] = '0;
    foreach (p0[k]) mem[(T0_BASE >> 2) + k] = p0[k];
    foreach (p1[k]) mem[(T1_BASE >> 2) + k] = p1[k];
    slow = s; rst = 1; run = 0; cyc = 0; first_ret = -1;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    @(negedge clk); run = 1;
    while (halted != 2'b11) @(posedge clk);
    cycles = cyc;
    repeat (10) @(posedge clk);
    for (int i = 0; i < NRES0; i++) chk(mem[(D0 >> 2) + i] == e0[i], $sformatf("slow=%0d thread 0 result %0d: %h want %h", s, i, mem[(D0 >> 2) + i], e0[i]));
    for (int i = 0; i < NRES1; i++) chk(mem[(D1 >> 2) + i] == e1[i], $sformatf("slow=%0d thread 1 result %0d: %h want %h", s, i, mem[(D1 >> 2) + i], e1[i]));
    chk(mem[32'h0bc0 >> 2] == 0, "store on a squashed path never written");
  endtask

  initial begin
    int c_fast, c_slow;
    run_programs(0, c_fast);
    $display("one-cycle memory: %0d cycles, first retire in cycle %0d", c_fast, first_ret);
    // IF ID RN IW RR EX RW RT1 RT2: one cycle each
    chk(first_ret == 9, $sformatf("first retirement in cycle %0d", first_ret));
    run_programs(1, c_slow);
    $display("random-delay memory: %0d cycles", c_slow);
    chk(c_slow > c_fast, "slower memory takes longer");
    $display("events: retired=%0d redirect=%0d flush=%0d rename_stall=%0d bypass=%0d dual=%0d complex=%0d lsu_wait=%0d",
             n_ret, n_redirect, n_flush, n_stall, n_bypass, n_dual, n_cx, n_lsw);
    chk(n_redirect > 0, "decode redirect"); chk(n_flush > 0, "mispredict flush"); chk(n_stall > 0, "rename stall");
    chk(n_bypass > 0, "bypass"); chk(n_dual > 0, "dual-thread issue"); chk(n_cx > 0, "complex ALU");
    chk(n_lsw > 0, "load/store wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
