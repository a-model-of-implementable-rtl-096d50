// tb_semp_system: end-to-end test of the processor system at its default
// parameters (cached model, DDR-SDRAM controller with full start-up wait).
//
// A host model feeds a two-thread program through the USB receive FIFO;
// the loader writes it into the DDR-SDRAM model and starts the core; both
// threads run to BREAK. The results the threads store are read back from the
// DDR-SDRAM model (the data cache writes through) and compared with values
// computed here. The test also counts how often each mechanism of the design
// occurred (branch redirect at decode, mispredict flush, rename stall, bypass,
// both threads issuing together, complex ALU iteration, I- and D-cache
// misses, D-cache hits, instruction-cache priority over the data cache,
// refresh) and fails any that never happened.
module tb_semp_system;
  import semp_pkg::*;
  import semp_asm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic usb_rxf_n, usb_rd_n;
  logic [7:0] usb_d;
  logic ddr_cke, ddr_cs_n, ddr_ras_n, ddr_cas_n, ddr_we_n, ddr_dq_oe;
  logic [1:0] ddr_ba;
  logic [12:0] ddr_a;
  logic [1:0][15:0] ddr_dq_o, ddr_dq_i;
  logic [1:0][1:0] ddr_dm_o;
  logic run;
  logic [1:0] halted;
  perf_t perf;
  logic [4:0] mem_events;
  int ddr_errors, n_refresh, n_act;

  semp_system dut (.clk, .rst, .usb_rxf_n, .usb_rd_n, .usb_d,
    .ddr_cke, .ddr_cs_n, .ddr_ras_n, .ddr_cas_n, .ddr_we_n, .ddr_ba, .ddr_a,
    .ddr_dq_oe, .ddr_dq_o, .ddr_dm_o, .ddr_dq_i, .run, .halted, .perf, .mem_events);

  ddr_sdram_model mem (.clk, .cke(ddr_cke), .cs_n(ddr_cs_n), .ras_n(ddr_ras_n),
    .cas_n(ddr_cas_n), .we_n(ddr_we_n), .ba(ddr_ba), .a(ddr_a), .dq_in(ddr_dq_o),
    .dm(ddr_dm_o), .dq_out(ddr_dq_i), .errors(ddr_errors), .n_refresh(n_refresh), .n_act(n_act));

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  // ---------------------------------------------------------------- host
  logic [7:0] bytes [$];
  logic rd_q = 1'b1;
  // the FIFO outputs are registered and change only while rd_n is high
  always @(posedge clk) begin
    rd_q <= usb_rd_n;
    if (!rst && usb_rd_n && !rd_q && bytes.size() != 0) void'(bytes.pop_front());
    usb_rxf_n <= (bytes.size() == 0);
    usb_d     <= (bytes.size() != 0) ? bytes[0] : 8'h00;
  end
  function automatic void put32(input logic [31:0] w);
    for (int i = 3; i >= 0; i--) bytes.push_back(w[8*i +: 8]);
  endfunction
  function automatic void record(input logic [31:0] base, input logic [31:0] p [$]);
    put32(base); put32(32'(p.size()));
    foreach (p[i]) put32(p[i]);
  endfunction

  function automatic logic [31:0] rdw(input logic [31:0] a);
    return {mem.mem[a[24:1]], mem.mem[a[24:1] + 1]};
  endfunction

  // ---------------------------------------------------------------- events
  int n_redirect = 0, n_flush = 0, n_stall = 0, n_bypass = 0, n_dual = 0, n_cx = 0;
  int n_imiss = 0, n_dmiss = 0, n_dhit = 0, n_prio = 0, n_ref = 0, n_retired = 0;
  longint cyc = 0, run_start = 0;
  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (perf.id_redirect) n_redirect++;
    if (perf.flush) n_flush++;
    if (perf.rename_stall) n_stall++;
    if (perf.bypass) n_bypass++;
    if (perf.dual_thread_issue) n_dual++;
    if (perf.complex_busy) n_cx++;
    if (mem_events[0]) n_imiss++;
    if (mem_events[1]) n_dmiss++;
    if (mem_events[2]) n_dhit++;
    if (mem_events[3]) n_prio++;
    if (mem_events[4]) n_ref++;
    n_retired += int'(perf.retired[0]) + int'(perf.retired[1]);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (run=%b halted=%b retired=%0d bytes left=%0d loaded=%0d)", run, halted, n_retired, bytes.size(), dut.u_usb.words_loaded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p0 [$], p1 [$];
    logic [31:0] e0 [NRES0];
    logic [31:0] e1 [NRES1];
    prog0(p0); prog1(p1); exp0(e0); exp1(e1);
    record(T0_BASE, p0);
    record(T1_BASE, p1);
    put32(32'h0); put32(32'h0);
    $display("stream bytes %0d", bytes.size());
    repeat (5) @(posedge clk);
    rst = 1'b0;
    wait (run);
    run_start = cyc;
    repeat (4) @(posedge clk);
    check(bytes.size() == 0, "loader consumed the whole stream");
    check(dut.u_usb.words_loaded == 32'(p0.size() + p1.size()), "loader word count");
    wait (halted == 2'b11);
    repeat (20) @(posedge clk);
    $display("program ran %0d cycles after loading, %0d instructions retired", cyc - run_start, n_retired);
    for (int i = 0; i < NRES0; i++)
      check(rdw(D0 + 32'(4*i)) == e0[i], $sformatf("thread 0 result %0d: got %h want %h", i, rdw(D0 + 32'(4*i)), e0[i]));
    for (int i = 0; i < NRES1; i++)
      check(rdw(D1 + 32'(4*i)) == e1[i], $sformatf("thread 1 result %0d: got %h want %h", i, rdw(D1 + 32'(4*i)), e1[i]));
    check(rdw(32'h0000_0bc0) == 0, "skipped store did not happen");
    check(ddr_errors == 0, "DDR protocol errors");
    $display("events: redirect=%0d flush=%0d rename_stall=%0d bypass=%0d dual_issue=%0d complex=%0d",
             n_redirect, n_flush, n_stall, n_bypass, n_dual, n_cx);
    $display("events: imiss=%0d dmiss=%0d dhit=%0d i_over_d=%0d refresh=%0d (model %0d)",
             n_imiss, n_dmiss, n_dhit, n_prio, n_ref, n_refresh);
    check(n_redirect > 0, "decode redirect happened");
    check(n_flush > 0, "mispredict flush happened");
    check(n_stall > 0, "rename stall happened");
    check(n_bypass > 0, "bypass used");
    check(n_dual > 0, "both threads issued in one cycle");
    check(n_cx > 0, "complex ALU iterated");
    check(n_imiss > 0, "I-cache miss");
    check(n_dmiss > 0, "D-cache miss");
    check(n_dhit > 0, "D-cache hit");
    check(n_prio > 0, "I-cache request beat a D-cache request");
    check(n_ref > 0 && n_refresh > 0, "refresh issued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
