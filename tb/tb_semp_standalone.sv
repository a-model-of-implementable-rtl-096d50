// tb_semp_standalone: end-to-end test of the stand-alone model (MODEL = 1):
// the core runs uncached from the 16 KB block-RAM main memory.
//
// A host model feeds the two-thread test program through the USB receive
// FIFO; the loader writes it into the block RAM and starts the core; both
// threads run to BREAK and their stored results are read back from the block
// RAM and compared with the expected values. The DDR pins must stay idle, and
// the core mechanisms (decode redirect, mispredict flush, bypass, complex ALU)
// must all occur.
module tb_semp_standalone;
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

  assign ddr_dq_i = '0;
  semp_system #(.MODEL(1)) dut (.clk, .rst, .usb_rxf_n, .usb_rd_n, .usb_d,
    .ddr_cke, .ddr_cs_n, .ddr_ras_n, .ddr_cas_n, .ddr_we_n, .ddr_ba, .ddr_a,
    .ddr_dq_oe, .ddr_dq_o, .ddr_dm_o, .ddr_dq_i, .run, .halted, .perf, .mem_events);

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  // USB receive FIFO of the host side
  logic [7:0] bytes [$];
  logic rd_q = 1'b1;
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
    if (a[2])
      return {dut.g_standalone.u_bram.g_bank[1].g_lane[0].ram[a[13:3]], dut.g_standalone.u_bram.g_bank[1].g_lane[1].ram[a[13:3]],
              dut.g_standalone.u_bram.g_bank[1].g_lane[2].ram[a[13:3]], dut.g_standalone.u_bram.g_bank[1].g_lane[3].ram[a[13:3]]};
    return {dut.g_standalone.u_bram.g_bank[0].g_lane[0].ram[a[13:3]], dut.g_standalone.u_bram.g_bank[0].g_lane[1].ram[a[13:3]],
            dut.g_standalone.u_bram.g_bank[0].g_lane[2].ram[a[13:3]], dut.g_standalone.u_bram.g_bank[0].g_lane[3].ram[a[13:3]]};
  endfunction

  int n_redirect = 0, n_flush = 0, n_bypass = 0, n_cx = 0, n_ddr = 0, n_retired = 0;
  longint cyc = 0, run_start = 0;
  logic [31:0] skipped_word = '0;
  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (perf.id_redirect) n_redirect++;
    if (perf.flush) n_flush++;
    if (perf.bypass) n_bypass++;
    if (perf.complex_busy) n_cx++;
    if (!ddr_cs_n || ddr_dq_oe || mem_events != 0) n_ddr++;
    n_retired += int'(perf.retired[0]) + int'(perf.retired[1]);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (run=%b halted=%b retired=%0d pc0=%h pc1=%h)", run, halted, n_retired, dut.u_core.u_fetch.pc[0], dut.u_core.u_fetch.pc[1]);
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
    repeat (5) @(posedge clk);
    rst = 1'b0;
    wait (run);
    run_start = cyc;
    skipped_word = rdw(32'h0000_0bc0);   // block RAM is not cleared: remember what is there
    repeat (4) @(posedge clk);
    check(bytes.size() == 0, "loader consumed the whole stream");
    wait (halted == 2'b11);
    repeat (20) @(posedge clk);
    $display("program ran %0d cycles after loading, %0d instructions retired", cyc - run_start, n_retired);
    for (int i = 0; i < NRES0; i++)
      check(rdw(D0 + 32'(4*i)) == e0[i], $sformatf("thread 0 result %0d: got %h want %h", i, rdw(D0 + 32'(4*i)), e0[i]));
    for (int i = 0; i < NRES1; i++)
      check(rdw(D1 + 32'(4*i)) == e1[i], $sformatf("thread 1 result %0d: got %h want %h", i, rdw(D1 + 32'(4*i)), e1[i]));
    check(rdw(32'h0000_0bc0) == skipped_word, "skipped store did not happen");
    check(n_ddr == 0, "DDR pins idle");
    check(n_redirect > 0, "decode redirect happened");
    check(n_flush > 0, "mispredict flush happened");
    check(n_bypass > 0, "bypass used");
    check(n_cx > 0, "complex ALU iterated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
