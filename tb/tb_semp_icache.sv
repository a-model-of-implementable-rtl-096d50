// tb_semp_icache: the instruction cache in front of the DDR-SDRAM controller
// and the DDR-SDRAM model. Random fetch addresses over 24 KB (three times
// the cache, so lines are evicted) are checked against the memory contents;
// hits must answer in one cycle and misses within the 17-cycle miss
// latency the cache is specified for.
module tb_semp_icache;
  import semp_pkg::*;
  logic clk = 0, rst = 1;
  logic rv, rr, pv, miss; word_t ra; logic [63:0] pd;
  mem_req_t [2:0] mreq; logic [2:0] gnt; mem_rsp_t [2:0] mrsp;
  logic cke, cs_n, ras_n, cas_n, we_n, oe; logic [1:0] ba; logic [12:0] a;
  logic [1:0][15:0] dqo, dqi; logic [1:0][1:0] dm; int errs, nref, nact;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  semp_icache dut (.clk, .rst, .req_valid(rv), .req_ready(rr), .req_addr(ra), .rsp_valid(pv), .rsp_data(pd),
    .miss, .mem_req(mreq[0]), .mem_gnt(gnt[0]), .mem_rsp(mrsp[0]));
  assign mreq[1] = '0;
  assign mreq[2] = '0;
  semp_ddr_ctrl #(.T_INIT(20), .T_REFI(100000)) ctrl (.clk, .rst, .req(mreq), .gnt, .rsp(mrsp), .init_done(), .refresh_strobe(),
    .ddr_cke(cke), .ddr_cs_n(cs_n), .ddr_ras_n(ras_n), .ddr_cas_n(cas_n), .ddr_we_n(we_n), .ddr_ba(ba), .ddr_a(a),
    .ddr_dq_oe(oe), .ddr_dq_o(dqo), .ddr_dm_o(dm), .ddr_dq_i(dqi));
  ddr_sdram_model #(.ABITS(16)) mem (.clk, .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .a, .dq_in(dqo), .dm,
    .dq_out(dqi), .errors(errs), .n_refresh(nref), .n_act(nact));
  function automatic void chk(input bit ok, input string s); checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end endfunction
  function automatic logic [63:0] ref64(input word_t x);
    logic [15:0] w; logic [63:0] r;
    for (int i = 0; i < 4; i++) r[63 - 16*i -: 16] = mem.mem[15'(x[15:1]) + 15'(i)];
    return r;
  endfunction
  initial begin
    int lat, nhit, nmiss, maxlat;
    nhit = 0; nmiss = 0; maxlat = 0;
    rv = 0; ra = 0;
    for (int i = 0; i < 2**15; i++) mem.mem[i] = 16'(i * 40503 + 7);
    repeat (2) @(posedge clk); #1 rst = 0;
    repeat (80) @(posedge clk);
    for (int n = 0; n < 1500; n++) begin
      word_t x;
      x = {$urandom_range(0, 3071), 3'b000};
      if (n % 3 == 0) x = {$urandom_range(0, 15), 3'b000};   // a hot region that stays cached
      @(negedge clk); rv = 1; ra = x;
      while (!rr) @(negedge clk);
      @(negedge clk); rv = 0; lat = 1;
      while (!pv) begin @(negedge clk); lat++; end
      chk(pd == ref64(x), $sformatf("data at %h", x));
      if (lat == 1) nhit++; else begin nmiss++; if (lat > maxlat) maxlat = lat; end
      chk(lat == 1 || lat <= 17, $sformatf("miss latency %0d", lat));
    end
    $display("hits %0d misses %0d worst miss latency %0d cycles", nhit, nmiss, maxlat);
    chk(nhit > 100 && nmiss > 100, "both hits and misses seen");
    chk(errs == 0, "DDR protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
