// tb_semp_dcache: the data cache in front of the DDR-SDRAM controller and
// the DDR-SDRAM model. Random reads and byte-enabled writes over 32 KB are
// checked against a shadow memory: read data, write-through to the DDR-SDRAM
// (memory always equals the shadow), one-cycle read hits, two-way behaviour
// (two blocks 4 KB apart stay cached together, a third evicts the least
// recently used) and read-miss latency within 17 cycles (a refresh under way
// may add up to 8).
module tb_semp_dcache;
  import semp_pkg::*;
  logic clk = 0, rst = 1;
  logic rv, rr, we, pv, miss, hit; logic [3:0] be; word_t ra, wd, rd;
  mem_req_t [2:0] mreq; logic [2:0] gnt; mem_rsp_t [2:0] mrsp;
  logic cke, cs_n, ras_n, cas_n, we_n, oe; logic [1:0] ba; logic [12:0] a;
  logic [1:0][15:0] dqo, dqi; logic [1:0][1:0] dm; int errs, nref, nact;
  int checks = 0, failures = 0;
  word_t shadow [8192];
  always #5 clk = ~clk;
  semp_dcache dut (.clk, .rst, .req_valid(rv), .req_ready(rr), .req_we(we), .req_be(be), .req_addr(ra),
    .req_wdata(wd), .rsp_valid(pv), .rsp_rdata(rd), .miss, .hit_strobe(hit),
    .mem_req(mreq[1]), .mem_gnt(gnt[1]), .mem_rsp(mrsp[1]));
  assign mreq[0] = '0;
  assign mreq[2] = '0;
  semp_ddr_ctrl #(.T_INIT(20), .T_REFI(300)) ctrl (.clk, .rst, .req(mreq), .gnt, .rsp(mrsp), .init_done(), .refresh_strobe(),
    .ddr_cke(cke), .ddr_cs_n(cs_n), .ddr_ras_n(ras_n), .ddr_cas_n(cas_n), .ddr_we_n(we_n), .ddr_ba(ba), .ddr_a(a),
    .ddr_dq_oe(oe), .ddr_dq_o(dqo), .ddr_dm_o(dm), .ddr_dq_i(dqi));
  ddr_sdram_model #(.ABITS(16)) mem (.clk, .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .a, .dq_in(dqo), .dm,
    .dq_out(dqi), .errors(errs), .n_refresh(nref), .n_act(nact));
  function automatic void chk(input bit ok, input string s); checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end endfunction
  task automatic access(input logic w, input word_t x, input logic [3:0] b, input word_t v, output int lat, output word_t r);
    @(negedge clk); rv = 1; we = w; ra = x; be = b; wd = v;
    while (!rr) @(negedge clk);
    @(negedge clk); rv = 0; lat = 1;
    while (!pv) begin @(negedge clk); lat++; end
    r = rd;
  endtask
  function automatic word_t memw(input int wi);
    return {mem.mem[15'(2*wi)], mem.mem[15'(2*wi+1)]};
  endfunction
  initial begin
    int lat, nhit, nmiss, r0, nref_miss; word_t r;
    nref_miss = 0;
    nhit = 0; nmiss = 0;
    rv = 0; we = 0; be = 0; ra = 0; wd = 0;
    for (int i = 0; i < 8192; i++) begin shadow[i] = $urandom; mem.mem[2*i] = shadow[i][31:16]; mem.mem[2*i+1] = shadow[i][15:0]; end
    repeat (2) @(posedge clk); #1 rst = 0;
    repeat (80) @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      int wi; logic w; logic [3:0] b; word_t v;
      wi = (n % 2) ? $urandom_range(0, 8191) : $urandom_range(0, 255);
      w = ($urandom_range(0, 3) == 0); b = 4'($urandom_range(1, 15)); v = $urandom;
      r0 = nref;
      access(w, word_t'(wi) << 2, b, v, lat, r);
      if (w) begin
        for (int k = 0; k < 4; k++) if (b[3-k]) shadow[wi][31-8*k -: 8] = v[31-8*k -: 8];
        chk(memw(wi) == shadow[wi], $sformatf("write-through of word %0d", wi));
      end else begin
        chk(r == shadow[wi], $sformatf("read word %0d got %h want %h", wi, r, shadow[wi]));
        // a refresh in progress may delay a miss by up to tRFC+1 cycles
        if (lat == 1) nhit++;
        else begin
          nmiss++;
          if (nref == r0) chk(lat <= 17, $sformatf("read miss latency %0d", lat));
          else begin nref_miss++; chk(lat <= 17 + 8, $sformatf("read miss latency %0d behind a refresh", lat)); end
        end
      end
    end
    // associativity: A and B map to the same set; both stay, C evicts the LRU (A)
    access(0, 32'h0000_0100, 4'hf, 0, lat, r);
    access(0, 32'h0000_1100, 4'hf, 0, lat, r);
    access(0, 32'h0000_0100, 4'hf, 0, lat, r); chk(lat == 1, "way 0 kept");
    access(0, 32'h0000_1100, 4'hf, 0, lat, r); chk(lat == 1, "way 1 kept");
    access(0, 32'h0000_2100, 4'hf, 0, lat, r); chk(lat > 1, "third block misses");
    access(0, 32'h0000_1100, 4'hf, 0, lat, r); chk(lat == 1, "most recent kept");
    access(0, 32'h0000_0100, 4'hf, 0, lat, r); chk(lat > 1, "least recent evicted");
    $display("read hits %0d misses %0d (%0d behind a refresh)", nhit, nmiss, nref_miss);
    chk(nhit > 100 && nmiss > 100, "both hits and misses");
    chk(errs == 0, "DDR protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (400000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
