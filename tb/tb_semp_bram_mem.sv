// tb_semp_bram_mem: block-RAM main memory of the stand-alone model.
// Random loader word writes, data-port reads and byte-masked writes, and
// instruction-port pair reads are checked against a shadow array of the
// 16 KB; every port must answer exactly one cycle after its request, the
// loader must win over the data port, and addresses must wrap at 16 KB.
module tb_semp_bram_mem;
  import semp_pkg::*;
  localparam int WORDS = 4096;
  logic clk = 0, rst = 1;
  logic ireq_valid, ireq_ready, irsp_valid; word_t ireq_addr; logic [63:0] irsp_data;
  logic dreq_valid, dreq_ready, dreq_we, drsp_valid; logic [3:0] dreq_be; word_t dreq_addr, dreq_wdata, drsp_rdata;
  mem_req_t lreq; logic lgnt; mem_rsp_t lrsp;
  int checks = 0, failures = 0;
  word_t shadow [WORDS];
  always #5 clk = ~clk;
  semp_bram_mem dut (.*);
  function automatic void chk(input bit ok, input string s); checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end endfunction
  // expected responses for the next cycle
  logic e_i, e_d, e_l; logic [63:0] e_idata; word_t e_ddata;
  initial begin
    ireq_valid = 0; dreq_valid = 0; lreq = '0; ireq_addr = 0; dreq_addr = 0; dreq_we = 0; dreq_be = 0; dreq_wdata = 0;
    e_i = 0; e_d = 0; e_l = 0;
    for (int k = 0; k < WORDS; k++) shadow[k] = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    // fill through the loader port
    for (int k = 0; k < WORDS; k++) begin
      word_t v; v = $urandom;
      @(negedge clk);
      lreq = '0; lreq.valid = 1; lreq.we = 1; lreq.line = 28'(k >> 2); lreq.be = 16'hF000 >> (4 * (k % 4));
      lreq.wdata = {4{v}}; shadow[k] = v;
      #1 chk(lgnt, "loader granted");
    end
    @(negedge clk); lreq = '0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      // check responses of the previous cycle
      chk(irsp_valid == e_i && drsp_valid == e_d && lrsp.valid == e_l, "one-cycle response");
      if (e_i) chk(irsp_data == e_idata, $sformatf("instruction pair at %0d", n));
      if (e_d) chk(drsp_rdata == e_ddata, $sformatf("data read at %0d got %h exp %h", n, drsp_rdata, e_ddata));
      // new requests
      ireq_valid = $urandom_range(0, 1); ireq_addr = {$urandom_range(0, 3), 14'($urandom) & 14'h3ff8};
      dreq_valid = $urandom_range(0, 1); dreq_we = $urandom_range(0, 1); dreq_be = 4'($urandom);
      dreq_addr = {$urandom_range(0, 3), 14'($urandom) & 14'h3ffc}; dreq_wdata = $urandom;
      lreq = '0;
      if ($urandom_range(0, 9) == 0) begin
        int k; word_t v; k = $urandom_range(0, WORDS - 1); v = $urandom;
        lreq.valid = 1; lreq.we = 1; lreq.line = 28'(k >> 2); lreq.be = 16'hF000 >> (4 * (k % 4)); lreq.wdata = {4{v}};
      end
      #1;
      chk(ireq_ready, "instruction port always ready");
      chk(dreq_ready == !lreq.valid, "loader before data port");
      // update the shadow as the memory will at the next edge
      if (lreq.valid) begin
        for (int w = 0; w < 4; w++) if (lreq.be[15-4*w -: 4] != 0) shadow[{lreq.line[13:4], 2'(w)}] = lreq.wdata[31:0];
      end else if (dreq_valid && dreq_we)
        for (int b = 0; b < 4; b++) if (dreq_be[3-b]) shadow[dreq_addr[13:2]][31-8*b -: 8] = dreq_wdata[31-8*b -: 8];
      // a read returns the memory after this cycle's write
      e_i = ireq_valid; e_idata = {shadow[ireq_addr[13:2]], shadow[ireq_addr[13:2] + 1]};
      e_l = lreq.valid; e_d = dreq_valid && dreq_ready;
      e_ddata = shadow[dreq_addr[13:2]];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
