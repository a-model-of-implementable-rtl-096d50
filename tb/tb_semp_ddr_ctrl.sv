// tb_semp_ddr_ctrl: the DDR-SDRAM controller with the DDR-SDRAM model.
// Three requesters issue random block reads and masked block writes;
// read data are checked against a shadow memory, requests made in the same
// cycle must be granted instruction port first, then data port, then loader,
// an idle read must answer 9 cycles after the request, refreshes must occur
// at the set interval, and the model must see no protocol violation.
module tb_semp_ddr_ctrl;
  import semp_pkg::*;
  localparam int REFI = 200;
  logic clk = 0, rst = 1;
  mem_req_t [2:0] req; logic [2:0] gnt; mem_rsp_t [2:0] rsp; logic init_done, refs;
  logic cke, cs_n, ras_n, cas_n, we_n, oe; logic [1:0] ba; logic [12:0] a;
  logic [1:0][15:0] dqo, dqi; logic [1:0][1:0] dm; int errs, nref, nact;
  int checks = 0, failures = 0;
  logic [127:0] shadow [1024];
  always #5 clk = ~clk;
  semp_ddr_ctrl #(.T_INIT(50), .T_REFI(REFI)) dut (.clk, .rst, .req, .gnt, .rsp, .init_done, .refresh_strobe(refs),
    .ddr_cke(cke), .ddr_cs_n(cs_n), .ddr_ras_n(ras_n), .ddr_cas_n(cas_n), .ddr_we_n(we_n), .ddr_ba(ba), .ddr_a(a),
    .ddr_dq_oe(oe), .ddr_dq_o(dqo), .ddr_dm_o(dm), .ddr_dq_i(dqi));
  ddr_sdram_model #(.ABITS(24)) mem (.clk, .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .a, .dq_in(dqo), .dm,
    .dq_out(dqi), .errors(errs), .n_refresh(nref), .n_act(nact));
  function automatic void chk(input bit ok, input string s); checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end endfunction
  // blocks spread over rows and banks: block k at line address k * 0x1357 (mod 32 MB)
  function automatic logic [27:0] line_of(input int k); return 28'((k * 32'h1357) & 32'h1f_ffff); endfunction
  int n_prio = 0, n_done = 0;
  // one process per requester
  for (genvar p = 0; p < 3; p++) begin : g_req
    initial begin
      req[p] = '0;
      wait (init_done);
      repeat (p) @(posedge clk);
      for (int n = 0; n < 150; n++) begin
        int k; logic w; logic [15:0] be; logic [127:0] d;
        k = p * 300 + $urandom_range(0, 299);
        w = $urandom_range(0, 1); be = (n % 4 == 0) ? 16'hffff : 16'($urandom); d = {$urandom, $urandom, $urandom, $urandom};
        @(negedge clk);
        req[p].valid = 1; req[p].we = w; req[p].line = line_of(k); req[p].be = be; req[p].wdata = d;
        @(posedge clk);
        while (!gnt[p]) @(posedge clk);
        @(negedge clk); req[p] = '0;
        while (!rsp[p].valid) @(negedge clk);
        if (w) begin
          for (int b = 0; b < 16; b++) if (be[15-b]) shadow[k][127-8*b -: 8] = d[127-8*b -: 8];
        end else chk(rsp[p].rdata == shadow[k], $sformatf("port %0d read block %0d", p, k));
        n_done++;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
  end
  // priority check on every grant
  always @(posedge clk) if (!rst && |gnt) begin
    chk($onehot(gnt), "one grant at a time");
    if (req[0].valid) chk(gnt[0], "instruction port first");
    else if (req[1].valid) chk(gnt[1], "data port before loader");
    if (req[0].valid && req[1].valid) n_prio++;
  end
  initial begin
    int lat, nref0;
    for (int k = 0; k < 1024; k++) shadow[k] = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    wait (init_done);
    chk(mem.mode_set, "mode register loaded during start-up");
    wait (n_done == 450);
    // idle read latency
    repeat (20) @(negedge clk);
    nref0 = nref;
    req[0] = '0; req[0].valid = 1; req[0].line = line_of(3); lat = 0;
    @(negedge clk); req[0] = '0; lat = 1;
    while (!rsp[0].valid) begin @(negedge clk); lat++; end
    if (nref == nref0) chk(lat == 9, $sformatf("idle read latency %0d", lat));
    chk(rsp[0].rdata == shadow[3], "idle read data");
    $display("simultaneous I/D requests %0d, refreshes %0d, activates %0d", n_prio, nref, nact);
    chk(n_prio > 0, "I/D conflict exercised");
    chk(nref >= int'(($time / 10) / REFI) - 2, "refresh rate");
    chk(errs == 0, "DDR protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
