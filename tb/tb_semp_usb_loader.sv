// tb_semp_usb_loader: the program loader behind the USB interface.
// A receive-FIFO model of the USB chip holds a random stream of records
// (address, word count, words; a zero count ends it) and goes empty at
// random moments; a memory model grants and answers after random delays.
// The test checks every word lands at its address with the right byte
// enables, each read strobe lasts RD_CYCLES cycles with a gap after it, no
// byte is read while the FIFO is empty, start rises only after the final
// record and the loaded-word count is exact.
module tb_semp_usb_loader;
  import semp_pkg::*;
  localparam int RDC = 4;
  logic clk = 0, rst = 1;
  logic rxf_n, rd_n; logic [7:0] d; mem_req_t req; logic gnt; mem_rsp_t rsp; logic start; logic [31:0] nload;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  semp_usb_loader #(.RD_CYCLES(RDC)) dut (.clk, .rst, .usb_rxf_n(rxf_n), .usb_rd_n(rd_n), .usb_d(d),
    .mem_req(req), .mem_gnt(gnt), .mem_rsp(rsp), .start, .words_loaded(nload));
  function automatic void chk(input bit ok, input string s); checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end endfunction

  byte unsigned stream [$];
  word_t exp_mem [int];       // word address -> value
  int total_words = 0;
  function automatic void put32(input word_t v); for (int b = 3; b >= 0; b--) stream.push_back(v[8*b +: 8]); endfunction

  // USB receive FIFO: bytes arrive over time, rd_n low shows the head byte,
  // the rising edge of rd_n pops it
  logic rd_q = 1; logic rxf_q = 1; logic hold = 0; int pops = 0;
  assign rxf_n = (stream.size() == 0) || hold;
  assign d = (stream.size() != 0) ? stream[0] : 8'h00;
  int low_len = 0, high_len = 9;
  always @(posedge clk) begin
    rd_q <= rd_n;
    rxf_q <= rxf_n;
    if (!rst) begin
      if (!rd_n) begin
        if (low_len == 0) begin
          chk(high_len >= 1, "gap between strobes");
          chk(!rxf_q, "strobe only after a byte was waiting");
        end
        low_len <= low_len + 1; high_len <= 0;
      end else begin
        if (!rd_q) begin
          chk(low_len == RDC, $sformatf("strobe length %0d", low_len));
          void'(stream.pop_front()); pops++;
        end
        low_len <= 0; high_len <= high_len + 1;
      end
      // the FIFO runs dry now and then, but never during a strobe
      if (rd_n && rd_q) hold <= ($urandom_range(0, 5) == 0);
      else hold <= 0;
    end
  end

  // memory: grant after 0..3 cycles, answer 1..4 cycles after the grant
  int gdelay = 0, rdelay = -1;
  assign gnt = req.valid && gdelay == 0 && rdelay < 0;
  always @(posedge clk) begin
    rsp <= '0;
    if (rst) begin gdelay <= 0; rdelay <= -1; end
    else begin
      if (gnt) begin
        int w;
        chk(req.we, "loader writes only");
        w = -1;
        for (int k = 0; k < 4; k++) if (req.be[15-4*k -: 4] == 4'hF) w = k;
        chk(w >= 0 && $countones(req.be) == 4, "one whole word enabled");
        if (w >= 0) begin
          int wa; wa = int'({req.line, 2'(w)});
          chk(exp_mem.exists(wa), $sformatf("write to expected word %h", wa * 4));
          if (exp_mem.exists(wa)) begin chk(req.wdata[127-32*w -: 32] == exp_mem[wa], "word value"); exp_mem.delete(wa); end
        end
        rdelay <= $urandom_range(0, 3);
        gdelay <= $urandom_range(0, 3);
      end else if (gdelay > 0 && req.valid) gdelay <= gdelay - 1;
      if (rdelay == 0) begin rsp.valid <= 1; rdelay <= -1; end
      else if (rdelay > 0) rdelay <= rdelay - 1;
    end
  end

  initial begin
    int nrec;
    nrec = 5;
    for (int r = 0; r < nrec; r++) begin
      word_t a; int n;
      a = {8'h00, 24'($urandom) & 24'hff_fffc} + r * 32'h0100_0000;
      n = $urandom_range(1, 40);
      put32(a); put32(n);
      for (int k = 0; k < n; k++) begin
        word_t v; v = $urandom; put32(v);
        exp_mem[int'((a >> 2) + k)] = v; total_words++;
      end
    end
    put32(32'h0); put32(32'h0);
    repeat (3) @(posedge clk); #1 rst = 0;
    while (!start) @(posedge clk);
    #1;
    chk(stream.size() == 0 || (stream.size() == 1 && !rd_n), "start after the final record");
    repeat (2) @(posedge clk);
    chk(stream.size() == 0, "whole stream read");
    chk(exp_mem.size() == 0, $sformatf("%0d words never written", exp_mem.size()));
    chk(nload == total_words, $sformatf("loaded %0d of %0d", nload, total_words));
    repeat (20) @(posedge clk);
    chk(start && rd_n, "start stays high and loader goes quiet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (60000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
