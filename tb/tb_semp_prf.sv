// tb_semp_prf: random writes and reads of the physical register file against
// a shadow array, including same-cycle write-through forwarding and reset to
// zero.
module tb_semp_prf;
  import semp_pkg::*;
  logic clk = 0, rst = 1;
  preg_t [7:0] ra; word_t [7:0] rd; logic [7:0] fwd;
  logic [3:0] we; preg_t [3:0] wa; word_t [3:0] wd;
  word_t shadow [NPREG];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  semp_prf dut (.clk, .rst, .raddr(ra), .rdata(rd), .rfwd(fwd), .we, .waddr(wa), .wdata(wd));
  initial begin
    for (int i = 0; i < NPREG; i++) shadow[i] = 0;
    we = 0; wa = '0; wd = '0; ra = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int w = 0; w < 4; w++) begin
        we[w] = $urandom_range(0, 1); wa[w] = preg_t'($urandom_range(0, NPREG-1) + 0); wd[w] = $urandom;
        for (int v = 0; v < w; v++) if (wa[v] == wa[w]) we[w] = 0;
      end
      for (int r = 0; r < 8; r++) ra[r] = (r < 4 && we[r]) ? wa[r] : preg_t'($urandom_range(0, NPREG-1));
      #1;
      for (int r = 0; r < 8; r++) begin
        word_t e; logic f; e = shadow[ra[r]]; f = 0;
        for (int w = 0; w < 4; w++) if (we[w] && wa[w] == ra[r]) begin e = wd[w]; f = 1; end
        checks++;
        if (rd[r] !== e || fwd[r] !== f) begin failures++; if (failures < 10) $display("FAIL port %0d reg %0d %h want %h", r, ra[r], rd[r], e); end
      end
      @(posedge clk);
      for (int w = 0; w < 4; w++) if (we[w]) shadow[wa[w]] = wd[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
