// tb_semp_bpred: trains the predictor with a branch pattern against a
// reference model of 512 2-bit counters indexed by PC[10:2] xor history;
// checks predictions, history shifting and restore.
module tb_semp_bpred;
  logic clk = 0, rst = 1;
  logic [1:0][31:0] lk_pc, up_pc; logic [1:0] lk_t, push, upv, upt; logic [1:0] ghr;
  logic [1:0][1:0] upg; logic restore;
  int checks = 0, failures = 0;
  int pht [512]; logic [1:0] ag, sg;
  always #5 clk = ~clk;
  semp_bpred dut (.clk, .rst, .lk_pc, .lk_taken(lk_t), .spec_ghr(ghr), .spec_push(push),
    .up_valid(upv), .up_pc, .up_ghr(upg), .up_taken(upt), .restore);
  function automatic int ix(input logic [31:0] pc, input logic [1:0] h); return int'(pc[10:2] ^ {7'b0, h}); endfunction
  initial begin
    for (int i = 0; i < 512; i++) pht[i] = 1;
    ag = 0; sg = 0;
    push = 0; upv = 0; restore = 0; lk_pc = '0; up_pc = '0; upg = '0; upt = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      lk_pc[0] = {$urandom_range(0, 63), 2'b00}; lk_pc[1] = lk_pc[0] + 4;
      push = 2'($urandom_range(0, 3)); upv = 2'($urandom_range(0, 3));
      for (int k = 0; k < 2; k++) begin
        up_pc[k] = {$urandom_range(0, 63), 2'b00}; upg[k] = 2'($urandom); upt[k] = (up_pc[k][3:2] != 2'b11);
      end
      restore = ($urandom_range(0, 20) == 0);
      #1;
      checks++;
      if (ghr !== sg) begin failures++; $display("FAIL ghr %b want %b", ghr, sg); end
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (lk_t[k] !== (pht[ix(lk_pc[k], sg)] >= 2)) begin failures++; if (failures < 10) $display("FAIL pred"); end
      end
      @(posedge clk);
      for (int k = 0; k < 2; k++) if (push[k]) sg = {sg[0], lk_t[k]};
      for (int k = 0; k < 2; k++) if (upv[k]) begin
        int i; i = ix(up_pc[k], upg[k]);
        if (upt[k] && pht[i] < 3) pht[i]++;
        if (!upt[k] && pht[i] > 0) pht[i]--;
        ag = {ag[0], upt[k]};
      end
      if (restore) sg = ag;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
