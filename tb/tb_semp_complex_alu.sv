// tb_semp_complex_alu: random multiply and divide operations, signed and
// unsigned, against SystemVerilog arithmetic; checks the LO/HI write order
// and the 34-cycle latency from start to the HI write, and that kill
// abandons an operation.
module tb_semp_complex_alu;
  import semp_pkg::*;
  logic clk = 0, rst = 1, start = 0, kill = 0, busy, wlo, whi;
  op_e op; word_t a, b, res;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  semp_complex_alu dut (.clk, .rst, .start, .op, .a, .b, .kill, .busy, .wr_lo(wlo), .wr_hi(whi), .result(res));
  function automatic void chk(input bit ok, input string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endfunction
  initial begin
    logic [63:0] e; word_t lo, hi; int lat;
    op_e ops [4] = '{OP_MULT, OP_MULTU, OP_DIV, OP_DIVU};
    repeat (3) @(posedge clk); rst <= 0;
    for (int n = 0; n < 400; n++) begin
      op = ops[n % 4]; a = $urandom; b = $urandom;
      if (n % 5 == 0) b = b >> $urandom_range(0, 31);
      if (b == 0) b = 3;
      case (op)
        OP_MULT:  e = 64'($signed(a) * $signed(b));
        OP_MULTU: e = 64'(a) * 64'(b);
        OP_DIV:   e = {word_t'($signed(a) % $signed(b)), word_t'($signed(a) / $signed(b))};
        default:  e = {a % b, a / b};
      endcase
      @(negedge clk); start = 1; @(negedge clk); start = 0; lat = 1;
      while (!wlo) begin @(negedge clk); lat++; end
      lo = res; @(negedge clk); lat++;
      chk(whi, "HI follows LO"); hi = res;
      chk({hi, lo} == e, $sformatf("%s %h %h -> %h%h want %h", op.name(), a, b, hi, lo, e));
      chk(lat == 34, $sformatf("latency %0d", lat));
      @(negedge clk); chk(!busy, "idle after HI");
    end
    // kill in the middle
    op = OP_MULT; a = 5; b = 6;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (5) @(negedge clk); kill = 1; @(negedge clk); kill = 0;
    chk(!busy, "kill stops the unit");
    repeat (40) begin @(negedge clk); chk(!wlo && !whi, "no write after kill"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
