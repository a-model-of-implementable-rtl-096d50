// semp_select: issue selection across the two threads' issue queues.
//
// Each cycle picks up to two ready simple-ALU micro-ops (one per simple ALU)
// and one ready complex-ALU micro-op when the complex ALU can take one. The
// two queues share the units, so both threads may issue in the same cycle;
// the thread searched first alternates every cycle (prio) and within a queue
// lower entries go first. The policy is this design's choice.
module semp_select
  import semp_pkg::*;
#(
  parameter int unsigned DEPTH = IQ_DEPTH
) (
  input  logic                           prio,        // thread searched first
  input  uop_t [NTHREAD-1:0][DEPTH-1:0]  ent,
  input  logic [NTHREAD-1:0][DEPTH-1:0]  ready,
  input  logic                           complex_free,
  output uop_t [1:0]                     simple_uop,
  output logic [1:0]                     simple_valid,
  output uop_t                           complex_uop,
  output logic                           complex_valid,
  output logic [NTHREAD-1:0][DEPTH-1:0]  clr
);
  always_comb begin
    int t;
    simple_uop = '0; simple_valid = '0;
    complex_uop = '0; complex_valid = 1'b0;
    clr = '0;
    for (int q = 0; q < NTHREAD; q++) begin
      t = (q == 0) ? int'(prio) : int'(!prio);
      for (int i = 0; i < DEPTH; i++) begin
        if (ready[t][i] && ent[t][i].fu == FU_COMPLEX) begin
          if (complex_free && !complex_valid) begin
            complex_valid = 1'b1;
            complex_uop   = ent[t][i];
            clr[t][i]     = 1'b1;
          end
        end else if (ready[t][i]) begin
          if (!simple_valid[0]) begin
            simple_valid[0] = 1'b1; simple_uop[0] = ent[t][i]; clr[t][i] = 1'b1;
          end else if (!simple_valid[1]) begin
            simple_valid[1] = 1'b1; simple_uop[1] = ent[t][i]; clr[t][i] = 1'b1;
          end
        end
      end
    end
  end
endmodule
