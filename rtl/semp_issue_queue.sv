// semp_issue_queue: instruction window of one hardware thread (IW stage).
//
// Eight entries, as in the processor's resource table, one queue per thread
// (issue queues #0 and #1). Renamed ALU micro-ops of the thread are written
// into free entries (up to two per cycle). An entry is ready when each source
// it uses is marked ready in the scoreboard (rdy_vec, one bit per physical
// register); readiness is recomputed every cycle, so wakeup is a lookup, not a
// tag broadcast. The shared selector (semp_select) picks entries of both
// queues and clears them through issue_clr. flush empties the queue.
// free_count tells the rename stage how many entries it may write.
// The entry format and the lookup-style wakeup are this design's choices.
module semp_issue_queue
  import semp_pkg::*;
#(
  parameter int unsigned DEPTH = IQ_DEPTH
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               flush,
  input  logic [1:0]         ins_valid,
  input  uop_t [1:0]         ins,
  input  logic [NPREG-1:0]   rdy_vec,
  input  logic [DEPTH-1:0]   issue_clr,
  output uop_t [DEPTH-1:0]   ent,
  output logic [DEPTH-1:0]   ent_valid,
  output logic [DEPTH-1:0]   ent_ready,
  output logic [3:0]         free_count
);
  logic [DEPTH-1:0] v;
  logic [1:0] slot_ok;
  int unsigned slot [2];

  assign ent_valid = v;

  always_comb
    for (int i = 0; i < DEPTH; i++)
      ent_ready[i] = v[i] && (!ent[i].use1 || rdy_vec[ent[i].ps1])
                          && (!ent[i].use2 || rdy_vec[ent[i].ps2]);

  always_comb begin
    free_count = '0;
    for (int i = 0; i < DEPTH; i++) free_count = free_count + {3'b0, !v[i]};
  end

  // two lowest free entries
  always_comb begin
    slot[0] = 0; slot[1] = 0; slot_ok = '0;
    for (int i = DEPTH-1; i >= 0; i--) if (!v[i]) slot[0] = i;
    slot_ok[0] = !v[slot[0]];
    for (int i = DEPTH-1; i >= 0; i--) if (!v[i] && i != int'(slot[0])) slot[1] = i;
    slot_ok[1] = !v[slot[1]] && slot[1] != slot[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v <= '0;
      for (int i = 0; i < DEPTH; i++) ent[i] <= '0;
    end else if (flush) begin
      v <= '0;
    end else begin
      v <= v & ~issue_clr;
      // slot 1 alone uses the first free entry
      if (ins_valid[0] && slot_ok[0]) begin
        v[slot[0]]   <= 1'b1;
        ent[slot[0]] <= ins[0];
      end
      if (ins_valid[1]) begin
        if (ins_valid[0] && slot_ok[1]) begin
          v[slot[1]]   <= 1'b1;
          ent[slot[1]] <= ins[1];
        end else if (!ins_valid[0] && slot_ok[0]) begin
          v[slot[0]]   <= 1'b1;
          ent[slot[0]] <= ins[1];
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst)
    (32'(ins_valid[0]) + 32'(ins_valid[1]) <= 32'(free_count)));
endmodule
