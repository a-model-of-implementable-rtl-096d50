// semp_bpred: branch predictor of one hardware thread.
//
// A pattern history table (PHT) of 2-bit saturating counters, 512 entries,
// indexed by the instruction's word address bits [10:2] exclusive-ORed in
// the low bits with a 2-bit global history register (GHR). The table size and
// history length follow the processor's resource table; the gshare indexing,
// counter encoding (>=2 predicts taken, reset to weakly not-taken) and update
// policy are this design's choices.
//
// Two lookup ports (the two slots of a decode group) are combinational and
// use the speculative history, which is shifted at decode (spec_push) by one
// or two predicted outcomes. Two update ports train the table at retirement
// with the history captured at prediction time and shift the retired
// (architectural) history; restore copies the architectural history into the
// speculative one on a pipeline flush.
module semp_bpred #(
  parameter int unsigned PHT_ENTRIES = 512,
  parameter int unsigned GHR_BITS    = 2
) (
  input  logic                clk,
  input  logic                rst,
  // lookup (ID stage)
  input  logic [1:0][31:0]    lk_pc,
  output logic [1:0]          lk_taken,
  output logic [GHR_BITS-1:0] spec_ghr,     // history used by both slots
  input  logic [1:0]          spec_push,    // slot k is a conditional branch whose prediction is used
  // update (retire)
  input  logic [1:0]          up_valid,
  input  logic [1:0][31:0]    up_pc,
  input  logic [1:0][GHR_BITS-1:0] up_ghr,
  input  logic [1:0]          up_taken,
  input  logic                restore       // spec history := retired history
);
  localparam int unsigned IW = $clog2(PHT_ENTRIES);

  logic [1:0]          pht [PHT_ENTRIES];
  logic [GHR_BITS-1:0] arch_ghr, arch_ghr_n, spec_ghr_n;

  function automatic logic [IW-1:0] idx(input logic [31:0] pc, input logic [GHR_BITS-1:0] h);
    idx = pc[IW+1:2] ^ IW'(h);
  endfunction

  always_comb
    for (int k = 0; k < 2; k++) lk_taken[k] = pht[idx(lk_pc[k], spec_ghr)][1];

  always_comb begin
    arch_ghr_n = arch_ghr;
    for (int k = 0; k < 2; k++)
      if (up_valid[k]) arch_ghr_n = {arch_ghr_n[GHR_BITS-2:0], up_taken[k]};
    spec_ghr_n = spec_ghr;
    for (int k = 0; k < 2; k++)
      if (spec_push[k]) spec_ghr_n = {spec_ghr_n[GHR_BITS-2:0], lk_taken[k]};
    if (restore) spec_ghr_n = arch_ghr_n;
  end

  // counter updates; two updates of one entry in a cycle both count
  logic [IW-1:0] uidx [2];
  logic [1:0]    ucnt [2];
  function automatic logic [1:0] bump(input logic [1:0] c, input logic taken);
    if (taken && c != 2'b11) return c + 2'b01;
    if (!taken && c != 2'b00) return c - 2'b01;
    return c;
  endfunction
  always_comb begin
    uidx[0] = idx(up_pc[0], up_ghr[0]);
    uidx[1] = idx(up_pc[1], up_ghr[1]);
    ucnt[0] = bump(pht[uidx[0]], up_taken[0]);
    ucnt[1] = bump((up_valid[0] && uidx[0] == uidx[1]) ? ucnt[0] : pht[uidx[1]], up_taken[1]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      arch_ghr <= '0;
      spec_ghr <= '0;
      for (int i = 0; i < PHT_ENTRIES; i++) pht[i] <= 2'b01;
    end else begin
      arch_ghr <= arch_ghr_n;
      spec_ghr <= spec_ghr_n;
      for (int k = 0; k < 2; k++)
        if (up_valid[k]) pht[uidx[k]] <= ucnt[k];
    end
  end
endmodule
