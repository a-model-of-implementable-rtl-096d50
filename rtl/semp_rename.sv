// semp_rename: register renaming (RN stage).
//
// Each thread has a speculative map table and a retirement map table from its
// 34 architectural registers (r0..r31, LO, HI) to the 92 shared physical
// registers. At reset thread t maps register r to physical register 34*t+r,
// which leaves 92-68 = 24 physical registers in the shared free list, one per
// reorder-buffer entry of a thread. The free list is a bit vector; up to four
// registers (two instructions, each with a second destination for
// multiply/divide) are taken per cycle, lowest numbers first.
//
// A decode group of up to two instructions of one thread is renamed
// combinationally; the second slot sees the first slot's new mapping. When
// fire is high the speculative table and the free list are updated on the
// clock edge. Retired instructions update the retirement table and return
// the previous mapping of their destination to the free list. flush[t] copies
// the retirement table into thread t's speculative table and frees the
// physical registers in free_mask (those of the squashed instructions).
//
// The per-thread tables and a shared register pool follow the document (map
// state is a per-thread resource, the register file is shared); the free-list
// structure and recovery from the retirement table are this design's choices.
module semp_rename
  import semp_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  // rename request
  input  logic                  tid,
  input  dec_t [1:0]            d,
  input  logic                  fire,
  output preg_t [1:0]           ps1,
  output preg_t [1:0]           ps2,
  output preg_t [1:0]           pd,
  output preg_t [1:0]           old_pd,
  output preg_t [1:0]           pd2,
  output preg_t [1:0]           old_pd2,
  output logic                  can_alloc,   // enough free registers for the group
  output logic [6:0]            free_count,
  // retirement, per thread, two slots
  input  retire_t [NTHREAD-1:0][1:0] ret,
  // squash
  input  logic [NTHREAD-1:0]    flush,
  input  logic [NPREG-1:0]      free_mask
);
  localparam areg_t HI_R = areg_t'(AREG_HI);
  preg_t spec_map [NTHREAD][NARCH];
  preg_t arch_map [NTHREAD][NARCH];
  preg_t arch_map_n [NTHREAD][NARCH];
  logic [NPREG-1:0] free_q, free_n, alloc_mask;
  preg_t alloc [4];
  logic [2:0] need, found;

  // find the four lowest free registers
  always_comb begin
    logic [NPREG-1:0] m;
    m = free_q;
    found = '0;
    for (int k = 0; k < 4; k++) alloc[k] = '0;
    for (int k = 0; k < 4; k++) begin
      for (int i = NPREG-1; i >= 0; i--)
        if (m[i]) alloc[k] = preg_t'(i);
      if (m != '0) begin
        m[alloc[k]] = 1'b0;
        found = found + 3'd1;
      end
    end
  end

  always_comb begin
    free_count = '0;
    for (int i = 0; i < NPREG; i++) free_count = free_count + {6'b0, free_q[i]};
  end

  // rename the group
  always_comb begin
    int a;
    a = 0;
    alloc_mask = '0;
    for (int k = 0; k < 2; k++) begin
      ps1[k]     = spec_map[tid][d[k].src1];
      ps2[k]     = spec_map[tid][d[k].src2];
      old_pd[k]  = spec_map[tid][d[k].dst];
      old_pd2[k] = spec_map[tid][AREG_HI];
      pd[k]      = '0;
      pd2[k]     = '0;
    end
    // slot 0 allocations
    if (d[0].valid && d[0].has_dst)  begin pd[0]  = alloc[a]; a++; end
    if (d[0].valid && d[0].has_dst2) begin pd2[0] = alloc[a]; a++; end
    // slot 1 sees slot 0's destinations
    if (d[0].valid && d[0].has_dst) begin
      if (d[1].src1 == d[0].dst) ps1[1] = pd[0];
      if (d[1].src2 == d[0].dst) ps2[1] = pd[0];
      if (d[1].dst  == d[0].dst) old_pd[1] = pd[0];
      if (d[0].dst == HI_R)   old_pd2[1] = pd[0];
    end
    if (d[0].valid && d[0].has_dst2) begin
      if (d[1].src1 == HI_R) ps1[1] = pd2[0];
      if (d[1].src2 == HI_R) ps2[1] = pd2[0];
      if (d[1].dst  == HI_R) old_pd[1] = pd2[0];
      old_pd2[1] = pd2[0];
    end
    if (d[1].valid && d[1].has_dst)  begin pd[1]  = alloc[a]; a++; end
    if (d[1].valid && d[1].has_dst2) begin pd2[1] = alloc[a]; a++; end
    need = 3'(a);
    for (int k = 0; k < 4; k++)
      if (k < a) alloc_mask[alloc[k]] = 1'b1;
  end
  assign can_alloc = (found >= need);

  // retirement map update
  always_comb begin
    for (int t = 0; t < NTHREAD; t++)
      for (int r = 0; r < NARCH; r++) arch_map_n[t][r] = arch_map[t][r];
    for (int t = 0; t < NTHREAD; t++)
      for (int k = 0; k < 2; k++)
        if (ret[t][k].valid) begin
          if (ret[t][k].has_dst)  arch_map_n[t][ret[t][k].dst] = ret[t][k].pd;
          if (ret[t][k].has_dst2) arch_map_n[t][AREG_HI]       = ret[t][k].pd2;
        end
  end

  always_comb begin
    free_n = free_q;
    if (fire) free_n = free_n & ~alloc_mask;
    for (int t = 0; t < NTHREAD; t++)
      for (int k = 0; k < 2; k++)
        if (ret[t][k].valid) begin
          if (ret[t][k].has_dst)  free_n[ret[t][k].old_pd]  = 1'b1;
          if (ret[t][k].has_dst2) free_n[ret[t][k].old_pd2] = 1'b1;
        end
    free_n = free_n | free_mask;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < NTHREAD; t++)
        for (int r = 0; r < NARCH; r++) begin
          spec_map[t][r] <= preg_t'(t * NARCH + r);
          arch_map[t][r] <= preg_t'(t * NARCH + r);
        end
      for (int i = 0; i < NPREG; i++) free_q[i] <= (i >= NTHREAD * NARCH);
    end else begin
      for (int t = 0; t < NTHREAD; t++)
        for (int r = 0; r < NARCH; r++) arch_map[t][r] <= arch_map_n[t][r];
      free_q <= free_n;
      if (fire) begin
        for (int k = 0; k < 2; k++) begin
          if (d[k].valid && d[k].has_dst)  spec_map[tid][d[k].dst] <= pd[k];
          if (d[k].valid && d[k].has_dst2) spec_map[tid][AREG_HI]  <= pd2[k];
        end
      end
      for (int t = 0; t < NTHREAD; t++)
        if (flush[t])
          for (int r = 0; r < NARCH; r++) spec_map[t][r] <= arch_map_n[t][r];
    end
  end
endmodule
