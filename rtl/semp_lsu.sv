// semp_lsu: memory access queue and load/store unit.
//
// The memory access queue (MAQ) holds up to eight loads and stores of both
// threads in the order the rename stage sent them (the processor's resource
// table gives 8 entries and one load/store unit). The unit serves only the
// oldest entry: a load goes when its base register is ready; a store goes
// when its base and data registers are ready and it is the oldest instruction
// of its thread (head of that thread's reorder buffer), so memory is written
// only by instructions that will retire. Entries of a squashed thread are
// marked dead and dropped when they reach the head; an access already sent to
// the data cache by such a thread completes there, but its result is dropped.
//
// Per access: EX = operand read and address add (request to the data cache),
// MA = data cache (one cycle on a hit, longer on a miss), RW = register
// write and completion report on the cycle the data cache answers. Memory is
// big-endian, as MIPS conventionally is; byte and halfword accesses use byte
// enables. In-order service, one access at a time, is this design's choice.
module semp_lsu
  import semp_pkg::*;
#(
  parameter int unsigned DEPTH = MAQ_DEPTH
) (
  input  logic                 clk,
  input  logic                 rst,
  // from rename
  input  logic [1:0]           ins_valid,
  input  uop_t [1:0]           ins,
  output logic [3:0]           free_count,
  // thread state
  input  logic [NTHREAD-1:0]   flush,
  input  robidx_t [NTHREAD-1:0] rob_head,
  input  logic [NPREG-1:0]     rdy_vec,
  // register file read ports
  output preg_t [1:0]          raddr,
  input  word_t [1:0]          rdata,
  // data cache
  output logic                 dreq_valid,
  input  logic                 dreq_ready,
  output logic                 dreq_we,
  output logic [3:0]           dreq_be,
  output word_t                dreq_addr,
  output word_t                dreq_wdata,
  input  logic                 drsp_valid,
  input  word_t                drsp_rdata,
  // write-back and completion
  output logic                 wr_en,
  output preg_t                wr_pd,
  output word_t                wr_data,
  output cmpl_t                cmpl,
  output logic                 waiting      // an access is outstanding at the data cache
);
  localparam int unsigned PW = $clog2(DEPTH);
  uop_t          q    [DEPTH];
  logic          live [DEPTH];
  logic [PW-1:0] head, tail;
  logic [PW:0]   cnt;
  logic          busy, killed;
  uop_t          cur;
  logic [1:0]    cur_off;
  uop_t          h;
  logic          go, pop, h_ok;
  word_t         addr;
  logic [1:0]    nins;

  assign h    = q[head];
  assign raddr[0] = h.ps1;
  assign raddr[1] = h.ps2;
  assign addr = rdata[0] + h.imm;
  assign free_count = 4'(DEPTH - int'(cnt));
  assign nins = 2'(ins_valid[0]) + 2'(ins_valid[1]);

  always_comb begin
    h_ok = rdy_vec[h.ps1];
    if (h.op == OP_STORE) h_ok = h_ok && rdy_vec[h.ps2] && (h.rob == rob_head[h.tid]);
  end

  assign go  = !busy && cnt != 0 && live[head] && !flush[h.tid] && h_ok && dreq_ready;
  assign pop = (!busy && cnt != 0 && (!live[head] || flush[h.tid])) || go;

  assign dreq_valid = !busy && cnt != 0 && live[head] && !flush[h.tid] && h_ok;
  assign dreq_we    = (h.op == OP_STORE);
  assign dreq_addr  = {addr[31:2], 2'b00};
  always_comb begin
    unique case (h.msize)
      SZ_B: begin dreq_be = 4'b1000 >> addr[1:0]; dreq_wdata = {4{rdata[1][7:0]}}; end
      SZ_H: begin dreq_be = addr[1] ? 4'b0011 : 4'b1100; dreq_wdata = {2{rdata[1][15:0]}}; end
      default: begin dreq_be = 4'b1111; dreq_wdata = rdata[1]; end
    endcase
  end

  // load data alignment and extension
  always_comb begin
    logic [7:0]  b;
    logic [15:0] hw;
    logic [1:0]  lane;
    lane = ~cur_off;
    b  = drsp_rdata[8*lane +: 8];
    hw = cur_off[1] ? drsp_rdata[15:0] : drsp_rdata[31:16];
    unique case (cur.msize)
      SZ_B:    wr_data = cur.msigned ? {{24{b[7]}}, b}   : {24'b0, b};
      SZ_H:    wr_data = cur.msigned ? {{16{hw[15]}}, hw} : {16'b0, hw};
      default: wr_data = drsp_rdata;
    endcase
  end

  logic done_ok;
  assign done_ok = busy && drsp_valid && !killed && !flush[cur.tid];
  assign wr_en   = done_ok && cur.op == OP_LOAD && cur.has_dst;
  assign wr_pd   = cur.pd;
  assign waiting = busy;
  always_comb begin
    cmpl       = '0;
    cmpl.valid = done_ok;
    cmpl.tid   = cur.tid;
    cmpl.rob   = cur.rob;
    cmpl.npc   = cur.pc + 32'd4;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      head <= '0; tail <= '0; cnt <= '0; busy <= 1'b0; killed <= 1'b0;
      cur <= '0; cur_off <= '0;
      for (int i = 0; i < DEPTH; i++) begin q[i] <= '0; live[i] <= 1'b0; end
    end else begin
      for (int i = 0; i < DEPTH; i++)
        if (flush[q[i].tid]) live[i] <= 1'b0;
      if (busy && flush[cur.tid]) killed <= 1'b1;
      if (go) begin
        busy    <= 1'b1;
        killed  <= 1'b0;
        cur     <= h;
        cur_off <= addr[1:0];
      end else if (busy && drsp_valid) begin
        busy <= 1'b0;
      end
      if (pop) head <= head + 1'b1;
      for (int k = 0; k < 2; k++) begin
        logic [PW-1:0] p;
        p = tail + PW'(k == 1 && ins_valid[0]);
        if (ins_valid[k]) begin
          q[p]    <= ins[k];
          live[p] <= !flush[ins[k].tid];
        end
      end
      tail <= tail + PW'(nins);
      cnt  <= cnt + (PW+1)'(nins) - (PW+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (rst) (32'(cnt) + 32'(nins) <= DEPTH));
endmodule
