// tb_semp_lsu: memory access queue and load/store unit.
// Random loads and stores of both threads (all sizes, signed and unsigned)
// enter the queue while operand readiness changes at random; a register-file
// model answers the operand reads and a memory model grants and answers with
// random delays. A reference queue checks that accesses leave in program
// order with the right address, byte enables and store data, that a store
// waits until it is its thread's oldest instruction, that load data are
// aligned and extended correctly and written to the right register on the
// cycle memory answers, and that a thread flush drops its queued entries and
// the result of its access in flight.
module tb_semp_lsu;
  import semp_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] ins_valid; uop_t [1:0] ins; logic [3:0] free_count; logic [1:0] flush; robidx_t [1:0] rob_head;
  logic [NPREG-1:0] rdy_vec; preg_t [1:0] raddr; word_t [1:0] rdata;
  logic dreq_valid, dreq_ready, dreq_we, drsp_valid; logic [3:0] dreq_be; word_t dreq_addr, dreq_wdata, drsp_rdata;
  logic wr_en; preg_t wr_pd; word_t wr_data; cmpl_t cmpl; logic waiting;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  semp_lsu dut (.*);
  function automatic void chk(input bit ok, input string s); checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end endfunction

  word_t regs [NPREG];
  word_t mem [256];
  assign rdata[0] = regs[raddr[0]];
  assign rdata[1] = regs[raddr[1]];

  typedef struct { uop_t u; bit dead; int seq; } ent_t;
  ent_t rq [$];
  int seq_ctr [2];       // program-order number of the next instruction
  int head_seq [2];      // program-order number of the oldest unretired one
  int fl_seq;
  // access in flight
  bit fl_valid, fl_killed; uop_t fl_u; word_t fl_addr; int fl_delay;
  int n_load = 0, n_store = 0, n_dead = 0, n_killed = 0, n_store_wait = 0;

  function automatic word_t load_value(input uop_t u, input word_t a, input word_t w);
    logic [7:0] b; logic [15:0] hw;
    b = w[8*(3 - a[1:0]) +: 8]; hw = a[1] ? w[15:0] : w[31:16];
    case (u.msize)
      SZ_B: return u.msigned ? {{24{b[7]}}, b} : {24'b0, b};
      SZ_H: return u.msigned ? {{16{hw[15]}}, hw} : {16'b0, hw};
      default: return w;
    endcase
  endfunction

  // reorder-buffer head of each thread: the threads also run non-memory
  // instructions (gaps in the numbering) that retire at random, but the head
  // never passes the oldest load or store that has not completed
  function automatic int oldest(input int t);
    int o; o = seq_ctr[t];
    if (fl_valid && !fl_killed && fl_u.tid == 1'(t)) o = fl_seq;
    foreach (rq[i]) if (!rq[i].dead && rq[i].u.tid == 1'(t) && rq[i].seq < o) o = rq[i].seq;
    return o;
  endfunction
  always_comb for (int t = 0; t < 2; t++) rob_head[t] = robidx_t'(head_seq[t] % ROB_DEPTH);

  // memory side: the answer comes fl_delay cycles after the accepted request
  assign drsp_valid = fl_valid && fl_delay == 0;
  assign drsp_rdata = mem[fl_addr[9:2]];

  always @(posedge clk) if (!rst) begin
    // flush
    for (int t = 0; t < 2; t++) if (flush[t]) begin
      foreach (rq[i]) if (rq[i].u.tid == 1'(t) && !rq[i].dead) begin rq[i].dead = 1; n_dead++; end
      if (fl_valid && fl_u.tid == 1'(t)) begin fl_killed = 1; n_killed++; end
    end
    // completion
    if (drsp_valid) begin
      if (fl_killed) chk(!cmpl.valid && !wr_en, "killed access reports nothing");
      else begin
        chk(cmpl.valid && cmpl.tid == fl_u.tid && cmpl.rob == fl_u.rob, "completion of the access in flight");
        if (fl_u.op == OP_LOAD) begin
          chk(wr_en && wr_pd == fl_u.pd, "load writes its register");
          chk(wr_data == load_value(fl_u, fl_addr, mem[fl_addr[9:2]]), $sformatf("load data size %0d off %0d", fl_u.msize, fl_addr[1:0]));
        end else chk(!wr_en, "store writes no register");
      end
      fl_valid = 0;
    end else begin
      chk(!cmpl.valid && !wr_en, "no completion without an answer");
      if (fl_valid) fl_delay--;
    end
    // request
    if (dreq_valid) begin
      ent_t e; word_t a;
      while (rq.size() != 0 && rq[0].dead) void'(rq.pop_front());
      chk(!fl_valid, "one access at a time");
      chk(rq.size() != 0, "request has a queued entry");
      if (rq.size() != 0) begin
        e = rq[0];
        a = regs[e.u.ps1] + e.u.imm;
        chk(dreq_addr == {a[31:2], 2'b00}, "address");
        chk(dreq_we == (e.u.op == OP_STORE), "direction");
        if (e.u.op == OP_STORE) begin
          logic [3:0] be; word_t wd;
          case (e.u.msize)
            SZ_B: begin be = 4'b1000 >> a[1:0]; wd = {4{regs[e.u.ps2][7:0]}}; end
            SZ_H: begin be = a[1] ? 4'b0011 : 4'b1100; wd = {2{regs[e.u.ps2][15:0]}}; end
            default: begin be = 4'hF; wd = regs[e.u.ps2]; end
          endcase
          chk(dreq_be == be, "store byte enables");
          for (int b = 0; b < 4; b++) if (be[3-b]) chk(dreq_wdata[31-8*b -: 8] == wd[31-8*b -: 8], "store data");
          chk(rdy_vec[e.u.ps2] && e.seq == head_seq[e.u.tid], "store waits for data and ROB head");
        end
        chk(rdy_vec[e.u.ps1], "base register ready");
        if (dreq_ready) begin
          void'(rq.pop_front());
          fl_valid = 1; fl_killed = 0; fl_u = e.u; fl_seq = e.seq; fl_addr = a; fl_delay = $urandom_range(0, 3);
          if (e.u.op == OP_STORE) begin
            for (int b = 0; b < 4; b++) if (dreq_be[3-b]) mem[a[9:2]][31-8*b -: 8] = dreq_wdata[31-8*b -: 8];
            n_store++;
          end else n_load++;
        end
      end
    end
    // a store that is queued first but not yet the oldest
    if (rq.size() != 0 && !rq[0].dead && rq[0].u.op == OP_STORE && rq[0].seq != head_seq[rq[0].u.tid]) n_store_wait++;
    // retirement of non-memory instructions moves the head on
    for (int t = 0; t < 2; t++) begin
      if (head_seq[t] < oldest(t) && $urandom_range(0, 2) == 0) head_seq[t]++;
      if (flush[t]) head_seq[t] = oldest(t);
    end
    // insertion
    for (int k = 0; k < 2; k++) if (ins_valid[k]) begin
      ent_t e; e.u = ins[k]; e.dead = flush[ins[k].tid]; e.seq = int'(ins[k].pc); rq.push_back(e);
    end
  end

  initial begin
    ins_valid = 0; ins = '0; flush = 0; rdy_vec = '0; dreq_ready = 0;
    fl_valid = 0; fl_killed = 0; fl_delay = 0; fl_u = '0; fl_addr = 0;
    seq_ctr[0] = 0; seq_ctr[1] = 0; head_seq[0] = 0; head_seq[1] = 0; fl_seq = 0;
    for (int r = 0; r < NPREG; r++) regs[r] = (r < 40) ? 32'($urandom_range(0, 900)) : $urandom;
    for (int w = 0; w < 256; w++) mem[w] = $urandom;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      int room;
      @(negedge clk);
      for (int r = 0; r < NPREG; r++) rdy_vec[r] = ($urandom_range(0, 9) < 7);
      dreq_ready = ($urandom_range(0, 4) != 0);
      // flush now and then, never while a thread's store is in flight
      flush = 0;
      if ($urandom_range(0, 60) == 0) begin
        int t; t = $urandom_range(0, 1);
        if (!(fl_valid && fl_u.tid == 1'(t) && fl_u.op == OP_STORE)) flush[t] = 1;
      end
      room = free_count;
      ins_valid = 0; ins = '0;
      for (int k = 0; k < 2; k++) if (room > k && $urandom_range(0, 2) == 0) begin
        uop_t u; u = '0;
        u.valid = 1; u.tid = 1'($urandom); u.fu = FU_MEM;
        u.op = $urandom_range(0, 2) == 0 ? OP_STORE : OP_LOAD;
        u.msize = msize_e'($urandom_range(0, 2)); u.msigned = 1'($urandom);
        u.ps1 = preg_t'($urandom_range(0, 39)); u.ps2 = preg_t'($urandom_range(0, NPREG - 1));
        u.use1 = 1; u.use2 = (u.op == OP_STORE); u.has_dst = (u.op == OP_LOAD);
        u.pd = preg_t'($urandom_range(1, NPREG - 1));
        u.imm = (u.msize == SZ_W) ? 32'($urandom_range(0, 15) * 4) : (u.msize == SZ_H) ? 32'($urandom_range(0, 31) * 2) : 32'($urandom_range(0, 63));
        // keep the address aligned to the access size
        if (u.msize == SZ_W) u.imm -= 32'(regs[u.ps1][1:0]);
        if (u.msize == SZ_H) u.imm -= 32'(regs[u.ps1][0]);
        seq_ctr[u.tid] += $urandom_range(0, 2);   // skipped numbers: other instructions
        u.rob = robidx_t'(seq_ctr[u.tid] % ROB_DEPTH);
        u.pc = 32'(seq_ctr[u.tid]);                 // carries the program-order number
        seq_ctr[u.tid]++;
        ins[k] = u; ins_valid[k] = 1;
      end
      if (ins_valid == 2'b10) begin ins[0] = ins[1]; ins_valid = 2'b01; end
    end
    @(negedge clk); ins_valid = 0; flush = 0; rdy_vec = '1; dreq_ready = 1;
    repeat (200) @(negedge clk);
    $display("loads %0d stores %0d dropped %0d killed %0d store-wait cycles %0d", n_load, n_store, n_dead, n_killed, n_store_wait);
    chk(n_load > 1000 && n_store > 500 && n_dead > 50 && n_killed > 5 && n_store_wait > 50, "all mechanisms exercised");
    chk(rq.size() == 0 && !fl_valid && free_count == 8, "queue drains");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
