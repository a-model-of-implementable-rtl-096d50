// semp_dcache: L1 data cache, 8 KB, 2-way set-associative, 16-byte blocks,
// shared by both threads.
//
// Capacity, associativity, block size and the one-cycle hit follow the
// document's cache table. 256 sets; index = address bits [11:4], tag = bits
// [31:12]; one LRU bit per set chooses the victim. Reads that miss fetch the
// block from main memory into the LRU way and are answered from the
// returned block in the cycle it arrives (the request goes out in the
// lookup cycle: 10 cycles with the controller idle, at most 17 if it has just
// begun a refresh).
// Writes go through to memory (write-through, no allocation on a write miss)
// and update the cached word on a hit; the write is answered when memory has
// taken it. The write policy is this design's choice: the document does not
// give one. Words are big-endian within the block: byte offset 0 is bits
// [127:120] of the block and bits [31:24] of a word.
//
// Interface: req_valid/req_ready with word address, byte enables (bit 3 =
// lowest address byte) and write data; rsp_valid one cycle after acceptance
// on a read hit, later otherwise. mem_* is the block port to the DDR-SDRAM
// controller.
module semp_dcache
  import semp_pkg::*;
#(
  parameter int unsigned SIZE_BYTES  = 8192,
  parameter int unsigned BLOCK_BYTES = 16,
  parameter int unsigned WAYS        = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,
  input  logic [3:0]  req_be,
  input  word_t       req_addr,
  input  word_t       req_wdata,
  output logic        rsp_valid,
  output word_t       rsp_rdata,
  output logic        miss,       // strobe: a read lookup missed
  output logic        hit_strobe, // strobe: a lookup hit
  output mem_req_t    mem_req,
  input  logic        mem_gnt,
  input  mem_rsp_t    mem_rsp
);
  localparam int unsigned SETS = SIZE_BYTES / BLOCK_BYTES / WAYS;
  localparam int unsigned IW   = $clog2(SETS);
  localparam int unsigned TW   = 32 - 4 - IW;

  typedef enum logic [2:0] {S_IDLE, S_RREQ, S_RWAIT, S_WREQ, S_WWAIT} st_e;
  st_e st;
  logic [127:0]  data [WAYS][SETS];
  logic [TW-1:0] tag  [WAYS][SETS];
  logic [SETS-1:0] vld [WAYS];
  logic [SETS-1:0] lru;             // way to replace next
  logic          lv, lwe;
  logic [3:0]    lbe;
  word_t         la, lwd;
  logic [IW-1:0] idx;
  logic [WAYS-1:0] way_hit;
  logic          hit, hway;
  logic [1:0]    wsel;
  logic [127:0]  line, wline;
  logic [15:0]   lbe16;

  assign idx  = la[4 +: IW];
  assign wsel = la[3:2];
  always_comb
    for (int w = 0; w < WAYS; w++) way_hit[w] = lv && vld[w][idx] && tag[w][idx] == la[31 -: TW];
  assign hit  = |way_hit;
  assign hway = way_hit[1];
  logic fill;
  assign fill = (st == S_RWAIT) && mem_rsp.valid;
  assign line = fill ? mem_rsp.rdata : data[hway][idx];
  assign rsp_rdata = line[127 - 32*wsel -: 32];

  // the write word merged into the line, and its byte enables in the block
  always_comb begin
    wline = line;
    lbe16 = '0;
    for (int b = 0; b < 4; b++)
      if (lbe[3-b]) begin
        wline[127 - 32*wsel - 8*b -: 8] = lwd[31 - 8*b -: 8];
        lbe16[15 - 4*wsel - b] = 1'b1;
      end
  end

  assign req_ready  = (st == S_IDLE) && (!lv || (hit && !lwe));
  assign rsp_valid  = ((st == S_IDLE) && lv && hit && !lwe) || fill || (st == S_WWAIT && mem_rsp.valid);
  assign miss       = (st == S_IDLE) && lv && !lwe && !hit;
  assign hit_strobe = (st == S_IDLE) && lv && hit;

  always_comb begin
    mem_req       = '0;
    mem_req.valid = (st == S_RREQ) || (st == S_WREQ) || miss;
    mem_req.we    = (st == S_WREQ);
    mem_req.line  = la[31:4];
    mem_req.be    = lbe16;
    mem_req.wdata = {4{lwd}};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; lv <= 1'b0; lwe <= 1'b0; lbe <= '0; la <= '0; lwd <= '0;
      for (int w = 0; w < WAYS; w++) vld[w] <= '0;
      lru <= '0;
    end else begin
      unique case (st)
        S_IDLE: begin
          if (lv && lwe) begin
            if (hit) begin
              data[hway][idx] <= wline;
              lru[idx] <= !hway;
            end
            st <= S_WREQ;
          end else if (miss) begin
            st <= mem_gnt ? S_RWAIT : S_RREQ;
          end else begin
            if (lv && hit) lru[idx] <= !hway;
            lv <= req_valid;
            if (req_valid) begin
              la <= req_addr; lwe <= req_we; lbe <= req_be; lwd <= req_wdata;
            end
          end
        end
        S_RREQ:  if (mem_gnt) st <= S_RWAIT;
        S_RWAIT: if (mem_rsp.valid) begin
          data[lru[idx]][idx] <= mem_rsp.rdata;
          tag[lru[idx]][idx]  <= la[31 -: TW];
          vld[lru[idx]][idx]  <= 1'b1;
          lru[idx] <= !lru[idx];
          lv <= 1'b0;
          st <= S_IDLE;
        end
        S_WREQ:  if (mem_gnt) st <= S_WWAIT;
        S_WWAIT: if (mem_rsp.valid) begin
          st <= S_IDLE;
          lv <= 1'b0;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
