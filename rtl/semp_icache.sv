// semp_icache: L1 instruction cache, 8 KB, direct-mapped, 16-byte blocks.
//
// Capacity, associativity and block size follow the document's cache table;
// a hit answers in one cycle. 512 lines; index = address bits [12:4], tag =
// bits [31:13]. Each request asks for the aligned 8-byte pair of instructions
// at req_addr (bit 3 selects the half of the block); rsp_data[63:32] is the
// word at the lower address (big-endian order). On a miss the whole block is
// read from main memory through the DDR-SDRAM controller (mem_*), written into
// the line and answered from the returned block. Blocking, one request at a time;
// a new request is accepted in the same cycle a hit is answered.
//
// Timing: request accepted in cycle 0 (req_valid && req_ready), rsp_valid in
// cycle 1 on a hit. On a miss the block request goes out in cycle 1 and the
// answer is given in the cycle the memory returns the block (cycle 10 with
// the DDR-SDRAM controller idle, up to tRFC + tRP later when a refresh is in
// progress), straight from the returned block while it is written. Line
// storage is written as arrays, which the FPGA maps onto block RAM as the
// document does. The cache never writes memory, so the write fields of
// mem_req (we, be, wdata) are constant zero; they exist because the request
// format is shared with the data cache and the loader.
module semp_icache
  import semp_pkg::*;
#(
  parameter int unsigned SIZE_BYTES  = 8192,
  parameter int unsigned BLOCK_BYTES = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req_valid,
  output logic        req_ready,
  input  word_t       req_addr,
  output logic        rsp_valid,
  output logic [63:0] rsp_data,
  output logic        miss,       // strobe: a lookup missed
  output mem_req_t    mem_req,
  input  logic        mem_gnt,
  input  mem_rsp_t    mem_rsp
);
  localparam int unsigned LINES = SIZE_BYTES / BLOCK_BYTES;
  localparam int unsigned IW    = $clog2(LINES);
  localparam int unsigned TW    = 32 - 4 - IW;

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} st_e;
  st_e st;
  logic [127:0]  data [LINES];
  logic [TW-1:0] tag  [LINES];
  logic [LINES-1:0] vld;
  logic          lv;
  word_t         la;
  logic [IW-1:0] idx;
  logic          hit;

  assign idx = la[4 +: IW];
  assign hit = lv && vld[idx] && tag[idx] == la[31 -: TW];

  logic [127:0] line;
  logic         fill;
  assign fill      = (st == S_WAIT) && mem_rsp.valid;
  assign line      = fill ? mem_rsp.rdata : data[idx];
  assign req_ready = (st == S_IDLE) && (!lv || hit);
  assign rsp_valid = ((st == S_IDLE) && hit) || fill;
  assign rsp_data  = la[3] ? line[63:0] : line[127:64];
  assign miss      = (st == S_IDLE) && lv && !hit;

  // the block request goes out in the lookup cycle that misses
  always_comb begin
    mem_req       = '0;
    mem_req.valid = (st == S_REQ) || miss;
    mem_req.line  = la[31:4];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; lv <= 1'b0; la <= '0; vld <= '0;
    end else begin
      unique case (st)
        S_IDLE: begin
          if (miss) st <= mem_gnt ? S_WAIT : S_REQ;
          else if (req_ready) begin
            lv <= req_valid;
            if (req_valid) la <= req_addr;
          end
        end
        S_REQ:  if (mem_gnt) st <= S_WAIT;
        S_WAIT: if (mem_rsp.valid) begin
          data[idx] <= mem_rsp.rdata;
          tag[idx]  <= la[31 -: TW];
          vld[idx]  <= 1'b1;
          lv        <= 1'b0;
          st        <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
