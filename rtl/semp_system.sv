// semp_system: the SEMP SMT processor system for a Spartan-3 class FPGA board.
//
// MODEL = 0 (default): the processor with its memory hierarchy. SEMP
// (semp_core) fetches through an 8 KB direct-mapped L1 instruction cache and
// loads/stores through an 8 KB 2-way L1 data cache; both caches fill from the
// board's 32 MB DDR-SDRAM through the DDR-SDRAM controller, which gives the
// instruction cache priority. The USB loader first writes the program into
// the DDR-SDRAM through the same controller and then releases the core.
//
// MODEL = 1: the stand-alone model. The core runs straight from 16 KB of
// on-chip block RAM (semp_bram_mem), which the USB loader fills; the DDR pins
// stay idle.
//
// Both arrangements follow the document's two board models; MODEL is this
// design's way of holding both in one top. Ports: the USB interface chip's
// receive FIFO (usb_*), the DDR-SDRAM pins (ddr_*, data as rising/falling
// halves, see semp_ddr_ctrl), and status: run (loading finished), halted per
// thread, per-cycle event strobes of the core and of the memory system.
module semp_system
  import semp_pkg::*;
#(
  parameter int unsigned MODEL     = 0,
  parameter logic [31:0] RESET_PC0 = 32'h0000_0000,
  parameter logic [31:0] RESET_PC1 = 32'h0000_1000,
  parameter int unsigned T_INIT    = 16000,
  parameter int unsigned T_REFI    = 600
) (
  input  logic              clk,
  input  logic              rst,
  // USB interface chip
  input  logic              usb_rxf_n,
  output logic              usb_rd_n,
  input  logic [7:0]        usb_d,
  // DDR-SDRAM
  output logic              ddr_cke,
  output logic              ddr_cs_n,
  output logic              ddr_ras_n,
  output logic              ddr_cas_n,
  output logic              ddr_we_n,
  output logic [1:0]        ddr_ba,
  output logic [12:0]       ddr_a,
  output logic              ddr_dq_oe,
  output logic [1:0][15:0]  ddr_dq_o,
  output logic [1:0][1:0]   ddr_dm_o,
  input  logic [1:0][15:0]  ddr_dq_i,
  // status
  output logic              run,
  output logic [1:0]        halted,
  output perf_t             perf,
  output logic [4:0]        mem_events  // {refresh, I-over-D stall, D hit, D miss, I miss}
);
  logic        ireq_valid, ireq_ready, irsp_valid;
  word_t       ireq_addr;
  logic [63:0] irsp_data;
  logic        dreq_valid, dreq_ready, dreq_we, drsp_valid;
  logic [3:0]  dreq_be;
  word_t       dreq_addr, dreq_wdata, drsp_rdata;
  mem_req_t    ld_req;
  logic        ld_gnt;
  mem_rsp_t    ld_rsp;
  logic [31:0] words_loaded;

  semp_core #(.RESET_PC0(RESET_PC0), .RESET_PC1(RESET_PC1)) u_core (
    .clk, .rst, .run,
    .ireq_valid, .ireq_ready, .ireq_addr, .irsp_valid, .irsp_data,
    .dreq_valid, .dreq_ready, .dreq_we, .dreq_be, .dreq_addr, .dreq_wdata,
    .drsp_valid, .drsp_rdata, .halted, .perf);

  semp_usb_loader u_usb (.clk, .rst, .usb_rxf_n, .usb_rd_n, .usb_d,
    .mem_req(ld_req), .mem_gnt(ld_gnt), .mem_rsp(ld_rsp), .start(run), .words_loaded);

  if (MODEL == 0) begin : g_cached
    mem_req_t [2:0] mreq;
    logic [2:0]     mgnt;
    mem_rsp_t [2:0] mrsp;
    logic imiss, dmiss, dhit, refr;

    semp_icache u_ic (.clk, .rst, .req_valid(ireq_valid), .req_ready(ireq_ready),
      .req_addr(ireq_addr), .rsp_valid(irsp_valid), .rsp_data(irsp_data), .miss(imiss),
      .mem_req(mreq[0]), .mem_gnt(mgnt[0]), .mem_rsp(mrsp[0]));

    semp_dcache u_dc (.clk, .rst, .req_valid(dreq_valid), .req_ready(dreq_ready),
      .req_we(dreq_we), .req_be(dreq_be), .req_addr(dreq_addr), .req_wdata(dreq_wdata),
      .rsp_valid(drsp_valid), .rsp_rdata(drsp_rdata), .miss(dmiss), .hit_strobe(dhit),
      .mem_req(mreq[1]), .mem_gnt(mgnt[1]), .mem_rsp(mrsp[1]));

    assign mreq[2] = ld_req;
    assign ld_gnt  = mgnt[2];
    assign ld_rsp  = mrsp[2];

    semp_ddr_ctrl #(.T_INIT(T_INIT), .T_REFI(T_REFI)) u_ddr (.clk, .rst, .req(mreq), .gnt(mgnt),
      .rsp(mrsp), .init_done(), .refresh_strobe(refr),
      .ddr_cke, .ddr_cs_n, .ddr_ras_n, .ddr_cas_n, .ddr_we_n, .ddr_ba, .ddr_a,
      .ddr_dq_oe, .ddr_dq_o, .ddr_dm_o, .ddr_dq_i);

    assign mem_events = {refr, mreq[0].valid && mreq[1].valid && mgnt[0], dhit, dmiss, imiss};
  end else begin : g_standalone
    semp_bram_mem u_bram (.clk, .rst,
      .ireq_valid, .ireq_ready, .ireq_addr, .irsp_valid, .irsp_data,
      .dreq_valid, .dreq_ready, .dreq_we, .dreq_be, .dreq_addr, .dreq_wdata,
      .drsp_valid, .drsp_rdata, .lreq(ld_req), .lgnt(ld_gnt), .lrsp(ld_rsp));
    assign {ddr_cke, ddr_cs_n, ddr_ras_n, ddr_cas_n, ddr_we_n} = 5'b01111;
    assign ddr_ba = '0;
    assign ddr_a = '0;
    assign ddr_dq_oe = 1'b0;
    assign ddr_dq_o = '0;
    assign ddr_dm_o = '0;
    assign mem_events = '0;
  end
endmodule
