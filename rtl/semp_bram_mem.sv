// semp_bram_mem: block-RAM main memory of the stand-alone model.
//
// In the stand-alone model the processor runs directly from on-chip block RAM
// with no cache: 16 KB, the size the document reports for this model. The
// memory is two banks of 32-bit words (even and odd word addresses), so the
// instruction port reads an aligned 8-byte pair in one access while the data
// port reads or writes one word with byte enables. A loader port takes the
// loader's one-word block writes (same request format as the DDR-SDRAM
// controller) and is served before the data port. Addresses wrap modulo the
// size. All ports answer one cycle after the request (block RAM registered
// read) and are always ready. Storage is eight byte-wide RAMs (two banks of
// four byte lanes), each with one write port, so byte enables need no
// read-modify-write and each lane maps onto plain block RAM.
module semp_bram_mem
  import semp_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384
) (
  input  logic        clk,
  input  logic        rst,
  // instruction port
  input  logic        ireq_valid,
  output logic        ireq_ready,
  input  word_t       ireq_addr,
  output logic        irsp_valid,
  output logic [63:0] irsp_data,
  // data port
  input  logic        dreq_valid,
  output logic        dreq_ready,
  input  logic        dreq_we,
  input  logic [3:0]  dreq_be,
  input  word_t       dreq_addr,
  input  word_t       dreq_wdata,
  output logic        drsp_valid,
  output word_t       drsp_rdata,
  // loader port
  input  mem_req_t    lreq,
  output logic        lgnt,
  output mem_rsp_t    lrsp
);
  localparam int unsigned PAIRS = SIZE_BYTES / 8;
  localparam int unsigned AW    = $clog2(PAIRS);

  logic [AW-1:0] ia, da;
  logic          dsel;
  logic [3:0]    lbe;
  word_t         lwd;
  logic          lsel;
  logic          use_l;

  assign ireq_ready = 1'b1;
  assign dreq_ready = !lreq.valid;
  assign lgnt       = lreq.valid;
  assign use_l      = lreq.valid;

  // loader word: which of the four enable nibbles is set
  always_comb begin
    lbe = '0; lwd = lreq.wdata[127:96]; lsel = 1'b0;
    for (int w = 0; w < 4; w++)
      if (lreq.be[15 - 4*w -: 4] != 4'b0) begin
        lbe  = lreq.be[15 - 4*w -: 4];
        lwd  = lreq.wdata[127 - 32*w -: 32];
        lsel = w[0];
      end
  end

  // one write port per cycle: the loader word, else a data-port store
  logic          wen;
  logic          wsel;
  logic [AW-1:0] wa;
  logic [3:0]    wbe;
  word_t         wd;
  always_comb begin
    if (use_l) begin
      wen = 1'b1; wsel = lsel; wa = {lreq.line[4 +: AW-1], lreq.be[15:8] == 8'b0}; wbe = lbe; wd = lwd;
    end else begin
      wen = dreq_valid && dreq_we; wsel = dreq_addr[2]; wa = dreq_addr[3 +: AW]; wbe = dreq_be; wd = dreq_wdata;
    end
  end

  // bank 0 holds the word at the lower address of each pair
  word_t iword [2];
  word_t dword [2];
  for (genvar w = 0; w < 2; w++) begin : g_bank
    for (genvar b = 0; b < 4; b++) begin : g_lane   // lane 0 = most significant byte
      logic [7:0] ram [PAIRS];
      always_ff @(posedge clk)
        if (wen && wsel == 1'(w) && wbe[3-b]) ram[wa] <= wd[31 - 8*b -: 8];
      assign iword[w][31 - 8*b -: 8] = ram[ia];
      assign dword[w][31 - 8*b -: 8] = ram[da];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      irsp_valid <= 1'b0; drsp_valid <= 1'b0; lrsp <= '0;
      ia <= '0; da <= '0; dsel <= 1'b0;
    end else begin
      irsp_valid <= ireq_valid;
      if (ireq_valid) ia <= ireq_addr[3 +: AW];
      drsp_valid <= dreq_valid && !use_l;
      lrsp.valid <= use_l;
      if (!use_l && dreq_valid) begin
        da   <= dreq_addr[3 +: AW];
        dsel <= dreq_addr[2];
      end
    end
  end

  assign irsp_data  = {iword[0], iword[1]};
  assign drsp_rdata = dword[dsel];
endmodule
