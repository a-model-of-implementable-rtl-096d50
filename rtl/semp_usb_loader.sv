// semp_usb_loader: program loader behind the board's USB interface.
//
// Before the processor runs, this block copies a program from the host,
// through the USB interface chip, into main memory (the DDR-SDRAM through its
// controller, or the block-RAM main memory of the stand-alone model), and
// then starts the processor, much like a boot loader. The document states only
// this function; the chip interface and the byte format are this design's
// own:
//   * USB chip side: an asynchronous receive FIFO. rxf_n low means a byte is
//     waiting; the loader drives rd_n low for RD_CYCLES cycles, takes d at the
//     end of the strobe, and keeps rd_n high for at least one cycle between
//     bytes.
//   * Stream: records of a 4-byte start address and a 4-byte word count
//     (both most significant byte first) followed by that many 4-byte words
//     (most significant byte first). A record with count 0 ends loading:
//     start goes high and stays high until reset.
// Each word becomes a one-word write on the memory port (mem_req, block
// address with the word's four byte enables); the next byte is read once
// memory has answered.
module semp_usb_loader
  import semp_pkg::*;
#(
  parameter int unsigned RD_CYCLES = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       usb_rxf_n,
  output logic       usb_rd_n,
  input  logic [7:0] usb_d,
  output mem_req_t   mem_req,
  input  logic       mem_gnt,
  input  mem_rsp_t   mem_rsp,
  output logic       start,
  output logic [31:0] words_loaded
);
  typedef enum logic [2:0] {S_WAITB, S_STROBE, S_GAP, S_WREQ, S_WACK, S_DONE} st_e;
  typedef enum logic [1:0] {F_ADDR, F_COUNT, F_DATA} fld_e;
  st_e         st;
  fld_e        fld;
  logic [1:0]  nb;        // byte within the current 4-byte field
  logic [31:0] sh;        // bytes being assembled
  logic [31:0] addr, count;
  logic [7:0]  cyc;
  logic [31:0] word;

  assign start = (st == S_DONE);

  always_comb begin
    mem_req       = '0;
    mem_req.valid = (st == S_WREQ);
    mem_req.we    = 1'b1;
    mem_req.line  = addr[31:4];
    mem_req.be    = 16'hF000 >> (4 * addr[3:2]);
    mem_req.wdata = {4{word}};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_WAITB; fld <= F_ADDR; nb <= '0; sh <= '0; addr <= '0; count <= '0;
      cyc <= '0; word <= '0; usb_rd_n <= 1'b1; words_loaded <= '0;
    end else begin
      unique case (st)
        S_WAITB: if (!usb_rxf_n) begin
          usb_rd_n <= 1'b0; cyc <= 8'(RD_CYCLES - 1); st <= S_STROBE;
        end
        S_STROBE: begin
          if (cyc != 0) cyc <= cyc - 8'd1;
          else begin
            logic [31:0] v;
            usb_rd_n <= 1'b1;
            v  = {sh[23:0], usb_d};
            sh <= v;
            nb <= nb + 2'd1;
            st <= S_GAP;
            if (nb == 2'd3) begin
              unique case (fld)
                F_ADDR:  begin addr <= v; fld <= F_COUNT; end
                F_COUNT: begin
                  count <= v;
                  if (v == 0) st <= S_DONE;
                  else fld <= F_DATA;
                end
                default: begin word <= v; st <= S_WREQ; end
              endcase
            end
          end
        end
        S_GAP:  st <= S_WAITB;
        S_WREQ: if (mem_gnt) st <= S_WACK;
        S_WACK: if (mem_rsp.valid) begin
          words_loaded <= words_loaded + 32'd1;
          addr  <= addr + 32'd4;
          count <= count - 32'd1;
          if (count == 32'd1) fld <= F_ADDR;
          st <= S_WAITB;
        end
        default: st <= S_DONE;
      endcase
    end
  end
endmodule
