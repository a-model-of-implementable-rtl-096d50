// semp_ddr_ctrl: DDR-SDRAM controller for the 32 MB main memory.
//
// Serves 16-byte block requests from NREQ requesters: port 0 the instruction
// cache, port 1 the data cache, port 2 the program loader. As the document
// specifies, an instruction-cache request wins over a simultaneous
// data-cache request, and the data cache waits until the instruction-cache
// operation has finished; the loader has the lowest priority. One operation
// is in progress at a time.
//
// Memory device (this design's choice; the document only says 32 MB
// DDR-SDRAM): a x16 part with 4 banks, 8192 rows and 512 columns, burst
// length 8, so one burst is exactly one 16-byte block. Byte address bits
// [9:1] are the column, [11:10] the bank, [24:12] the row. Every access is
// ACTIVE, wait T_RCD, READ or WRITE with auto-precharge, then the burst; a
// read's data arrive CL cycles after the command. Writes drive their data
// in the four cycles after the WRITE command with the unwritten bytes masked.
// An AUTO REFRESH is issued every T_REFI cycles between accesses. After
// reset the JEDEC start-up sequence runs: wait T_INIT, PRECHARGE ALL,
// extended mode register (DLL on), mode register (DLL reset, CL, BL 8),
// PRECHARGE ALL, two AUTO REFRESH, mode register again.
//
// The data bus is presented as two 16-bit halves per clock (dq_*[0] for the
// rising edge, dq_*[1] for the falling edge); the FPGA's double-data-rate
// I/O registers and the DQS strobe, which are device-specific, sit outside
// this module. Byte order is big-endian: beat i carries block bytes 2i
// (bits 15:8) and 2i+1.
//
// Timing, from request to response with the memory idle: request seen in
// cycle 0, ACTIVE in 1, READ in 1+T_RCD, data in 1+T_RCD+CL .. +3, response
// the cycle after the last beat (9 cycles with the defaults).
module semp_ddr_ctrl
  import semp_pkg::*;
#(
  parameter int unsigned NREQ   = 3,
  parameter int unsigned T_INIT = 16000, // 200 us at 80 MHz
  parameter int unsigned T_RP   = 2,
  parameter int unsigned T_RCD  = 2,
  parameter int unsigned T_RFC  = 6,
  parameter int unsigned T_MRD  = 2,
  parameter int unsigned T_WR   = 2,
  parameter int unsigned CL     = 2,
  parameter int unsigned T_REFI = 600
) (
  input  logic                   clk,
  input  logic                   rst,
  input  mem_req_t [NREQ-1:0]    req,
  output logic [NREQ-1:0]        gnt,
  output mem_rsp_t [NREQ-1:0]    rsp,
  output logic                   init_done,
  output logic                   refresh_strobe,
  // SDRAM pins
  output logic                   ddr_cke,
  output logic                   ddr_cs_n,
  output logic                   ddr_ras_n,
  output logic                   ddr_cas_n,
  output logic                   ddr_we_n,
  output logic [1:0]             ddr_ba,
  output logic [12:0]            ddr_a,
  output logic                   ddr_dq_oe,
  output logic [1:0][15:0]       ddr_dq_o,
  output logic [1:0][1:0]        ddr_dm_o,
  input  logic [1:0][15:0]       ddr_dq_i
);
  typedef enum logic [3:0] {
    S_INIT, S_PREA1, S_EMRS, S_MRS1, S_PREA2, S_REF1, S_REF2, S_MRS2,
    S_IDLE, S_RCD, S_RDAT, S_WDAT, S_TAIL, S_REF
  } st_e;
  // command encodings {cs_n, ras_n, cas_n, we_n}
  localparam logic [3:0] C_NOP = 4'b0111, C_ACT = 4'b0011, C_RD = 4'b0101, C_WR = 4'b0100,
                         C_PRE = 4'b0010, C_REF = 4'b0001, C_MRS = 4'b0000;

  st_e          st;
  logic [15:0]  wait_cnt;
  logic [15:0]  ref_cnt;
  logic         ref_due;
  logic [3:0]   cmd;
  logic [1:0]   cur;        // requester being served
  mem_req_t     op;
  logic [3:0]   beat;
  logic [127:0] rbuf;
  logic [NREQ-1:0] rsp_v;
  logic [NREQ-1:0] pick;
  logic         any;

  assign {ddr_cs_n, ddr_ras_n, ddr_cas_n, ddr_we_n} = cmd;
  assign init_done = (st >= S_IDLE);

  // fixed priority: lowest port first (instruction cache)
  always_comb begin
    pick = '0; any = 1'b0;
    for (int i = 0; i < NREQ; i++)
      if (req[i].valid && !any) begin pick[i] = 1'b1; any = 1'b1; end
  end
  assign gnt = (st == S_IDLE && !ref_due) ? pick : '0;
  assign refresh_strobe = (st == S_IDLE && ref_due);

  always_comb
    for (int i = 0; i < NREQ; i++) begin
      rsp[i].valid = rsp_v[i];
      rsp[i].rdata = rbuf;
    end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_INIT; wait_cnt <= 16'(T_INIT); ref_cnt <= '0; ref_due <= 1'b0;
      cmd <= C_NOP; ddr_cke <= 1'b0; ddr_ba <= '0; ddr_a <= '0;
      ddr_dq_oe <= 1'b0; ddr_dq_o <= '0; ddr_dm_o <= '0;
      cur <= '0; op <= '0; beat <= '0; rbuf <= '0; rsp_v <= '0;
    end else begin
      cmd       <= C_NOP;
      rsp_v     <= '0;
      ddr_dq_oe <= 1'b0;
      ddr_cke   <= 1'b1;
      if (wait_cnt != 0) wait_cnt <= wait_cnt - 16'd1;
      if (st >= S_IDLE) begin
        if (ref_cnt == 16'(T_REFI - 1)) begin ref_cnt <= '0; ref_due <= 1'b1; end
        else ref_cnt <= ref_cnt + 16'd1;
      end
      unique case (st)
        S_INIT:  if (wait_cnt == 0) begin
          cmd <= C_PRE; ddr_a <= 13'h0400; st <= S_PREA1; wait_cnt <= 16'(T_RP);
        end
        S_PREA1: if (wait_cnt == 0) begin
          cmd <= C_MRS; ddr_ba <= 2'b01; ddr_a <= '0; st <= S_EMRS; wait_cnt <= 16'(T_MRD);
        end
        S_EMRS:  if (wait_cnt == 0) begin
          cmd <= C_MRS; ddr_ba <= 2'b00;
          ddr_a <= 13'h0100 | (13'(CL) << 4) | 13'h3;  // DLL reset, CAS latency, BL 8
          st <= S_MRS1; wait_cnt <= 16'(T_MRD);
        end
        S_MRS1:  if (wait_cnt == 0) begin
          cmd <= C_PRE; ddr_a <= 13'h0400; st <= S_PREA2; wait_cnt <= 16'(T_RP);
        end
        S_PREA2: if (wait_cnt == 0) begin
          cmd <= C_REF; st <= S_REF1; wait_cnt <= 16'(T_RFC);
        end
        S_REF1:  if (wait_cnt == 0) begin
          cmd <= C_REF; st <= S_REF2; wait_cnt <= 16'(T_RFC);
        end
        S_REF2:  if (wait_cnt == 0) begin
          cmd <= C_MRS; ddr_ba <= 2'b00; ddr_a <= (13'(CL) << 4) | 13'h3;
          st <= S_MRS2; wait_cnt <= 16'(T_MRD);
        end
        S_MRS2:  if (wait_cnt == 0) begin
          st <= S_IDLE; ref_cnt <= '0; ref_due <= 1'b0;
        end
        S_IDLE: begin
          if (ref_due) begin
            cmd <= C_REF; st <= S_REF; wait_cnt <= 16'(T_RFC); ref_due <= 1'b0;
          end else if (any) begin
            for (int i = 0; i < NREQ; i++) if (pick[i]) begin cur <= 2'(i); op <= req[i]; end
            for (int i = 0; i < NREQ; i++) if (pick[i]) begin
              ddr_ba <= req[i].line[11:10];
              ddr_a  <= req[i].line[24:12];
            end
            cmd <= C_ACT; st <= S_RCD; wait_cnt <= 16'(T_RCD);
          end
        end
        S_RCD: if (wait_cnt == 1) begin
          // column command, auto-precharge (A10)
          cmd   <= op.we ? C_WR : C_RD;
          ddr_a <= 13'h0400 | {4'b0, op.line[9:4], 3'b000};
          beat  <= '0;
          st    <= op.we ? S_WDAT : S_RDAT;
          wait_cnt <= 16'(CL);
        end
        S_RDAT: begin
          if (wait_cnt == 0) begin
            rbuf[127 - 32*beat -: 16] <= ddr_dq_i[0];
            rbuf[111 - 32*beat -: 16] <= ddr_dq_i[1];
            beat <= beat + 4'd1;
            if (beat == 4'd3) begin
              rsp_v[cur] <= 1'b1;
              st <= S_TAIL; wait_cnt <= 16'(T_RP);
            end
          end
        end
        S_WDAT: begin
          ddr_dq_oe   <= 1'b1;
          ddr_dq_o[0] <= op.wdata[127 - 32*beat -: 16];
          ddr_dq_o[1] <= op.wdata[111 - 32*beat -: 16];
          ddr_dm_o[0] <= ~op.be[15 - 4*beat -: 2];
          ddr_dm_o[1] <= ~op.be[13 - 4*beat -: 2];
          beat <= beat + 4'd1;
          if (beat == 4'd3) begin st <= S_TAIL; wait_cnt <= 16'(T_WR + T_RP + 1); end
        end
        S_TAIL: if (wait_cnt == 0) begin
          if (op.we) rsp_v[cur] <= 1'b1;
          st <= S_IDLE;
        end
        S_REF:  if (wait_cnt == 0) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
