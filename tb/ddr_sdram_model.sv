// ddr_sdram_model: behavioural model of the board's 32 MB x16 DDR-SDRAM
// (4 banks x 8192 rows x 512 columns), for simulation only.
//
// It decodes the command pins on each rising clock edge, tracks the open
// row of every bank, returns read bursts of 8 beats (two per clock, as
// rising/falling halves) CL cycles after READ, and stores write bursts taken
// in the four cycles after WRITE, honouring the data masks. It counts
// protocol violations: a column command to a closed bank, ACTIVE to an open
// bank, a column command sooner than T_RCD after ACTIVE, and any access
// before the mode register has been loaded. READ/WRITE always carry
// auto-precharge in this system; without A10 the row stays open.
// ABITS sets how many 16-bit words exist (24 for the full 32 MB); higher
// addresses alias. Memory starts at zero.
module ddr_sdram_model #(
  parameter int unsigned ABITS = 24,
  parameter int unsigned CL    = 2,
  parameter int unsigned T_RCD = 2
) (
  input  logic             clk,
  input  logic             cke,
  input  logic             cs_n,
  input  logic             ras_n,
  input  logic             cas_n,
  input  logic             we_n,
  input  logic [1:0]       ba,
  input  logic [12:0]      a,
  input  logic [1:0][15:0] dq_in,   // from the controller
  input  logic [1:0][1:0]  dm,
  output logic [1:0][15:0] dq_out,  // to the controller
  output int               errors,
  output int               n_refresh,
  output int               n_act
);
  logic [15:0] mem [2**ABITS];
  logic [12:0] row [4];
  logic        open_b [4];
  int          act_time [4];
  int          cyc;
  logic        mode_set;
  // read burst state
  int          rd_wait, rd_beat;
  logic        rd_on;
  logic [23:0] rd_base;
  // write burst state
  int          wr_beat;
  logic        wr_on;
  logic [23:0] wr_base;

  function automatic logic [ABITS-1:0] wa(input logic [23:0] base, input int k);
    logic [23:0] x;
    x = {base[23:3], base[2:0] + 3'(k)};
    return x[ABITS-1:0];
  endfunction

  initial begin
    for (int i = 0; i < 2**ABITS; i++) mem[i] = '0;
    for (int b = 0; b < 4; b++) begin open_b[b] = 1'b0; row[b] = '0; act_time[b] = 0; end
    errors = 0; n_refresh = 0; n_act = 0; cyc = 0; mode_set = 1'b0;
    rd_on = 1'b0; wr_on = 1'b0; rd_wait = 0; rd_beat = 0; wr_beat = 0;
    rd_base = '0; wr_base = '0; dq_out = '0;
  end

  // word address of a 16-bit word: {row, bank, column}
  function automatic logic [23:0] waddr(input logic [1:0] b, input logic [12:0] r, input logic [8:0] c);
    return {r, b, c};
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    // read burst output
    if (rd_on) begin
      if (rd_wait > 0) rd_wait <= rd_wait - 1;
      else begin
        dq_out[0] <= mem[wa(rd_base, 2*rd_beat)];
        dq_out[1] <= mem[wa(rd_base, 2*rd_beat + 1)];
        rd_beat <= rd_beat + 1;
        if (rd_beat == 3) rd_on <= 1'b0;
      end
    end
    // write burst input
    if (wr_on) begin
      if (!dm[0][1]) mem[wa(wr_base, 2*wr_beat)][15:8]     <= dq_in[0][15:8];
      if (!dm[0][0]) mem[wa(wr_base, 2*wr_beat)][7:0]      <= dq_in[0][7:0];
      if (!dm[1][1]) mem[wa(wr_base, 2*wr_beat + 1)][15:8] <= dq_in[1][15:8];
      if (!dm[1][0]) mem[wa(wr_base, 2*wr_beat + 1)][7:0]  <= dq_in[1][7:0];
      wr_beat <= wr_beat + 1;
      if (wr_beat == 3) wr_on <= 1'b0;
    end
    if (cke && !cs_n) begin
      unique case ({ras_n, cas_n, we_n})
        3'b000: mode_set <= 1'b1;                          // (E)MRS
        3'b001: n_refresh <= n_refresh + 1;                // AUTO REFRESH
        3'b010: begin                                      // PRECHARGE
          if (a[10]) for (int b = 0; b < 4; b++) open_b[b] <= 1'b0;
          else open_b[ba] <= 1'b0;
        end
        3'b011: begin                                      // ACTIVE
          if (open_b[ba] || !mode_set) errors <= errors + 1;
          open_b[ba] <= 1'b1; row[ba] <= a; act_time[ba] <= cyc; n_act <= n_act + 1;
        end
        3'b101, 3'b100: begin                              // READ / WRITE
          if (!open_b[ba] || cyc - act_time[ba] < int'(T_RCD)) errors <= errors + 1;
          if (we_n) begin
            rd_on <= 1'b1; rd_wait <= int'(CL) - 2; rd_beat <= 0;
            rd_base <= waddr(ba, row[ba], a[8:0]);
          end else begin
            wr_on <= 1'b1; wr_beat <= 0;
            wr_base <= waddr(ba, row[ba], a[8:0]);
          end
          if (a[10]) open_b[ba] <= 1'b0;
        end
        default: ;
      endcase
    end
  end
endmodule
