// semp_complex_alu: multi-cycle multiply/divide unit (the processor's single
// complex ALU).
//
// Accepts one MULT, MULTU, DIV or DIVU operation at a time (start) and iterates
// in its EX stage until the 64-bit result is ready, then writes it back in two
// register-write cycles: LO in the first, HI in the second, matching the
// "EX (looping), RW, RW" pipeline of the complex ALU. Multiplication is a
// radix-2 shift-and-add over 32 iterations; division is restoring division
// over 32 iterations on magnitudes with the signs fixed afterwards (quotient
// to LO, remainder to HI; division by zero gives quotient all ones /
// remainder equal to the dividend magnitude, sign-corrected). The iterative
// algorithms are this design's choice; the document gives only the unit and
// its looping EX stage. kill abandons the operation in flight.
//
// Timing: start in cycle 0, busy for 32 iteration cycles, wr_lo in cycle 33,
// wr_hi (done) in cycle 34.
module semp_complex_alu
  import semp_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  op_e   op,
  input  word_t a,
  input  word_t b,
  input  logic  kill,
  output logic  busy,
  output logic  wr_lo,   // LO result valid this cycle
  output logic  wr_hi,   // HI result valid this cycle (operation done)
  output word_t result
);
  typedef enum logic [1:0] {S_IDLE, S_ITER, S_LO, S_HI} st_e;
  st_e         st;
  logic [5:0]  cnt;
  logic        is_div, neg_q, neg_r;
  logic [63:0] acc;      // mult: {hi,lo} partial product; div: {rem, quotient}
  logic [31:0] opb;      // multiplicand / divisor magnitude
  logic [32:0] trial;
  logic [32:0] madd;
  word_t       hi_r;
  logic [63:0] fin;
  word_t       a_mag, b_mag;
  logic        sgn;

  assign sgn   = (op == OP_MULT) || (op == OP_DIV);
  assign a_mag = (sgn && a[31]) ? -a : a;
  assign b_mag = (sgn && b[31]) ? -b : b;
  assign trial = {acc[63:31]} - {1'b0, opb};
  assign madd  = {1'b0, acc[63:32]} + {1'b0, opb};

  assign busy   = (st != S_IDLE);
  assign wr_lo  = (st == S_LO);
  assign wr_hi  = (st == S_HI);
  assign result = (st == S_HI) ? hi_r : fin[31:0];

  always_ff @(posedge clk) begin
    if (rst || kill) begin
      st <= S_IDLE;
      cnt <= '0;
      acc <= '0; opb <= '0; is_div <= 1'b0; neg_q <= 1'b0; neg_r <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          st     <= S_ITER;
          cnt    <= 6'd0;
          is_div <= (op == OP_DIV) || (op == OP_DIVU);
          acc    <= {32'b0, a_mag};
          opb    <= b_mag;
          neg_q  <= sgn && (a[31] ^ b[31]);
          neg_r  <= sgn && a[31];
        end
        S_ITER: begin
          if (is_div) begin
            // shift {rem,quot} left, subtract divisor from the remainder if it fits
            if (!trial[32]) acc <= {trial[31:0], acc[30:0], 1'b1};
            else            acc <= {acc[62:0], 1'b0};
          end else begin
            // add multiplicand if the low bit is set, then shift right
            if (acc[0]) acc <= {madd, acc[31:1]};
            else        acc <= {1'b0, acc[63:1]};
          end
          cnt <= cnt + 6'd1;
          if (cnt == 6'd31) st <= S_LO;
        end
        S_LO: begin
          st <= S_HI;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // final sign correction; HI is held for the second write cycle
  always_comb begin
    fin = acc;
    if (is_div) begin
      fin[31:0]  = neg_q ? -acc[31:0]  : acc[31:0];
      fin[63:32] = neg_r ? -acc[63:32] : acc[63:32];
    end else if (neg_q) begin
      fin = -acc;
    end
  end
  always_ff @(posedge clk) begin
    if (rst) begin
      hi_r <= '0;
    end else if (st == S_LO) begin
      hi_r <= fin[63:32];
    end
  end
endmodule
