// semp_prf: shared physical register file (RR and RW stages).
//
// 92 registers of 32 bits shared by both threads, as in the processor's
// resource table. NRD combinational read ports; NWR write ports written on
// the clock edge. A read of a register that a write port is writing in the
// same cycle returns the new value (write-through forwarding), which is one of
// the processor's bypass paths. All registers reset to zero, so the two
// registers that hold r0 of each thread read as zero for ever (they are never
// allocated). Port counts are this design's choice.
module semp_prf
  import semp_pkg::*;
#(
  parameter int unsigned NRD = 8,
  parameter int unsigned NWR = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  preg_t [NRD-1:0]      raddr,
  output word_t [NRD-1:0]      rdata,
  output logic  [NRD-1:0]      rfwd,   // read port was served by forwarding
  input  logic  [NWR-1:0]      we,
  input  preg_t [NWR-1:0]      waddr,
  input  word_t [NWR-1:0]      wdata
);
  word_t regs [NPREG];

  always_comb
    for (int r = 0; r < NRD; r++) begin
      rdata[r] = regs[raddr[r]];
      rfwd[r]  = 1'b0;
      for (int w = 0; w < NWR; w++)
        if (we[w] && waddr[w] == raddr[r]) begin
          rdata[r] = wdata[w];
          rfwd[r]  = 1'b1;
        end
    end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NPREG; i++) regs[i] <= '0;
    end else begin
      for (int w = 0; w < NWR; w++)
        if (we[w]) regs[waddr[w]] <= wdata[w];
    end
  end
endmodule
