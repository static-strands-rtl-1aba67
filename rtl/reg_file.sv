// reg_file: multi-ported integer register file.
//
// NREGS words of XLEN bits, NR combinational read ports and NW write ports
// written at the rising clock edge. Register 0 always reads as zero and
// ignores writes. A read in the same cycle as a write to the same register
// returns the old value; the core never needs the new one in that cycle
// because a consumer is woken up only at the edge that performs the write.
// All registers are cleared by reset.
//
// Follows the document: 64 entries, two write ports (two results per cycle)
// and four read ports for two instructions of two inputs each; the core adds
// one more read port to inspect architectural state. This design's own
// choices: the zero register, reset to zero and the write-port priority
// (a higher-numbered port wins, which never matters in the core).
module reg_file #(
  parameter int NREGS = 64,
  parameter int XLEN  = 32,
  parameter int NR    = 4,
  parameter int NW    = 2
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [NR-1:0][$clog2(NREGS)-1:0]     raddr,
  output logic [NR-1:0][XLEN-1:0]              rdata,
  input  logic [NW-1:0]                        we,
  input  logic [NW-1:0][$clog2(NREGS)-1:0]     waddr,
  input  logic [NW-1:0][XLEN-1:0]              wdata
);

  logic [XLEN-1:0] regs [NREGS];

  always_comb begin
    for (int r = 0; r < NR; r++) begin
      rdata[r] = (raddr[r] == '0) ? '0 : regs[raddr[r]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      for (int w = 0; w < NW; w++) begin
        if (we[w] && waddr[w] != '0) regs[waddr[w]] <= wdata[w];
      end
    end
  end

endmodule
