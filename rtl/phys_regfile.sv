// phys_regfile: the integer physical register file, with the port count of a
// 4-wide machine (8 read ports, 4 write ports) and, by default, 50 registers:
// the size at which dead-value reclamation reaches its best performance,
// against 64 without it. The data width (32 bits) is this design's choice.
//
// Reads are combinational. Writes take effect at the clock edge; if two
// write ports name the same register in one cycle, the higher-numbered port
// wins. All registers reset to zero.
module phys_regfile #(
  parameter int unsigned PHYS   = 50,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned NREAD  = 8,
  parameter int unsigned NWRITE = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(PHYS)-1:0] raddr [NREAD],
  output logic [DATA_W-1:0]       rdata [NREAD],
  input  logic                    we    [NWRITE],
  input  logic [$clog2(PHYS)-1:0] waddr [NWRITE],
  input  logic [DATA_W-1:0]       wdata [NWRITE]
);

  logic [DATA_W-1:0] regs [PHYS];

  always_comb
    for (int r = 0; r < NREAD; r++)
      rdata[r] = (int'(raddr[r]) < PHYS) ? regs[raddr[r]] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < PHYS; i++) regs[i] <= '0;
    end else begin
      for (int w = 0; w < NWRITE; w++)
        if (we[w] && int'(waddr[w]) < PHYS) regs[waddr[w]] <= wdata[w];
    end
  end

endmodule
