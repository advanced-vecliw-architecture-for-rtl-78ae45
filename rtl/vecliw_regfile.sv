// vecliw_regfile: unified scalar/vector register file of VecLIW.
//
// 64 x 32-bit registers arranged as 8 banks (B0..B7) of 8 elements. The
// same storage is read as 64 scalars or as eight 8-element vectors; the
// physical index of a register is {Bn, element}. Each cycle it serves
// eight reads (RS and RT of four lanes, 2 x 4 x 32 bits) and four writes
// (4 x 32 bits, each with its own Wr2Reg enable), as in the document.
// This design's choices: a read of a register being written in the same
// cycle returns the new value (write-through, so the write-back stage and
// the decode stage can share a cycle); when two write ports name the same
// register the higher-numbered port wins; all registers reset to zero.
//
// Timing: reads are combinational; writes occur on the rising clock edge.
module vecliw_regfile #(
  parameter int unsigned NREGS       = 64,
  parameter int unsigned READ_PORTS  = 8,
  parameter int unsigned WRITE_PORTS = 4
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [READ_PORTS-1:0][$clog2(NREGS)-1:0]  rd_addr,
  output logic [READ_PORTS-1:0][31:0]           rd_data,
  input  logic [WRITE_PORTS-1:0]                wr_en,      // Wr2Reg
  input  logic [WRITE_PORTS-1:0][$clog2(NREGS)-1:0] wr_addr,
  input  logic [WRITE_PORTS-1:0][31:0]          wr_data
);
  logic [31:0] regs [NREGS];

  always_comb begin
    for (int r = 0; r < READ_PORTS; r++) begin
      rd_data[r] = regs[rd_addr[r]];
      for (int w = 0; w < WRITE_PORTS; w++) begin
        if (wr_en[w] && wr_addr[w] == rd_addr[r]) rd_data[r] = wr_data[w];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      for (int w = 0; w < WRITE_PORTS; w++) begin
        if (wr_en[w]) regs[wr_addr[w]] <= wr_data[w];
      end
    end
  end
endmodule
