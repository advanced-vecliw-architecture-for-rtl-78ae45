// vecliw_icache: instruction memory of VecLIW.
//
// Holds DEPTH instructions of 128 bits (four 32-bit instructions). It is
// read with the byte address of the PC (bits [3:0] are ignored because an
// instruction is 16 bytes) and the word appears combinationally, to be
// captured by the IF/ID register. A write port (WrEn, WrVLIW) loads a
// program. The document names the memory and its 128-bit width and its
// RdEn/WrEn/WrVLIW signals; the size and the absence of miss handling are
// this design's own choices.
//
// Timing: read is combinational; write happens on the rising clock edge.
module vecliw_icache #(
  parameter int unsigned DEPTH = 256
) (
  input  logic         clk,
  input  logic [31:0]  inst_addr,   // byte address (PC)
  output logic [127:0] vliw,
  input  logic         wr_en,       // WrEn
  input  logic [31:0]  wr_addr,     // byte address of the written word
  input  logic [127:0] wr_vliw      // WrVLIW
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [127:0] mem [DEPTH];

  assign vliw = mem[inst_addr[AW+3:4]];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr[AW+3:4]] <= wr_vliw;
  end
endmodule
