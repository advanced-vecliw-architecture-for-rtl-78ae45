// vecliw_fetch: program counter of the VecLIW fetch stage.
//
// The PC addresses one 128-bit VLIW instruction, so the next sequential
// address (NPC) is PC + 16. A 2:1 mux loads either NPC or the branch/jump
// target computed in the decode stage. The PC only moves when PcUpEn is
// high; the vector sequencer drops it while it issues the second half of
// a vector instruction. The PC, the +16 adder, the mux and PcUpEn are
// drawn in the document's datapath; the reset value 0 is this design's
// choice.
//
// Timing: pc and npc are valid during the cycle; the PC register updates
// on the rising clock edge.
module vecliw_fetch #(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pc_up_en,   // PcUpEn
  input  logic        br_taken,   // select BrAddr
  input  logic [31:0] br_addr,    // BrAddr from the decode stage
  output logic [31:0] pc,         // InstAddr
  output logic [31:0] npc         // PC + 16
);
  assign npc = pc + 32'd16;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pc <= RESET_PC;
    else if (br_taken) pc <= br_addr;
    else if (pc_up_en) pc <= npc;
  end
endmodule
