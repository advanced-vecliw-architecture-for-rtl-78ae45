// vecliw_branch: branch and jump resolution in the VecLIW decode stage.
//
// As drawn in the document's datapath, a 32-bit adder forms the branch
// address BrAddr from NPC and the immediate, and a Zero? test looks at
// RsVal of slot 1; the control unit then steers the PC mux. This design's
// choices: the branch offset counts 16-byte VLIW instructions (it is
// shifted left by 4); BEQZ is taken when RsVal1 is zero and BNEZ when it
// is not; J jumps to {NPC[31:30], address[25:0], 4'b0000}. A taken branch
// or jump squashes the instruction fetched behind it (one bubble).
//
// Purely combinational.
module vecliw_branch (
  input  logic        is_beqz,
  input  logic        is_bnez,
  input  logic        is_j,
  input  logic [31:0] npc,        // address of the next VLIW
  input  logic [31:0] rs_val,     // RsVal1
  input  logic [31:0] imm_val,    // sign-extended ImmVal1
  input  logic [25:0] jaddr,      // J-format address field
  output logic        taken,
  output logic [31:0] target      // BrAddr
);
  logic zero;
  assign zero = (rs_val == 32'd0);   // Zero?

  always_comb begin
    taken  = is_j || (is_beqz && zero) || (is_bnez && !zero);
    target = is_j ? {npc[31:30], jaddr, 4'b0000} : npc + {imm_val[27:0], 4'b0000};
  end
endmodule
