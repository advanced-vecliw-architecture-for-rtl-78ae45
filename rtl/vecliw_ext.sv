// vecliw_ext: signed/unsigned extension of the four immediates.
//
// Each of the four 32-bit instructions of a VLIW carries a 14-bit
// immediate in its bits [13:0]. This unit widens the four of them to 32
// bits, each by sign extension or by zero extension under its own select
// bit (SgUnSgn, one per slot), as the document describes. Purely
// combinational.
module vecliw_ext #(
  parameter int unsigned LANES = 4,
  parameter int unsigned IMM_W = 14
) (
  input  logic [LANES-1:0][IMM_W-1:0] imm,       // raw immediates
  input  logic [LANES-1:0]            sgn,       // 1: sign-extend
  output logic [LANES-1:0][31:0]      imm_val    // ImmVal1..4
);
  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      imm_val[k] = {{(32-IMM_W){sgn[k] & imm[k][IMM_W-1]}}, imm[k]};
    end
  end
endmodule
