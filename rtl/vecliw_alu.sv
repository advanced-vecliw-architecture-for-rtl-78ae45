// vecliw_alu: one of the four execution units of VecLIW.
//
// A 32-bit integer unit that applies the operation chosen by the control
// unit to operand a (RsVal) and operand b (RtVal or ImmVal, selected in
// front of it). The same unit serves a scalar slot of a VLIW or one
// element of a vector. For loads and stores unit 1 adds RsVal1 and ImmVal1
// to form the effective address. The document does not list the
// operations; this set (add, sub, and, or, xor, nor, set-less-than signed
// and unsigned, shifts by b[4:0], 32-bit multiply) is this design's.
//
// Purely combinational.
module vecliw_alu
  import vecliw_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_SLL:  y = a << b[4:0];
      ALU_SRL:  y = a >> b[4:0];
      ALU_SRA:  y = 32'($signed(a) >>> b[4:0]);
      ALU_MUL:  y = a * b;
      default:  y = a + b;
    endcase
  end
endmodule
