// vecliw_control: instruction decoder of the VecLIW control unit.
//
// Takes the 128-bit VLIW from the IF/ID register and decodes each of its
// four 32-bit instructions into a slot_dec_t: operand types from the SV
// field, ALU operation, whether the second operand is the immediate and
// whether that is sign- or zero-extended, the register write enable
// (Wr2Reg) and whether the destination is RD (R-format) or RT (I-format),
// and for slot 1 only the memory and control-flow operations.
//
// Slot rules, from the document: only slot 1 may hold a vector, memory or
// control instruction; slots 2-4 are scalar. This design's choices where
// the document is silent: an instruction a slot may not hold is decoded
// as a NOP; when slot 1 holds a vector or a control instruction, slots 2-4
// are not executed (a vector uses all four execution units, and a control
// instruction encodes one operation); a load or store uses RS as a scalar
// base and the SV[0] bit makes it a vector access of RT.
//
// Purely combinational.
module vecliw_control
  import vecliw_pkg::*;
(
  input  logic                    valid,      // IF/ID holds an instruction
  input  logic [127:0]            vliw,
  output slot_dec_t [LANES-1:0]   dec,
  output logic                    slot1_vec,  // slot 1 is a vector instruction
  output logic                    slot1_mem   // slot 1 is a load or store
);
  function automatic slot_dec_t decode_one(input logic [31:0] ins, input logic first);
    slot_dec_t d;
    logic [1:0] sv;
    logic [3:0] op;
    sv = ins[31:30];
    op = ins[29:26];
    d = '0;
    unique case (op)
      OP_RALU: begin
        if (ins[7:0] <= 8'(ALU_MUL)) begin
          d.active    = 1'b1;
          d.rs_vec    = sv[1];
          d.rt_vec    = sv[0];
          d.dst_vec   = |sv;
          d.alu_op    = alu_op_e'(ins[3:0]);
          d.wr_reg    = 1'b1;
          d.dst_is_rd = 1'b1;
        end
      end
      OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SLTI: begin
        d.active  = 1'b1;
        d.rs_vec  = sv[1];
        d.dst_vec = |sv;
        d.use_imm = 1'b1;
        d.sgn_ext = (op == OP_ADDI) || (op == OP_SLTI);
        d.wr_reg  = 1'b1;
        unique case (op)
          OP_ADDI: d.alu_op = ALU_ADD;
          OP_ANDI: d.alu_op = ALU_AND;
          OP_ORI:  d.alu_op = ALU_OR;
          OP_XORI: d.alu_op = ALU_XOR;
          default: d.alu_op = ALU_SLT;
        endcase
      end
      OP_LW: begin
        d.active  = first;
        d.dst_vec = sv[0];
        d.use_imm = 1'b1;
        d.sgn_ext = 1'b1;
        d.alu_op  = ALU_ADD;
        d.wr_reg  = first;
        d.mem_rd  = first;
      end
      OP_SW: begin
        d.active  = first;
        d.rt_vec  = sv[0];
        d.use_imm = 1'b1;
        d.sgn_ext = 1'b1;
        d.alu_op  = ALU_ADD;
        d.mem_wr  = first;
      end
      OP_BEQZ: begin d.active = first; d.sgn_ext = 1'b1; d.is_beqz = first; end
      OP_BNEZ: begin d.active = first; d.sgn_ext = 1'b1; d.is_bnez = first; end
      OP_J:     begin d.active = first; d.is_j = first; end
      OP_SETVL: begin d.active = first; d.is_setvl = first; end
      default: d = '0;
    endcase
    // Slots 2-4 hold scalar operations only.
    if (!first && (d.rs_vec || d.rt_vec || d.dst_vec)) d = '0;
    return d;
  endfunction

  slot_dec_t [LANES-1:0] raw;
  logic slot1_ctrl;

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      raw[k] = decode_one(vliw[32*k +: 32], k == 0);
    end
    slot1_vec  = valid && (raw[0].rs_vec || raw[0].rt_vec || raw[0].dst_vec);
    slot1_mem  = valid && (raw[0].mem_rd || raw[0].mem_wr);
    slot1_ctrl = raw[0].is_beqz || raw[0].is_bnez || raw[0].is_j || raw[0].is_setvl;
    for (int k = 0; k < LANES; k++) begin
      if (!valid || (k != 0 && (slot1_vec || slot1_ctrl))) dec[k] = '0;
      else                                                 dec[k] = raw[k];
    end
  end
endmodule
