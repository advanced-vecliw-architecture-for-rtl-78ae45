// vecliw_pkg: shared constants and types of the VecLIW processor.
//
// A VecLIW instruction is 128 bits: four 32-bit instructions, slot 1 in
// bits [31:0] up to slot 4 in bits [127:96]. Each 32-bit instruction is in
// one of three MIPS-like formats (R, I, J). Its 6-bit opcode has an upper
// 2-bit SV field that gives the operand types (00 .ss, 01 .sv, 10 .vs,
// 11 .vv). Each 6-bit register field is {Si[2:0], Bn[2:0]}: a start
// element index and a bank number in the 8-bank x 8-element register file.
// The formats, field widths, the SV field and the register addressing
// follow the document. The 4-bit operation codes in the lower opcode
// bits, the function codes and the instruction subset are this design's
// own choice, because the document gives no encoding tables.
//
// Bit layout (bit 31 is the MSB):
//   R: opcode[31:26] RS[25:20] RT[19:14] RD[13:8] function[7:0]
//   I: opcode[31:26] RS[25:20] RT[19:14] imm[13:0]
//   J: opcode[31:26] address[25:0]
package vecliw_pkg;

  localparam int unsigned LANES   = 4;   // execution units / slots
  localparam int unsigned MVL     = 8;   // maximum vector length

  // Physical register index: {Bn, element}.
  typedef logic [5:0]  preg_t;
  typedef logic [31:0] word_t;

  // SV field (upper two opcode bits).
  typedef enum logic [1:0] {
    SV_SS = 2'b00,   // scalar-scalar
    SV_SV = 2'b01,   // scalar-vector (RT is a vector)
    SV_VS = 2'b10,   // vector-scalar (RS is a vector)
    SV_VV = 2'b11    // vector-vector
  } sv_e;

  // Lower four opcode bits.
  typedef enum logic [3:0] {
    OP_NOP   = 4'h0,   // no operation (an all-zero word is a NOP)
    OP_RALU  = 4'h1,   // R-format ALU, operation in function field
    OP_ADDI  = 4'h2,   // rt = rs + sext(imm)
    OP_ANDI  = 4'h3,   // rt = rs & zext(imm)
    OP_ORI   = 4'h4,   // rt = rs | zext(imm)
    OP_XORI  = 4'h5,   // rt = rs ^ zext(imm)
    OP_SLTI  = 4'h6,   // rt = (rs < sext(imm)) signed
    OP_LW    = 4'h8,   // rt = mem[rs + sext(imm)]  (vector with SV[0])
    OP_SW    = 4'h9,   // mem[rs + sext(imm)] = rt  (vector with SV[0])
    OP_BEQZ  = 4'hA,   // if rs == 0: pc = npc + (sext(imm) << 4)
    OP_BNEZ  = 4'hB,   // if rs != 0: pc = npc + (sext(imm) << 4)
    OP_J     = 4'hC,   // pc = {npc[31:30], address, 4'b0}
    OP_SETVL = 4'hD    // VLR = imm (clamped to 1..MVL)
  } op_e;

  // ALU operations (R-format function codes use the same values).
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_NOR  = 4'd5,
    ALU_SLT  = 4'd6,
    ALU_SLTU = 4'd7,
    ALU_SLL  = 4'd8,
    ALU_SRL  = 4'd9,
    ALU_SRA  = 4'd10,
    ALU_MUL  = 4'd11
  } alu_op_e;

  // Decoded control of one 32-bit slot (output of the control unit).
  typedef struct packed {
    logic    active;     // slot does work this VLIW
    logic    rs_vec;     // RS names a vector
    logic    rt_vec;     // RT names a vector
    logic    dst_vec;    // destination is a vector
    logic    use_imm;    // second ALU operand is ImmVal
    logic    sgn_ext;    // immediate is sign-extended
    alu_op_e alu_op;
    logic    wr_reg;     // Wr2Reg
    logic    dst_is_rd;  // destination is RD (else RT)
    logic    mem_rd;     // load (slot 1 only)
    logic    mem_wr;     // store (slot 1 only)
    logic    is_beqz;
    logic    is_bnez;
    logic    is_j;
    logic    is_setvl;
  } slot_dec_t;

  // One lane of the ID/EX register.
  typedef struct packed {
    logic    wr_reg;
    alu_op_e alu_op;
    logic    use_imm;
    preg_t   rs_addr;
    preg_t   rt_addr;
    preg_t   dst_addr;
    word_t   rs_val;
    word_t   rt_val;
    word_t   imm_val;
  } idex_lane_t;

  typedef struct packed {
    idex_lane_t [LANES-1:0] lane;
    logic                   mem_rd;
    logic                   mem_wr;
    logic [LANES-1:0]       mem_lane_en;  // words moved by a load/store
  } idex_t;

  typedef struct packed {
    logic  wr_reg;
    logic  from_mem;    // result is MemOut (load)
    preg_t dst_addr;
    word_t alu_out;
    word_t wr_data;
  } exmem_lane_t;

  typedef struct packed {
    exmem_lane_t [LANES-1:0] lane;
    logic                    mem_rd;
    logic                    mem_wr;
    logic [LANES-1:0]        mem_lane_en;
    word_t                   addr;         // effective address (lane 1)
  } exmem_t;

  typedef struct packed {
    logic  wr_reg;
    logic  from_mem;
    preg_t dst_addr;
    word_t alu_out;
    word_t mem_out;
  } memwb_lane_t;

  typedef struct packed {
    memwb_lane_t [LANES-1:0] lane;
  } memwb_t;

  typedef struct packed {
    logic         valid;
    logic [127:0] vliw;
    word_t        npc;
  } ifid_t;

  // Physical register of element `off` of the vector whose 6-bit field is
  // {Si, Bn}: element (Si + off) mod 8 of bank Bn (round-robin in the bank).
  function automatic preg_t phys_reg(input logic [5:0] field, input logic [2:0] off);
    logic [2:0] idx;
    idx = field[5:3] + off;
    return {field[2:0], idx};
  endfunction

endpackage
