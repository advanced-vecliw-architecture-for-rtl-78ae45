// tb_vecliw_control: self-checking test of the VLIW decoder.
// Encodes instructions of every kind in each slot and checks the decoded
// fields against the expected ones written out per case: operand types from
// the SV field, immediate extension, destination choice, Wr2Reg, memory and
// control operations restricted to slot 1, and slots 2-4 dropped when slot
// 1 is a vector or control instruction or when IF/ID is empty.
module tb_vecliw_control;
  import vecliw_pkg::*;
  import vecliw_asm_pkg::*;
  logic valid;
  logic [127:0] vliw;
  slot_dec_t [3:0] dec;
  logic slot1_vec, slot1_mem;
  int checks = 0, failures = 0;

  vecliw_control dut (.*);

  task automatic expect_slot(input int k, input logic act, input logic rsv, input logic rtv,
                             input logic dv, input logic imm, input logic sg, input logic wr,
                             input logic isrd, input logic mr, input logic mw, input string what);
    slot_dec_t d;
    d = dec[k];
    checks++;
    if (d.active !== act || (act && (d.rs_vec !== rsv || d.rt_vec !== rtv || d.dst_vec !== dv ||
        d.use_imm !== imm || d.sgn_ext !== sg || d.wr_reg !== wr || d.dst_is_rd !== isrd ||
        d.mem_rd !== mr || d.mem_wr !== mw))) begin
      failures++;
      $display("FAIL %s slot %0d: %p", what, k, d);
    end
  endtask

  task automatic check_flag(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b expected %b", what, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 1;
    // Four scalar operations.
    vliw = pack(rtype(SV_SS, ALU_SUB, r(1,2), r(3,4), r(5,6)),
                itype(SV_SS, OP_ADDI, r(0,1), r(0,2), -5),
                itype(SV_SS, OP_ORI,  r(0,1), r(0,2), 5),
                rtype(SV_SS, ALU_MUL, r(1,1), r(2,2), r(3,3)));
    #1;
    expect_slot(0, 1, 0, 0, 0, 0, 0, 1, 1, 0, 0, "sub.ss");
    expect_slot(1, 1, 0, 0, 0, 1, 1, 1, 0, 0, 0, "addi.ss");
    expect_slot(2, 1, 0, 0, 0, 1, 0, 1, 0, 0, 0, "ori.ss");
    expect_slot(3, 1, 0, 0, 0, 0, 0, 1, 1, 0, 0, "mul.ss");
    checks++; if (dec[0].alu_op !== ALU_SUB || dec[3].alu_op !== ALU_MUL || dec[2].alu_op !== ALU_OR) failures++;
    check_flag(slot1_vec, 0, "scalar vec flag");
    // Vector types in slot 1 drop slots 2-4.
    for (int t = 1; t < 4; t++) begin
      vliw = pack(rtype(sv_e'(t), ALU_ADD, r(0,1), r(0,2), r(0,3)), rtype(SV_SS, ALU_ADD, r(1,1), r(1,2), r(1,3)));
      #1;
      expect_slot(0, 1, t[1], t[0], 1, 0, 0, 1, 1, 0, 0, "add vector");
      expect_slot(1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, "slot 2 behind vector");
      check_flag(slot1_vec, 1, "vector flag");
    end
    // Scalar and vector loads/stores in slot 1; a load in slot 2 is a NOP.
    vliw = pack(itype(SV_SS, OP_LW, r(0,1), r(0,2), 8), itype(SV_SS, OP_LW, r(0,1), r(0,2), 8),
                itype(SV_SS, OP_XORI, r(2,1), r(2,2), 3));
    #1;
    expect_slot(0, 1, 0, 0, 0, 1, 1, 1, 0, 1, 0, "lw.ss");
    expect_slot(1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, "lw in slot 2");
    expect_slot(2, 1, 0, 0, 0, 1, 0, 1, 0, 0, 0, "xori beside lw");
    check_flag(slot1_mem, 1, "mem flag");
    vliw = pack(itype(SV_SV, OP_SW, r(4,1), r(0,2), 16));
    #1;
    expect_slot(0, 1, 0, 1, 0, 1, 1, 0, 0, 0, 1, "sw.sv");
    check_flag(slot1_vec, 1, "vector store flag");
    vliw = pack(itype(SV_SV, OP_LW, r(4,1), r(0,2), 16));
    #1;
    expect_slot(0, 1, 0, 0, 1, 1, 1, 1, 0, 1, 0, "lw.sv");
    // A vector instruction in slot 2 is dropped.
    vliw = pack(NOP, rtype(SV_VV, ALU_ADD, r(0,1), r(0,2), r(0,3)));
    #1;
    expect_slot(1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, "vector in slot 2");
    // Control instructions: only slot 1, and the others are dropped.
    vliw = pack(itype(SV_SS, OP_BNEZ, r(0,0), r(1,1), -3), rtype(SV_SS, ALU_ADD, r(1,1), r(1,2), r(1,3)));
    #1;
    checks++; if (!dec[0].is_bnez || dec[0].is_beqz || !dec[0].sgn_ext || dec[0].wr_reg) failures++;
    expect_slot(1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, "slot 2 behind branch");
    vliw = pack(jtype(5)); #1;
    checks++; if (!dec[0].is_j || dec[0].wr_reg) failures++;
    vliw = pack(setvl(3)); #1;
    checks++; if (!dec[0].is_setvl || dec[0].wr_reg) failures++;
    vliw = pack(NOP, itype(SV_SS, OP_BEQZ, r(0,0), r(1,1), 2)); #1;
    expect_slot(1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, "branch in slot 2");
    // Empty IF/ID.
    valid = 0;
    vliw = pack(rtype(SV_SS, ALU_ADD, r(0,1), r(0,2), r(0,3))); #1;
    expect_slot(0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, "invalid");
    check_flag(slot1_mem, 0, "invalid mem flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
