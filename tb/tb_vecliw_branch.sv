// tb_vecliw_branch: self-checking test of branch and jump resolution.
// Random NPC, register value (often zero), offset and jump field for BEQZ,
// BNEZ, J and no branch; taken and target are compared with values
// computed here (offset in 16-byte instructions).
module tb_vecliw_branch;
  logic is_beqz, is_bnez, is_j, taken;
  logic [31:0] npc, rs_val, imm_val, target;
  logic [25:0] jaddr;
  int checks = 0, failures = 0;

  vecliw_branch dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int kind;
      logic exp_t;
      logic [31:0] exp_a;
      int signed off;
      kind = i % 4;
      is_beqz = kind == 0; is_bnez = kind == 1; is_j = kind == 2;
      npc = {$urandom, 4'b0};
      rs_val = ($urandom % 2) ? 0 : $urandom;
      off = int'($urandom % 16384) - 8192;
      imm_val = 32'(off);
      jaddr = 26'($urandom);
      #1;
      exp_t = (kind == 2) || (kind == 0 && rs_val == 0) || (kind == 1 && rs_val != 0);
      exp_a = (kind == 2) ? {npc[31:30], jaddr, 4'b0} : 32'(npc + off * 16);
      checks++;
      if (taken !== exp_t || (exp_t && target !== exp_a)) begin
        failures++;
        $display("FAIL kind=%0d rs=%h off=%0d taken=%b target=%h expected %b %h",
                 kind, rs_val, off, taken, target, exp_t, exp_a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
