// tb_vecliw_fetch: self-checking test of the program counter.
// Checks reset to 0, the +16 step, holding while PcUpEn is low, loading the
// branch target (which wins over PcUpEn) and NPC = PC + 16, against a
// reference PC kept in the testbench.
module tb_vecliw_fetch;
  logic clk = 0, rst_n = 0, pc_up_en = 0, br_taken = 0;
  logic [31:0] br_addr = 0, pc, npc, ref_pc;
  int checks = 0, failures = 0;

  vecliw_fetch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      checks++;
      if (pc !== ref_pc || npc !== ref_pc + 32'd16) begin
        failures++;
        $display("FAIL cycle %0d pc=%h npc=%h expected %h", i, pc, npc, ref_pc);
      end
      pc_up_en = ($urandom % 4) != 0;
      br_taken = ($urandom % 8) == 0;
      br_addr  = {$urandom, 4'b0000};
      if (br_taken)      ref_pc = br_addr;
      else if (pc_up_en) ref_pc = ref_pc + 16;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
