// tb_vecliw_vec_seq: self-checking test of the vector sequencer.
// For every vector length 1..8 (set with SETVL) and for ALU and memory
// vectors with random start indices, it holds the vector instruction while
// `stall` is high, as IF/ID does, and checks each group: start indices
// Si + 4j mod 8, immediate + 16j for memory (unchanged for ALU), lanes
// enabled for elements below v, and ceil(v/4) groups in all. It also checks
// scalar pass-through, the reset value of VLR and the clamping of SETVL.
module tb_vecliw_vec_seq;
  logic clk = 0, rst_n = 0;
  logic valid = 0, is_vec = 0, is_mem = 0, setvl = 0;
  logic [2:0] rs_si = 0, rt_si = 0, rd_si = 0, rs_cur, rt_cur, rd_cur;
  logic [31:0] imm_val = 0, imm_cur;
  logic [13:0] setvl_val = 0;
  logic [3:0] lane_en;
  logic stall;
  logic [3:0] vlr;
  int checks = 0, failures = 0;

  vecliw_vec_seq dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_setvl(input int v);
    @(negedge clk);
    valid = 1; is_vec = 0; is_mem = 0; setvl = 1; setvl_val = 14'(v);
    @(negedge clk);
    setvl = 0; valid = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(vlr == 8, "VLR resets to MVL");
    do_setvl(0);  chk(vlr == 1, "SETVL 0 clamps to 1");
    do_setvl(20); chk(vlr == 8, "SETVL 20 clamps to 8");
    // Scalar pass-through.
    valid = 1; is_vec = 0; rs_si = 3; rt_si = 5; rd_si = 6; imm_val = 32'h1234;
    #1;
    chk(rs_cur == 3 && rt_cur == 5 && rd_cur == 6 && imm_cur == 32'h1234 && lane_en == 4'hf && !stall,
        "scalar pass-through");
    for (int rep = 0; rep < 40; rep++) begin
      int v, groups;
      logic mem;
      logic [2:0] s0, s1, s2;
      logic [31:0] im;
      v = 1 + rep % 8;
      mem = rep[3];
      do_setvl(v);
      chk(vlr == 4'(v), "SETVL value");
      s0 = 3'($urandom); s1 = 3'($urandom); s2 = 3'($urandom); im = $urandom;
      valid = 1; is_vec = 1; is_mem = mem; rs_si = s0; rt_si = s1; rd_si = s2; imm_val = im;
      groups = 0;
      forever begin
        logic [3:0] exp_en;
        #1;
        for (int k = 0; k < 4; k++) exp_en[k] = (4 * groups + k) < v;
        chk(rs_cur == 3'(s0 + 4 * groups) && rt_cur == 3'(s1 + 4 * groups) && rd_cur == 3'(s2 + 4 * groups),
            $sformatf("counters v=%0d group=%0d", v, groups));
        chk(imm_cur == (mem ? im + 32'(16 * groups) : im), $sformatf("ImmCounter v=%0d group=%0d", v, groups));
        chk(lane_en == exp_en, $sformatf("lane enables v=%0d group=%0d got %b", v, groups, lane_en));
        groups++;
        if (!stall) break;
        @(negedge clk);
      end
      chk(groups == (v + 3) / 4, $sformatf("v=%0d took %0d groups", v, groups));
      @(negedge clk);
      // The next instruction starts fresh.
      is_vec = 0; #1;
      chk(rs_cur == s0 && !stall, "fresh start after vector");
      valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
