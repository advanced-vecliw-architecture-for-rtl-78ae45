// tb_vecliw_top: end-to-end test of the VecLIW processor at its default
// sizes.
//
// The testbench assembles a program into the instruction memory: a fixed
// part that runs a three-pass loop (vector load, vector add, vector store,
// counter decrement, BNEZ), a taken BEQZ, SETVL to 5 and 3 with vectors
// whose start index wraps round the bank, unsigned and signed immediates
// and a J; then a long random part of four-wide scalar VLIWs, .sv/.vs/.vv
// vector ALU operations at random lengths, and scalar and vector loads and
// stores; it ends in a jump to itself. Four such programs, each with its
// own random part and initial data, are run one after another with a reset
// in between. The program obeys the scheduling
// rules of the design (one VLIW between a load and its use, three between
// the write of a branch register and the branch).
//
// An instruction-level model in this file executes the same program: a
// VLIW's four slots read the old register values and write in slot order;
// a vector runs in groups of four elements, each group seeing the results
// of the earlier ones. At the end the register file (rebuilt from the
// processor's write-back ports) and the whole data memory are compared
// with the model. The number of cycles until the final jump reaches decode
// is checked against one cycle per VLIW plus ceil(VLR/4) - 1 extra cycles
// per vector and one per taken branch or jump. Each mechanism (vector
// stall, partial vector, start-index wrap, forwarding from EX/MEM and from
// MEM/WB, taken and untaken branches, jumps, scalar and vector loads and
// stores, SETVL) must occur at least once.
module tb_vecliw_top;
  import vecliw_pkg::*;
  import vecliw_asm_pkg::*;

  localparam int IMEM = 256;
  localparam int DMEM = 1024;

  logic clk = 0, rst_n = 0;
  logic imem_we = 0, dmem_ext_we = 0;
  logic [31:0] imem_addr = 0, dmem_ext_addr = 0, dmem_ext_wdata = 0, dmem_ext_rdata, pc;
  logic [127:0] imem_wdata = 0;
  logic stall;
  logic [3:0] vlr;
  logic [3:0] wb_en;
  preg_t [3:0] wb_addr;
  word_t [3:0] wb_data;

  vecliw_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [127:0] prog [IMEM];
  word_t mreg [64];          // model registers, index {Bn, element}
  word_t mmem [DMEM];        // model data memory (words)
  word_t shadow [64];        // registers rebuilt from the write-back ports
  int    mvlr;
  int    halt_idx;

  // Event counters.
  int n_stall = 0, n_partial = 0, n_fwd_ex = 0, n_fwd_wb = 0, n_br_taken = 0;
  int n_br_not = 0, n_jump = 0, n_lds = 0, n_ldv = 0, n_sts = 0, n_stv = 0;
  int n_wrap = 0, n_setvl = 0, n_vliw = 0, exp_cycles = 0;

  function automatic word_t alu_model(int f, word_t a, word_t b);
    case (f)
      0: return a + b;
      1: return a - b;
      2: return a & b;
      3: return a | b;
      4: return a ^ b;
      5: return ~(a | b);
      6: return (signed'(a) < signed'(b)) ? 1 : 0;
      7: return (a < b) ? 1 : 0;
      8: return a << b[4:0];
      9: return a >> b[4:0];
      10: return word_t'(signed'(a) >>> b[4:0]);
      default: return a * b;
    endcase
  endfunction

  function automatic int preg(logic [5:0] f, int off);
    return int'(f[2:0]) * 8 + ((int'(f[5:3]) + off) % 8);
  endfunction

  function automatic word_t sext14(logic [13:0] i);
    return {{18{i[13]}}, i};
  endfunction

  // Runs one VLIW in the model; returns the next instruction index.
  function automatic int model_step(int pc_i);
    logic [31:0] in;
    logic [1:0] sv;
    logic [3:0] op;
    int nxt;
    in = prog[pc_i][31:0];
    sv = in[31:30];
    op = in[29:26];
    nxt = pc_i + 1;
    n_vliw++;
    exp_cycles++;
    if (op == OP_BEQZ || op == OP_BNEZ) begin
      logic z, t;
      z = mreg[preg(in[25:20], 0)] == 0;
      t = (op == OP_BEQZ) ? z : !z;
      if (t) begin nxt = pc_i + 1 + int'(signed'(in[13:0])); n_br_taken++; exp_cycles++; end
      else n_br_not++;
    end else if (op == OP_J) begin
      nxt = int'(in[25:0]); n_jump++; exp_cycles++;
    end else if (op == OP_SETVL) begin
      int v;
      v = int'(in[13:0]);
      mvlr = (v == 0) ? 1 : (v > 8 ? 8 : v);
      n_setvl++;
    end else if (((op == OP_RALU || (op >= OP_ADDI && op <= OP_SLTI)) && sv != 0) ||
                 ((op == OP_LW || op == OP_SW) && sv[0])) begin
      // Vector in slot 1: groups of four elements.
      for (int g = 0; g * 4 < mvlr; g++) begin
        word_t res [4];
        int    dst [4];
        logic  we [4];
        if (g > 0) exp_cycles++;
        for (int k = 0; k < 4; k++) begin
          int e;
          word_t a, b;
          e = g * 4 + k;
          we[k] = 0;
          if (e < mvlr) begin
            if ((int'(in[25:23]) + e) >= 8 || (int'(in[19:17]) + e) >= 8) n_wrap++;
            a = mreg[sv[1] && op != OP_LW && op != OP_SW ? preg(in[25:20], e) : preg(in[25:20], 0)];
            if (op == OP_RALU) begin
              b = mreg[sv[0] ? preg(in[19:14], e) : preg(in[19:14], 0)];
              res[k] = alu_model(int'(in[3:0]), a, b); dst[k] = preg(in[13:8], e); we[k] = 1;
            end else if (op == OP_LW) begin
              res[k] = mmem[((a + sext14(in[13:0])) >> 2) + e]; dst[k] = preg(in[19:14], e); we[k] = 1;
            end else if (op == OP_SW) begin
              mmem[((a + sext14(in[13:0])) >> 2) + e] = mreg[preg(in[19:14], e)];
            end else begin
              word_t im;
              im = (op == OP_ADDI || op == OP_SLTI) ? sext14(in[13:0]) : {18'd0, in[13:0]};
              case (op)
                OP_ADDI: res[k] = a + im;
                OP_ANDI: res[k] = a & im;
                OP_ORI:  res[k] = a | im;
                OP_XORI: res[k] = a ^ im;
                default: res[k] = (signed'(a) < signed'(im)) ? 1 : 0;
              endcase
              dst[k] = preg(in[19:14], e); we[k] = 1;
            end
          end
        end
        for (int k = 0; k < 4; k++) if (we[k]) mreg[dst[k]] = res[k];
      end
      if (op == OP_LW) n_ldv++;
      if (op == OP_SW) n_stv++;
    end else begin
      // Up to four scalar operations; all read before any writes.
      word_t res [4];
      int    dst [4];
      logic  we [4];
      for (int k = 0; k < 4; k++) begin
        logic [31:0] s;
        word_t a, b, im;
        logic [3:0] o;
        s = prog[pc_i][32*k +: 32];
        o = s[29:26];
        we[k] = 0;
        a = mreg[preg(s[25:20], 0)];
        b = mreg[preg(s[19:14], 0)];
        im = (o == OP_ADDI || o == OP_SLTI || o == OP_LW || o == OP_SW) ? sext14(s[13:0]) : {18'd0, s[13:0]};
        if (s[31:30] == 0) begin
          case (o)
            OP_RALU: begin res[k] = alu_model(int'(s[3:0]), a, b); dst[k] = preg(s[13:8], 0); we[k] = 1; end
            OP_ADDI: begin res[k] = a + im; dst[k] = preg(s[19:14], 0); we[k] = 1; end
            OP_ANDI: begin res[k] = a & im; dst[k] = preg(s[19:14], 0); we[k] = 1; end
            OP_ORI:  begin res[k] = a | im; dst[k] = preg(s[19:14], 0); we[k] = 1; end
            OP_XORI: begin res[k] = a ^ im; dst[k] = preg(s[19:14], 0); we[k] = 1; end
            OP_SLTI: begin res[k] = (signed'(a) < signed'(im)) ? 1 : 0; dst[k] = preg(s[19:14], 0); we[k] = 1; end
            OP_LW: if (k == 0) begin res[k] = mmem[(a + im) >> 2]; dst[k] = preg(s[19:14], 0); we[k] = 1; n_lds++; end
            OP_SW: if (k == 0) begin mmem[(a + im) >> 2] = b; n_sts++; end
            default: ;
          endcase
        end
      end
      for (int k = 0; k < 4; k++) if (we[k]) mreg[dst[k]] = res[k];
    end
    return nxt;
  endfunction

  // ------------------------------------------------------------ program
  function automatic logic [31:0] rand_scalar();
    logic [5:0] d, a, b;
    d = r($urandom % 8, $urandom % 7);   // never bank 7 (base and loop counter)
    a = r($urandom % 8, $urandom % 8);
    b = r($urandom % 8, $urandom % 8);
    case ($urandom % 7)
      0: return itype(SV_SS, OP_ADDI, d, a, int'($urandom % 16384));
      1: return itype(SV_SS, op_e'(OP_ANDI + $urandom % 4), d, a, int'($urandom % 16384));
      2: return NOP;
      default: return rtype(SV_SS, alu_op_e'($urandom % 12), d, a, b);
    endcase
  endfunction

  task automatic build_program();
    int i;
    i = 0;
    // Prologue: base address, loop counter, unsigned and signed immediates.
    prog[i++] = pack(itype(SV_SS, OP_ADDI, r(0,7), r(0,0), 256), itype(SV_SS, OP_ADDI, r(1,7), r(0,0), 3),
                     itype(SV_SS, OP_ORI, r(1,0), r(0,0), 14'h3fff), itype(SV_SS, OP_ADDI, r(2,0), r(0,0), -1));
    prog[i++] = pack(NOP);
    // Loop (index 2): vector load, add, vector store, decrement, branch back.
    prog[i++] = pack(itype(SV_SV, OP_LW, r(0,1), r(0,7), 0));
    prog[i++] = pack(itype(SV_SS, OP_ADDI, r(1,7), r(1,7), -1), rtype(SV_SS, ALU_ADD, r(3,0), r(1,0), r(2,0)));
    prog[i++] = pack(rtype(SV_VV, ALU_ADD, r(2,2), r(0,1), r(0,1)));
    prog[i++] = pack(itype(SV_SV, OP_SW, r(2,2), r(0,7), 64));
    prog[i++] = pack(itype(SV_SS, OP_ADDI, r(0,7), r(0,7), 32), rtype(SV_SS, ALU_SLT, r(4,0), r(2,0), r(1,0)));
    prog[i++] = pack(itype(SV_SS, OP_BNEZ, r(0,0), r(1,7), -6));
    // Taken BEQZ over one VLIW.
    prog[i++] = pack(itype(SV_SS, OP_BEQZ, r(0,0), r(1,7), 1));
    prog[i++] = pack(itype(SV_SS, OP_ADDI, r(6,6), r(0,0), 99));
    // Short vectors whose start index wraps round the bank.
    prog[i++] = pack(setvl(5));
    prog[i++] = pack(rtype(SV_SV, ALU_SUB, r(5,3), r(1,0), r(6,1)));
    prog[i++] = pack(setvl(3));
    prog[i++] = pack(itype(SV_VV, OP_XORI, r(7,4), r(5,3), 14'h2aaa));
    prog[i++] = pack(itype(SV_SS, OP_LW, r(5,5), r(0,7), 8), rand_scalar(), rand_scalar(), rand_scalar());
    prog[i++] = pack(itype(SV_SS, OP_SW, r(1,0), r(0,7), 12), rand_scalar(), rand_scalar(), rand_scalar());
    prog[i++] = pack(setvl(8));
    prog[i] = pack(jtype(i + 2));
    i++;
    prog[i++] = pack(itype(SV_SS, OP_ADDI, r(7,6), r(0,0), 99));
    // Random part.
    while (i < IMEM - 3) begin
      int kind;
      kind = $urandom % 20;
      if (kind < 6) begin
        prog[i++] = pack(rand_scalar(), rand_scalar(), rand_scalar(), rand_scalar());
      end else if (kind < 10) begin
        sv_e sv;
        sv = sv_e'(1 + $urandom % 3);
        if ($urandom % 2)
          prog[i++] = pack(rtype(sv, alu_op_e'($urandom % 12), r($urandom % 8, $urandom % 7),
                                 r($urandom % 8, $urandom % 8), r($urandom % 8, $urandom % 8)));
        else
          prog[i++] = pack(itype(sv, op_e'(OP_ADDI + $urandom % 5), r($urandom % 8, $urandom % 7),
                                 r($urandom % 8, $urandom % 8), int'($urandom % 16384)));
      end else if (kind < 12) begin
        prog[i++] = pack(setvl(1 + $urandom % 8));
      end else if (kind < 16) begin
        logic vec, ld;
        int off;
        vec = $urandom % 2;
        ld  = $urandom % 2;
        off = 4 * int'($urandom % 256);
        prog[i++] = pack(itype(vec ? SV_SV : SV_SS, ld ? OP_LW : OP_SW, r($urandom % 8, $urandom % 7), r(0,7), off),
                         vec ? NOP : rand_scalar(), vec ? NOP : rand_scalar(), vec ? NOP : rand_scalar());
        if (ld) prog[i++] = pack(NOP);
      end else begin
        prog[i++] = pack(rand_scalar(), rand_scalar());
      end
    end
    halt_idx = i;
    prog[i] = pack(jtype(i));
    i++;
    while (i < IMEM) prog[i++] = pack(NOP);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Event counters from the processor.
  int cycle = 0, halt_cycle = -1;
  always @(posedge clk) if (!rst_n) begin
    cycle <= 0;
  end else begin
    cycle <= cycle + 1;
    if (stall) n_stall++;
    if (dut.slot1_vec && dut.lane_en != 4'hf) n_partial++;
    n_fwd_ex += $countones(dut.fwd_ex);
    n_fwd_wb += $countones(dut.fwd_wb);
    if (halt_cycle < 0 && dut.ifid.valid && dut.ifid.vliw == prog[halt_idx]) halt_cycle = cycle;
    for (int k = 0; k < 4; k++) if (wb_en[k]) shadow[wb_addr[k]] = wb_data[k];
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int RUNS = 4;

  task automatic run_program(input int run);
    int mpc, steps;
    rst_n = 0;
    halt_cycle = -1;
    exp_cycles = 0;
    build_program();
    for (int k = 0; k < 64; k++) begin mreg[k] = 0; shadow[k] = 0; end
    for (int w = 0; w < DMEM; w++) mmem[w] = word_t'(w) * 32'h9e37_79b9 + 32'(run * 17 + 32'h1234);
    mvlr = 8;
    // Load both memories while the core is held in reset.
    for (int a = 0; a < IMEM; a++) begin
      @(negedge clk); imem_we = 1; imem_addr = a * 16; imem_wdata = prog[a];
    end
    @(negedge clk); imem_we = 0;
    for (int w = 0; w < DMEM; w++) begin
      @(negedge clk); dmem_ext_we = 1; dmem_ext_addr = w; dmem_ext_wdata = mmem[w];
    end
    @(negedge clk); dmem_ext_we = 0;
    // Run the model.
    mpc = 0; steps = 0;
    while (mpc != halt_idx && steps < 5000) begin mpc = model_step(mpc); steps++; end
    chk(mpc == halt_idx, "model reaches the final jump");
    // Run the processor.
    @(negedge clk); rst_n = 1;
    wait (halt_cycle >= 0);
    repeat (10) @(posedge clk);
    @(negedge clk);
    // Compare registers and memory.
    for (int k = 0; k < 64; k++)
      chk(shadow[k] == mreg[k], $sformatf("run %0d register B%0d.%0d = %h, model %h", run, k / 8, k % 8, shadow[k], mreg[k]));
    for (int w = 0; w < DMEM; w++) begin
      dmem_ext_addr = w; #1;
      chk(dmem_ext_rdata == mmem[w], $sformatf("run %0d memory word %0d = %h, model %h", run, w, dmem_ext_rdata, mmem[w]));
    end
    chk(halt_cycle == exp_cycles + 1,
        $sformatf("run %0d: final jump reached decode at cycle %0d, expected %0d", run, halt_cycle, exp_cycles + 1));
    chk(pc == 32'(halt_idx * 16) || pc == 32'(halt_idx * 16 + 16), "PC spins on the final jump");
    $display("run %0d: %0d cycles", run, halt_cycle);
  endtask

  initial begin
    for (int run = 0; run < RUNS; run++) run_program(run);
    $display("VLIWs %0d last run %0d cycles: stall %0d partial %0d wrap %0d fwd_ex %0d fwd_wb %0d taken %0d untaken %0d jump %0d",
             n_vliw, halt_cycle, n_stall, n_partial, n_wrap, n_fwd_ex, n_fwd_wb, n_br_taken, n_br_not, n_jump);
    $display("loads %0d/%0d stores %0d/%0d (scalar/vector) setvl %0d", n_lds, n_ldv, n_sts, n_stv, n_setvl);
    chk(n_stall > 0, "vector stall happened");
    chk(n_partial > 0, "partial vector happened");
    chk(n_wrap > 0, "start-index wrap happened");
    chk(n_fwd_ex > 0, "EX/MEM forwarding happened");
    chk(n_fwd_wb > 0, "MEM/WB forwarding happened");
    chk(n_br_taken > 0 && n_br_not > 0, "taken and untaken branches happened");
    chk(n_jump > 0, "jump happened");
    chk(n_lds > 0 && n_ldv > 0 && n_sts > 0 && n_stv > 0, "scalar and vector loads and stores happened");
    chk(n_setvl > 0, "SETVL happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
