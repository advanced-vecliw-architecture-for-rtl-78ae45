// vecliw_vec_seq: vector sequencer of the VecLIW decode stage.
//
// Holds the vector length register (VLR) and the RScounter, RTcounter,
// RDcounter and ImmCounter of the document. For a scalar VLIW it passes
// the start indices (Si) and ImmVal1 of slot 1 through and enables all
// four lanes. For a vector instruction in slot 1 it issues the v elements
// (v = VLR) in ceil(v/4) groups of four, one group per cycle: group j uses
// start indices Si + 4j (mod 8, the round-robin order inside a bank) and
// enables only lanes whose element number is below v. While more groups
// follow, it raises `stall`, which holds the PC and the IF/ID register.
// Following the document, the counters advance by 4 and the immediate by
// 16. This design's choices: the immediate advances only for loads and
// stores (for an ALU-immediate vector the constant stays the same); VLR
// resets to MVL and is written by the SETVL instruction, whose value is
// clamped to 1..MVL.
//
// Timing: outputs are combinational from the decoded slot 1 and the
// counter state; counters and VLR update on the rising clock edge.
module vecliw_vec_seq #(
  parameter int unsigned MVL   = 8,
  parameter int unsigned LANES = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,       // IF/ID holds an instruction
  input  logic        is_vec,      // slot 1 is a vector instruction
  input  logic        is_mem,      // slot 1 is a load or store
  input  logic [2:0]  rs_si,       // RS.Si of slot 1
  input  logic [2:0]  rt_si,       // RT.Si of slot 1
  input  logic [2:0]  rd_si,       // RD.Si of slot 1
  input  logic [31:0] imm_val,     // extended ImmVal1
  input  logic        setvl,       // slot 1 is SETVL
  input  logic [13:0] setvl_val,   // its immediate
  output logic [2:0]  rs_cur,      // RScounter value used this cycle
  output logic [2:0]  rt_cur,
  output logic [2:0]  rd_cur,
  output logic [31:0] imm_cur,     // ImmCounter value used this cycle
  output logic [LANES-1:0] lane_en,
  output logic        stall,       // more groups of this vector follow
  output logic [$clog2(MVL+1)-1:0] vlr
);
  localparam int unsigned VW = $clog2(MVL+1);

  logic          busy;
  logic [2:0]    rs_cnt, rt_cnt, rd_cnt;
  logic [31:0]   imm_cnt;
  logic [VW-1:0] remain, cur_remain;

  assign rs_cur     = busy ? rs_cnt  : rs_si;
  assign rt_cur     = busy ? rt_cnt  : rt_si;
  assign rd_cur     = busy ? rd_cnt  : rd_si;
  assign imm_cur    = busy ? imm_cnt : imm_val;
  assign cur_remain = busy ? remain  : vlr;
  assign stall      = valid && is_vec && (cur_remain > VW'(LANES));

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      lane_en[k] = !is_vec || (VW'(k) < cur_remain);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      rs_cnt  <= '0;
      rt_cnt  <= '0;
      rd_cnt  <= '0;
      imm_cnt <= '0;
      remain  <= '0;
      vlr     <= VW'(MVL);
    end else begin
      if (stall) begin
        busy    <= 1'b1;
        rs_cnt  <= rs_cur + 3'(LANES);
        rt_cnt  <= rt_cur + 3'(LANES);
        rd_cnt  <= rd_cur + 3'(LANES);
        imm_cnt <= imm_cur + (is_mem ? 32'd16 : 32'd0);
        remain  <= cur_remain - VW'(LANES);
      end else begin
        busy <= 1'b0;
      end
      if (valid && setvl) begin
        if (setvl_val == '0)              vlr <= VW'(1);
        else if (setvl_val > 14'(MVL))    vlr <= VW'(MVL);
        else                              vlr <= setvl_val[VW-1:0];
      end
    end
  end
endmodule
