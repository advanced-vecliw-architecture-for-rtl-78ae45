// vecliw_forward: forward unit of the VecLIW execute stage.
//
// The execute stage has eight source operands (RS and RT of four lanes).
// For each, this unit compares its physical register with the four
// destinations waiting in EX/MEM and the four in MEM/WB and replaces the
// value read in the decode stage with the newest result: EX/MEM (the
// instruction just ahead) wins over MEM/WB, and among the lanes of one
// stage the highest lane wins, matching the register file's write order.
// An EX/MEM entry that is a load is skipped, since its data is not yet
// read; a use right behind a load must be one VLIW later (the compiler
// schedules it, there is no interlock). The document draws the unit and
// its operand muxes but does not describe them; this logic is the usual
// one for a five-stage pipeline.
//
// Purely combinational. fwd_ex / fwd_wb flag which operands were forwarded.
module vecliw_forward
  import vecliw_pkg::*;
#(
  parameter int unsigned NSRC = 8,
  parameter int unsigned NDST = 4
) (
  input  preg_t [NSRC-1:0] src_addr,
  input  word_t [NSRC-1:0] src_val,      // value read in decode
  input  logic  [NDST-1:0] ex_wr,        // EX/MEM Wr2Reg
  input  logic  [NDST-1:0] ex_load,      // EX/MEM result comes from memory
  input  preg_t [NDST-1:0] ex_dst,
  input  word_t [NDST-1:0] ex_val,       // AluOut in EX/MEM
  input  logic  [NDST-1:0] wb_wr,        // MEM/WB Wr2Reg
  input  preg_t [NDST-1:0] wb_dst,
  input  word_t [NDST-1:0] wb_val,       // WbResult
  output word_t [NSRC-1:0] op_val,
  output logic  [NSRC-1:0] fwd_ex,
  output logic  [NSRC-1:0] fwd_wb
);
  always_comb begin
    for (int s = 0; s < NSRC; s++) begin
      op_val[s] = src_val[s];
      fwd_ex[s] = 1'b0;
      fwd_wb[s] = 1'b0;
      for (int d = 0; d < NDST; d++) begin
        if (wb_wr[d] && wb_dst[d] == src_addr[s]) begin
          op_val[s] = wb_val[d];
          fwd_wb[s] = 1'b1;
        end
      end
      for (int d = 0; d < NDST; d++) begin
        if (ex_wr[d] && !ex_load[d] && ex_dst[d] == src_addr[s]) begin
          op_val[s] = ex_val[d];
          fwd_ex[s] = 1'b1;
          fwd_wb[s] = 1'b0;
        end
      end
    end
  end
endmodule
