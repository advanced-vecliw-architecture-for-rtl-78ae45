// vecliw_top: the VecLIW processor, a five-stage pipeline that runs
// 128-bit VLIW instructions (four 32-bit scalar operations) and vector
// instructions on the same four execution units.
//
//   IF  : PC (+16) reads the instruction memory into IF/ID.
//   ID  : the control unit decodes the four slots; the vector sequencer
//         turns a vector instruction in slot 1 into ceil(VLR/4) groups of
//         four element operations, stalling fetch meanwhile; the unified
//         register file is read at 2 x 4 ports; immediates are extended;
//         branches and jumps are resolved (one squashed fetch when taken).
//   EX  : four ALUs fed through the forward unit; unit 1 also forms the
//         load/store address (RsVal1 + ImmVal1).
//   MEM : the data memory moves up to four 32-bit words.
//   WB  : up to four results (ALU or memory) are written back.
//
// The stage split, the slot rules, the register file organisation, the
// counters and the 128-bit memory path follow the document. The
// instruction encoding, the branch semantics, the SETVL instruction, the
// memory sizes and the absence of hazard interlocks are this design's own:
// a result is forwarded to the next VLIW, a load result reaches a VLIW
// two behind it, and a branch tests a register written at least three
// VLIWs earlier; the compiler keeps these distances.
//
// External interface: imem_* loads the program, dmem_ext_* loads and reads
// the data memory (hold rst_n low while loading), pc shows the fetch
// address, wb_* shows the four write-back ports each cycle and stall
// shows the cycles in which the decode stage issues a further vector group
// and vlr the vector length register.
module vecliw_top
  import vecliw_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH  = 256,
  parameter int unsigned DMEM_WORDS  = 1024,
  parameter int unsigned MVL_P       = MVL
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  imem_we,
  input  logic [31:0]           imem_addr,
  input  logic [127:0]          imem_wdata,
  input  logic                  dmem_ext_we,
  input  logic [31:0]           dmem_ext_addr,
  input  logic [31:0]           dmem_ext_wdata,
  output logic [31:0]           dmem_ext_rdata,
  output logic [31:0]           pc,
  output logic                  stall,
  output logic [$clog2(MVL_P+1)-1:0] vlr,
  output logic [LANES-1:0]      wb_en,
  output preg_t [LANES-1:0]     wb_addr,
  output word_t [LANES-1:0]     wb_data
);
  // ---------------------------------------------------------------- IF
  logic        br_taken;
  logic [31:0] br_addr, npc;
  logic [127:0] fetched;
  ifid_t       ifid_d, ifid;

  vecliw_fetch u_fetch (
    .clk, .rst_n, .pc_up_en(!stall), .br_taken, .br_addr, .pc, .npc
  );

  vecliw_icache #(.DEPTH(IMEM_DEPTH)) u_icache (
    .clk, .inst_addr(pc), .vliw(fetched),
    .wr_en(imem_we), .wr_addr(imem_addr), .wr_vliw(imem_wdata)
  );

  assign ifid_d = '{valid: 1'b1, vliw: fetched, npc: npc};

  vecliw_pipe_reg #(.T(ifid_t)) u_ifid (
    .clk, .rst_n, .en(!stall), .flush(br_taken), .d(ifid_d), .q(ifid)
  );

  // ---------------------------------------------------------------- ID
  slot_dec_t [LANES-1:0]         dec;
  logic                          slot1_vec, slot1_mem;
  logic [LANES-1:0][13:0]        imm_raw;
  logic [LANES-1:0]              imm_sgn;
  word_t [LANES-1:0]             imm_ext;
  logic [2:0]                    rs_cur, rt_cur, rd_cur;
  word_t                         imm_cur;
  logic [LANES-1:0]              lane_en;
  logic [2*LANES-1:0][5:0]       rf_raddr;
  word_t [2*LANES-1:0]           rf_rdata;
  idex_t                         idex_d, idex;

  vecliw_control u_ctrl (
    .valid(ifid.valid), .vliw(ifid.vliw), .dec, .slot1_vec, .slot1_mem
  );

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      imm_raw[k] = ifid.vliw[32*k +: 14];
      imm_sgn[k] = dec[k].sgn_ext;
    end
  end

  vecliw_ext #(.LANES(LANES)) u_ext (.imm(imm_raw), .sgn(imm_sgn), .imm_val(imm_ext));

  vecliw_vec_seq #(.MVL(MVL_P), .LANES(LANES)) u_seq (
    .clk, .rst_n, .valid(ifid.valid), .is_vec(slot1_vec), .is_mem(slot1_mem),
    .rs_si(ifid.vliw[25:23]), .rt_si(ifid.vliw[19:17]), .rd_si(ifid.vliw[13:11]),
    .imm_val(imm_ext[0]), .setvl(dec[0].is_setvl), .setvl_val(ifid.vliw[13:0]),
    .rs_cur, .rt_cur, .rd_cur, .imm_cur, .lane_en, .stall, .vlr
  );

  // Operand and destination registers of each lane.
  slot_dec_t [LANES-1:0] lane_dec;
  preg_t     [LANES-1:0] lane_dst;

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      logic [31:0] ins;
      logic [5:0]  rs_f, rt_f, rd_f, dst_f;
      logic [2:0]  dst_cur;
      if (slot1_vec) begin
        ins         = ifid.vliw[31:0];
        lane_dec[k] = dec[0];
      end else begin
        ins         = ifid.vliw[32*k +: 32];
        lane_dec[k] = dec[k];
      end
      rs_f    = ins[25:20];
      rt_f    = ins[19:14];
      rd_f    = ins[13:8];
      dst_f   = lane_dec[k].dst_is_rd ? rd_f : rt_f;
      dst_cur = lane_dec[k].dst_is_rd ? rd_cur : rt_cur;
      rf_raddr[k]         = lane_dec[k].rs_vec ? {rs_f[2:0], rs_cur + 3'(k)} : phys_reg(rs_f, 3'd0);
      rf_raddr[LANES + k] = lane_dec[k].rt_vec ? {rt_f[2:0], rt_cur + 3'(k)} : phys_reg(rt_f, 3'd0);
      lane_dst[k]         = lane_dec[k].dst_vec ? {dst_f[2:0], dst_cur + 3'(k)} : phys_reg(dst_f, 3'd0);
    end
  end

  always_comb begin
    idex_d = '0;
    for (int k = 0; k < LANES; k++) begin
      idex_d.lane[k].rs_addr  = rf_raddr[k];
      idex_d.lane[k].rt_addr  = rf_raddr[LANES + k];
      idex_d.lane[k].dst_addr = lane_dst[k];
      idex_d.lane[k].wr_reg   = lane_dec[k].active && lane_dec[k].wr_reg && lane_en[k];
      idex_d.lane[k].alu_op   = lane_dec[k].alu_op;
      idex_d.lane[k].use_imm  = lane_dec[k].use_imm;
      idex_d.lane[k].rs_val   = rf_rdata[k];
      idex_d.lane[k].rt_val   = rf_rdata[LANES + k];
      idex_d.lane[k].imm_val  = (slot1_vec || k == 0) ? imm_cur : imm_ext[k];
    end
    idex_d.mem_rd      = dec[0].mem_rd;
    idex_d.mem_wr      = dec[0].mem_wr;
    idex_d.mem_lane_en = slot1_vec ? lane_en : 4'b0001;
  end

  // Write-back ports (driven in WB below).
  logic [LANES-1:0] wb_we;
  preg_t [LANES-1:0] wb_dst;
  word_t [LANES-1:0] wb_res;

  vecliw_regfile #(.NREGS(64), .READ_PORTS(2*LANES), .WRITE_PORTS(LANES)) u_rf (
    .clk, .rst_n, .rd_addr(rf_raddr), .rd_data(rf_rdata),
    .wr_en(wb_we), .wr_addr(wb_dst), .wr_data(wb_res)
  );

  vecliw_branch u_br (
    .is_beqz(dec[0].is_beqz), .is_bnez(dec[0].is_bnez), .is_j(dec[0].is_j),
    .npc(ifid.npc), .rs_val(rf_rdata[0]), .imm_val(imm_ext[0]),
    .jaddr(ifid.vliw[25:0]), .taken(br_taken), .target(br_addr)
  );

  vecliw_pipe_reg #(.T(idex_t)) u_idex (
    .clk, .rst_n, .en(1'b1), .flush(1'b0), .d(idex_d), .q(idex)
  );

  // ---------------------------------------------------------------- EX
  exmem_t                  exmem_d, exmem;
  memwb_t                  memwb_d, memwb;
  preg_t [2*LANES-1:0]     fw_addr;
  word_t [2*LANES-1:0]     fw_in, fw_out;
  logic  [2*LANES-1:0]     fwd_ex, fwd_wb;
  logic  [LANES-1:0]       ex_wr, ex_load;
  preg_t [LANES-1:0]       ex_dst;
  word_t [LANES-1:0]       ex_val;
  word_t [LANES-1:0]       alu_y;

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      fw_addr[k]         = idex.lane[k].rs_addr;
      fw_addr[LANES + k] = idex.lane[k].rt_addr;
      fw_in[k]           = idex.lane[k].rs_val;
      fw_in[LANES + k]   = idex.lane[k].rt_val;
      ex_wr[k]           = exmem.lane[k].wr_reg;
      ex_load[k]         = exmem.lane[k].from_mem;
      ex_dst[k]          = exmem.lane[k].dst_addr;
      ex_val[k]          = exmem.lane[k].alu_out;
    end
  end

  vecliw_forward #(.NSRC(2*LANES), .NDST(LANES)) u_fwd (
    .src_addr(fw_addr), .src_val(fw_in),
    .ex_wr, .ex_load, .ex_dst, .ex_val,
    .wb_wr(wb_we), .wb_dst, .wb_val(wb_res),
    .op_val(fw_out), .fwd_ex, .fwd_wb
  );

  for (genvar k = 0; k < LANES; k++) begin : g_alu
    vecliw_alu u_alu (
      .op(idex.lane[k].alu_op),
      .a(fw_out[k]),
      .b(idex.lane[k].use_imm ? idex.lane[k].imm_val : fw_out[LANES + k]),
      .y(alu_y[k])
    );
  end

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      exmem_d.lane[k].wr_reg   = idex.lane[k].wr_reg;
      exmem_d.lane[k].from_mem = idex.mem_rd && idex.mem_lane_en[k];
      exmem_d.lane[k].dst_addr = idex.lane[k].dst_addr;
      exmem_d.lane[k].alu_out  = alu_y[k];
      exmem_d.lane[k].wr_data  = fw_out[LANES + k];
    end
    exmem_d.mem_rd      = idex.mem_rd;
    exmem_d.mem_wr      = idex.mem_wr;
    exmem_d.mem_lane_en = idex.mem_lane_en;
    exmem_d.addr        = alu_y[0];
  end

  vecliw_pipe_reg #(.T(exmem_t)) u_exmem (
    .clk, .rst_n, .en(1'b1), .flush(1'b0), .d(exmem_d), .q(exmem)
  );

  // --------------------------------------------------------------- MEM
  logic [LANES-1:0][31:0] st_data, mem_out;

  always_comb begin
    for (int k = 0; k < LANES; k++) st_data[k] = exmem.lane[k].wr_data;
  end

  vecliw_dcache #(.DEPTH_WORDS(DMEM_WORDS)) u_dcache (
    .clk, .rd_en(exmem.mem_rd), .wr_en(exmem.mem_wr), .addr(exmem.addr),
    .lane_en(exmem.mem_lane_en), .wr_data(st_data), .mem_out,
    .ext_we(dmem_ext_we), .ext_addr(dmem_ext_addr), .ext_wdata(dmem_ext_wdata),
    .ext_rdata(dmem_ext_rdata)
  );

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      memwb_d.lane[k].wr_reg   = exmem.lane[k].wr_reg;
      memwb_d.lane[k].from_mem = exmem.lane[k].from_mem;
      memwb_d.lane[k].dst_addr = exmem.lane[k].dst_addr;
      memwb_d.lane[k].alu_out  = exmem.lane[k].alu_out;
      memwb_d.lane[k].mem_out  = mem_out[k];
    end
  end

  vecliw_pipe_reg #(.T(memwb_t)) u_memwb (
    .clk, .rst_n, .en(1'b1), .flush(1'b0), .d(memwb_d), .q(memwb)
  );

  // ---------------------------------------------------------------- WB
  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      wb_we[k]  = memwb.lane[k].wr_reg;
      wb_dst[k] = memwb.lane[k].dst_addr;
      wb_res[k] = memwb.lane[k].from_mem ? memwb.lane[k].mem_out : memwb.lane[k].alu_out;
    end
  end

  assign wb_en   = wb_we;
  assign wb_addr = wb_dst;
  assign wb_data = wb_res;

  // A vector group is only issued for an instruction in IF/ID.
  a_stall_valid: assert property (@(posedge clk) disable iff (!rst_n) stall |-> ifid.valid);
  // A taken branch never coincides with a vector stall.
  a_br_nostall:  assert property (@(posedge clk) disable iff (!rst_n) br_taken |-> !stall);
endmodule
