// vecliw_dcache: scalar/vector data memory of VecLIW.
//
// Moves four consecutive 32-bit words (128 bits) per cycle, as the
// document specifies for scalar/vector loads and stores. Word k of an
// access (k = 0..3) is at byte address addr + 4k. The memory is split
// into four word-interleaved banks (bank = word address mod 4), so the
// four words of any word-aligned access fall in four different banks and
// need only one port each; the address need not be 16-byte aligned.
// lane_en selects which words a store writes (a scalar store writes word
// 0 only, the tail of a short vector fewer than four). A separate port
// (ext_*) loads and inspects the memory from outside; an external write
// has priority over a pipeline write in the same cycle. The size, the
// banking and the external port are this design's choices; the document
// gives no cache organisation or miss handling, and none is modelled.
//
// Timing: reads are combinational (the result is registered by MEM/WB);
// writes happen on the rising clock edge.
module vecliw_dcache #(
  parameter int unsigned DEPTH_WORDS = 1024
) (
  input  logic                  clk,
  input  logic                  rd_en,      // RdEn
  input  logic                  wr_en,      // WrEn
  input  logic [31:0]           addr,       // byte address of word 0
  input  logic [3:0]            lane_en,
  input  logic [3:0][31:0]      wr_data,    // WrData
  output logic [3:0][31:0]      mem_out,    // MemOut
  input  logic                  ext_we,
  input  logic [31:0]           ext_addr,   // word address
  input  logic [31:0]           ext_wdata,
  output logic [31:0]           ext_rdata
);
  localparam int unsigned ROWS = DEPTH_WORDS / 4;
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1;

  logic [31:0] bank0 [ROWS];
  logic [31:0] bank1 [ROWS];
  logic [31:0] bank2 [ROWS];
  logic [31:0] bank3 [ROWS];

  logic [29:0]         base;
  logic [3:0][RW-1:0]  row;    // row used by bank b
  logic [3:0][1:0]     lane;   // lane served by bank b
  logic [3:0][31:0]    bank_rd;
  logic [3:0]          bank_we;
  logic [3:0][RW-1:0]  bank_wrow;
  logic [3:0][31:0]    bank_wd;

  assign base = addr[31:2];

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      logic [29:0] w;
      lane[b] = 2'(b) - base[1:0];
      w       = base + 30'(lane[b]);
      row[b]  = w[RW+1:2];
    end
    bank_rd[0] = bank0[row[0]];
    bank_rd[1] = bank1[row[1]];
    bank_rd[2] = bank2[row[2]];
    bank_rd[3] = bank3[row[3]];
    for (int k = 0; k < 4; k++) begin
      logic [1:0] b;
      b = base[1:0] + 2'(k);
      mem_out[k] = rd_en ? bank_rd[b] : 32'd0;
    end
    // Write port of each bank: the external port first, else the pipeline.
    for (int b = 0; b < 4; b++) begin
      if (ext_we && ext_addr[1:0] == 2'(b)) begin
        bank_we[b]   = 1'b1;
        bank_wrow[b] = ext_addr[RW+1:2];
        bank_wd[b]   = ext_wdata;
      end else begin
        bank_we[b]   = wr_en && lane_en[lane[b]];
        bank_wrow[b] = row[b];
        bank_wd[b]   = wr_data[lane[b]];
      end
    end
  end

  always_comb begin
    unique case (ext_addr[1:0])
      2'd0:    ext_rdata = bank0[ext_addr[RW+1:2]];
      2'd1:    ext_rdata = bank1[ext_addr[RW+1:2]];
      2'd2:    ext_rdata = bank2[ext_addr[RW+1:2]];
      default: ext_rdata = bank3[ext_addr[RW+1:2]];
    endcase
  end

  always_ff @(posedge clk) begin
    if (bank_we[0]) bank0[bank_wrow[0]] <= bank_wd[0];
    if (bank_we[1]) bank1[bank_wrow[1]] <= bank_wd[1];
    if (bank_we[2]) bank2[bank_wrow[2]] <= bank_wd[2];
    if (bank_we[3]) bank3[bank_wrow[3]] <= bank_wd[3];
  end
endmodule
