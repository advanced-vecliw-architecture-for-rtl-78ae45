// tb_vecliw_dcache: self-checking test of the 128-bit data memory.
// Loads the whole memory through the external port, then runs random
// four-word loads and masked stores at word-aligned addresses (not only
// 16-byte aligned) and checks every returned word, and the external read
// port, against a flat reference array.
module tb_vecliw_dcache;
  localparam int W = 1024;
  logic clk = 0, rd_en = 0, wr_en = 0, ext_we = 0;
  logic [31:0] addr = 0, ext_addr = 0, ext_wdata = 0, ext_rdata;
  logic [3:0] lane_en = 0;
  logic [3:0][31:0] wr_data = 0, mem_out;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  vecliw_dcache #(.DEPTH_WORDS(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      ext_we = 1; ext_addr = i; ext_wdata = i * 32'h01010101 + 7; model[i] = ext_wdata;
    end
    @(negedge clk); ext_we = 0;
    for (int c = 0; c < 3000; c++) begin
      int base;
      base = $urandom % (W - 4);
      addr = base * 4;
      if (c % 2 == 0) begin
        rd_en = 1; wr_en = 0;
        #1;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (mem_out[k] !== model[base + k]) begin
            failures++;
            $display("FAIL load word %0d got %h expected %h", base + k, mem_out[k], model[base + k]);
          end
        end
      end else begin
        rd_en = 0; wr_en = 1;
        lane_en = 4'($urandom);
        for (int k = 0; k < 4; k++) begin
          wr_data[k] = $urandom;
          if (lane_en[k]) model[base + k] = wr_data[k];
        end
        @(negedge clk);
        wr_en = 0;
        ext_addr = base + ($urandom % 4);
        #1;
        checks++;
        if (ext_rdata !== model[ext_addr]) begin
          failures++;
          $display("FAIL ext read %0d got %h expected %h", ext_addr, ext_rdata, model[ext_addr]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
