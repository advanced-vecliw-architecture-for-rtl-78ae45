// tb_vecliw_icache: self-checking test of the instruction memory.
// Fills every entry with a 128-bit pattern computed from its index, reads
// all entries back by byte address (with random low bits, which must be
// ignored), then overwrites random entries and re-checks them.
module tb_vecliw_icache;
  localparam int DEPTH = 256;
  logic clk = 0, wr_en = 0;
  logic [31:0] inst_addr = 0, wr_addr = 0;
  logic [127:0] vliw, wr_vliw = 0;
  logic [127:0] model [DEPTH];
  int checks = 0, failures = 0;

  vecliw_icache #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [127:0] pat(int i, int s);
    return {32'(i * 7 + s), 32'(~i), 32'(i ^ 32'h5a5a_0000), 32'(i + s * 3)};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = i * 16; wr_vliw = pat(i, 1); model[i] = pat(i, 1);
    end
    @(negedge clk); wr_en = 0;
    for (int r = 0; r < 300; r++) begin
      int i;
      i = (r < DEPTH) ? r : int'($urandom % DEPTH);
      if (r >= DEPTH) begin
        @(negedge clk);
        wr_en = 1; wr_addr = i * 16; wr_vliw = pat(i, r); model[i] = pat(i, r);
        @(negedge clk); wr_en = 0;
      end
      inst_addr = i * 16 + ($urandom % 16);
      #1;
      checks++;
      if (vliw !== model[i]) begin
        failures++;
        $display("FAIL entry %0d got %h expected %h", i, vliw, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
