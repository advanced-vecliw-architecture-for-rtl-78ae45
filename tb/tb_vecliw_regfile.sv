// tb_vecliw_regfile: self-checking test of the unified register file.
// Checks reset to zero, then runs random cycles with four writes (some to
// the same register) and eight reads, comparing each read with a reference
// array that includes same-cycle write-through (highest port wins).
module tb_vecliw_regfile;
  logic clk = 0, rst_n = 0;
  logic [7:0][5:0]  rd_addr;
  logic [7:0][31:0] rd_data;
  logic [3:0]       wr_en;
  logic [3:0][5:0]  wr_addr;
  logic [3:0][31:0] wr_data;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  vecliw_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    for (int i = 0; i < 64; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i += 8) begin
      for (int r = 0; r < 8; r++) rd_addr[r] = 6'(i + r);
      #1;
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (rd_data[r] !== 0) begin failures++; $display("FAIL reset reg %0d = %h", i + r, rd_data[r]); end
      end
    end
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      for (int w = 0; w < 4; w++) begin
        wr_en[w] = $urandom % 2;
        wr_addr[w] = 6'($urandom % 64);
        if (c % 4 == 0) wr_addr[w] = 6'(w % 2);
        wr_data[w] = $urandom;
      end
      for (int r = 0; r < 8; r++) begin
        rd_addr[r] = 6'($urandom % 64);
        if (r < 4 && c % 3 == 0) rd_addr[r] = wr_addr[r];
      end
      #1;
      for (int r = 0; r < 8; r++) begin
        logic [31:0] e;
        e = model[rd_addr[r]];
        for (int w = 0; w < 4; w++) if (wr_en[w] && wr_addr[w] == rd_addr[r]) e = wr_data[w];
        checks++;
        if (rd_data[r] !== e) begin
          failures++;
          $display("FAIL cycle %0d port %0d reg %0d got %h expected %h", c, r, rd_addr[r], rd_data[r], e);
        end
      end
      for (int w = 0; w < 4; w++) if (wr_en[w]) model[wr_addr[w]] = wr_data[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
