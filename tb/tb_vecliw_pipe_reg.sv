// tb_vecliw_pipe_reg: self-checking test of the pipeline register.
// Drives random data with random en (stall when low) and flush and
// compares the output every cycle with a reference register: reset and
// flush give zero, en loads d, otherwise the value holds.
module tb_vecliw_pipe_reg;
  logic clk = 0, rst_n = 0, en = 0, flush = 0;
  logic [31:0] d = 0, q, ref_q;
  int checks = 0, failures = 0;

  vecliw_pipe_reg #(.T(logic [31:0])) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (q !== 0) begin failures++; $display("FAIL reset value %h", q); end
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      en = ($urandom % 3) != 0;
      flush = ($urandom % 10) == 0;
      d = $urandom;
      if (flush)   ref_q = 0;
      else if (en) ref_q = d;
      @(negedge clk);
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL cycle %0d q=%h expected %h", i, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
