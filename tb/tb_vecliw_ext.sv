// tb_vecliw_ext: self-checking test of the immediate extension unit.
// Random 14-bit immediates and signed/unsigned selects; each 32-bit output
// is compared with a reference computed by arithmetic on integers.
module tb_vecliw_ext;
  logic [3:0][13:0] imm;
  logic [3:0]       sgn;
  logic [3:0][31:0] imm_val;
  int checks = 0, failures = 0;

  vecliw_ext dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      for (int k = 0; k < 4; k++) begin
        imm[k] = 14'($urandom);
        if (i < 4) imm[k] = (i[0]) ? 14'h2000 : 14'h1fff;
      end
      sgn = 4'($urandom);
      #1;
      for (int k = 0; k < 4; k++) begin
        int e;
        e = int'(imm[k]);
        if (sgn[k] && e >= 8192) e = e - 16384;
        checks++;
        if (imm_val[k] !== 32'(e)) begin
          failures++;
          $display("FAIL imm=%h sgn=%b got %h expected %h", imm[k], sgn[k], imm_val[k], 32'(e));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
