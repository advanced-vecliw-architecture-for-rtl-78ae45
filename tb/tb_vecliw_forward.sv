// tb_vecliw_forward: self-checking test of the forward unit.
// Random source registers drawn from a small set so that matches with the
// EX/MEM and MEM/WB destinations are frequent; the expected operand is the
// newest writer: the highest EX/MEM lane that is not a load, else the
// highest MEM/WB lane, else the value read in decode.
module tb_vecliw_forward;
  import vecliw_pkg::*;
  preg_t [7:0] src_addr;
  word_t [7:0] src_val, op_val;
  logic  [3:0] ex_wr, ex_load, wb_wr;
  preg_t [3:0] ex_dst, wb_dst;
  word_t [3:0] ex_val, wb_val;
  logic  [7:0] fwd_ex, fwd_wb;
  int checks = 0, failures = 0, n_ex = 0, n_wb = 0;

  vecliw_forward dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      for (int s = 0; s < 8; s++) begin
        src_addr[s] = 6'($urandom % 8);
        src_val[s] = $urandom;
      end
      for (int d = 0; d < 4; d++) begin
        ex_dst[d] = 6'($urandom % 8); wb_dst[d] = 6'($urandom % 8);
        ex_val[d] = $urandom; wb_val[d] = $urandom;
      end
      ex_wr = 4'($urandom); ex_load = 4'($urandom); wb_wr = 4'($urandom);
      #1;
      for (int s = 0; s < 8; s++) begin
        word_t e;
        int src;
        e = src_val[s]; src = 0;
        for (int d = 3; d >= 0; d--)
          if (src == 0 && wb_wr[d] && wb_dst[d] == src_addr[s]) begin e = wb_val[d]; src = 2; end
        for (int d = 3; d >= 0; d--)
          if (src != 1 && ex_wr[d] && !ex_load[d] && ex_dst[d] == src_addr[s]) begin e = ex_val[d]; src = 1; end
        checks++;
        if (op_val[s] !== e || fwd_ex[s] !== (src == 1) || fwd_wb[s] !== (src == 2)) begin
          failures++;
          $display("FAIL operand %0d got %h expected %h (source %0d)", s, op_val[s], e, src);
        end
        if (src == 1) n_ex++;
        if (src == 2) n_wb++;
      end
    end
    checks++;
    if (n_ex == 0 || n_wb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
