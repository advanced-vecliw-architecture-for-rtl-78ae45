// tb_vecliw_alu: self-checking test of one execution unit.
// Every operation with random and corner operands; the expected result is
// computed here with integer arithmetic (signed compares via subtraction
// of the sign bias, shifts by repeated halving/doubling).
module tb_vecliw_alu;
  import vecliw_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  vecliw_alu dut (.*);

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] z);
    longint unsigned ux, uz;
    logic [31:0] r;
    ux = x; uz = z;
    case (o)
      ALU_ADD:  return 32'(ux + uz);
      ALU_SUB:  return 32'(ux - uz);
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~(x | z);
      ALU_SLT:  return ((x ^ 32'h8000_0000) < (z ^ 32'h8000_0000)) ? 32'd1 : 32'd0;
      ALU_SLTU: return (ux < uz) ? 32'd1 : 32'd0;
      ALU_SLL:  begin r = x; for (int i = 0; i < int'(z[4:0]); i++) r = {r[30:0], 1'b0}; return r; end
      ALU_SRL:  begin r = x; for (int i = 0; i < int'(z[4:0]); i++) r = {1'b0, r[31:1]}; return r; end
      ALU_SRA:  begin r = x; for (int i = 0; i < int'(z[4:0]); i++) r = {r[31], r[31:1]}; return r; end
      ALU_MUL:  return 32'(ux * uz);
      default:  return 32'(ux + uz);
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      op = alu_op_e'(i % 12);
      a = $urandom; b = $urandom;
      if (i % 5 == 0) a = 32'h8000_0000;
      if (i % 7 == 0) b = 32'hffff_ffff;
      if (i % 11 == 0) b = a;
      #1;
      checks++;
      if (y !== model(op, a, b)) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h got %h expected %h", op.name(), a, b, y, model(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
