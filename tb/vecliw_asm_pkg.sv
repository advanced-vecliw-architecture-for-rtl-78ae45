// vecliw_asm_pkg: instruction encoders for the VecLIW testbenches.
// Registers are given as (start index Si, bank Bn); each field is {Si, Bn}.
package vecliw_asm_pkg;
  import vecliw_pkg::*;

  function automatic logic [5:0] r(input int si, input int bn);
    return {3'(si), 3'(bn)};
  endfunction

  function automatic logic [31:0] rtype(input sv_e sv, input alu_op_e f,
                                        input logic [5:0] rd, input logic [5:0] rs, input logic [5:0] rt);
    return {sv, OP_RALU, rs, rt, rd, 4'b0, 4'(f)};
  endfunction

  function automatic logic [31:0] itype(input sv_e sv, input op_e op,
                                        input logic [5:0] rt, input logic [5:0] rs, input int imm);
    return {sv, op, rs, rt, 14'(imm)};
  endfunction

  function automatic logic [31:0] jtype(input int target_index);
    return {SV_SS, OP_J, 26'(target_index)};
  endfunction

  function automatic logic [31:0] setvl(input int v);
    return {SV_SS, OP_SETVL, 12'd0, 14'(v)};
  endfunction

  localparam logic [31:0] NOP = 32'd0;

  function automatic logic [127:0] pack(input logic [31:0] s1, input logic [31:0] s2 = NOP,
                                        input logic [31:0] s3 = NOP, input logic [31:0] s4 = NOP);
    return {s4, s3, s2, s1};
  endfunction
endpackage
