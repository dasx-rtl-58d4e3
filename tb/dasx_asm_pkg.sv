// dasx_asm_pkg: instruction encoders for writing PE kernels in testbenches.
// Field layout as in dasx_pkg: op[31:26] rd/rs[25:21] rs1[20:16] rs2[15:11]
// imm[15:0]; LD/ST put the Collector id in imm[15:13] and a signed key
// offset in imm[12:0].
package dasx_asm_pkg;
  import dasx_pkg::*;

  function automatic logic [31:0] r3(opcode_e op, int rd, int rs1, int rs2);
    return {op, 5'(rd), 5'(rs1), 5'(rs2), 11'h0};
  endfunction
  function automatic logic [31:0] addi(int rd, int rs1, int imm);
    return {OP_ADDI, 5'(rd), 5'(rs1), 16'(imm)};
  endfunction
  function automatic logic [31:0] lui(int rd, int imm);
    return {OP_LUI, 5'(rd), 5'h0, 16'(imm)};
  endfunction
  function automatic logic [31:0] br(opcode_e op, int rs1, int rs2, int off);
    return {op, 5'(rs1), 5'(rs2), 16'(off)};
  endfunction
  function automatic logic [31:0] ld(int rd, int coll, int rkey, int koff);
    return {OP_LD, 5'(rd), 5'(rkey), 3'(coll), 13'(koff)};
  endfunction
  function automatic logic [31:0] st(int rdata, int coll, int rkey, int koff);
    return {OP_ST, 5'(rdata), 5'(rkey), 3'(coll), 13'(koff)};
  endfunction
  function automatic logic [31:0] cur(int rd);
    return {OP_CUR, 5'(rd), 21'h0};
  endfunction
  function automatic logic [31:0] next(int rd);
    return {OP_NEXT, 5'(rd), 21'h0};
  endfunction
  function automatic logic [31:0] bar();
    return {OP_BAR, 26'h0};
  endfunction
  function automatic logic [31:0] halt();
    return {OP_HALT, 26'h0};
  endfunction
endpackage
