// tb_asm_pkg: instruction encoders for MBP Core test programs.
//
// Each function returns one 21-bit instruction word in the encoding of
// mbp_pkg (opcode [20:16], rd [15:12], ra [11:8], rb [7:4], imm8 [7:0],
// imm12 [11:0], imm16 [15:0]).
package tb_asm_pkg;
  import mbp_pkg::*;

  function automatic logic [20:0] rrr(opcode_e op, int rd, int ra, int rb);
    return {op, 4'(rd), 4'(ra), 4'(rb), 4'b0};
  endfunction
  function automatic logic [20:0] rri(opcode_e op, int rd, int ra, int imm);
    return {op, 4'(rd), 4'(ra), 8'(imm)};
  endfunction
  function automatic logic [20:0] ldi(int rd, int imm12);
    return {OP_LDI, 4'(rd), 12'(imm12)};
  endfunction
  function automatic logic [20:0] ldih(int rd, int ra, int hi8);
    return {OP_LDIH, 4'(rd), 4'(ra), 8'(hi8)};
  endfunction
  function automatic logic [20:0] jmp(int target);
    return {OP_JMP, 16'(target)};
  endfunction
  function automatic logic [20:0] br(opcode_e op, int ra, int off);
    return {op, 4'd0, 4'(ra), 8'(off)};
  endfunction
  function automatic logic [20:0] pfield(opcode_e op, int rd, int ra, int rb, int fld);
    return {op, 4'(rd), 4'(ra), 4'(rb), 1'b0, 3'(fld)};
  endfunction
  function automatic logic [20:0] xfer(xfer_cmd_e cmd, int rline, int rstart, int len);
    return {OP_XFER, 4'(rline), 4'(rstart), cmd, 5'(len)};
  endfunction
  function automatic logic [20:0] op0(opcode_e op);
    return {op, 16'b0};
  endfunction
endpackage
