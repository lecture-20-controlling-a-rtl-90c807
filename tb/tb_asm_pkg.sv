// tb_asm_pkg: instruction encoders for the testbenches.
// Each function returns the 32-bit machine word of one instruction of the
// subset (R-, I- and J-format of the MIPS encoding). Branch offsets are in
// words relative to PC + 4; jump targets are word addresses (26 bits).
package tb_asm_pkg;
  function automatic logic [31:0] rtype(logic [5:0] fn, int rd, int rs, int rt);
    return {6'b00_0000, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] itype(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] a_add(int rd, int rs, int rt); return rtype(6'b10_0000, rd, rs, rt); endfunction
  function automatic logic [31:0] a_sub(int rd, int rs, int rt); return rtype(6'b10_0010, rd, rs, rt); endfunction
  function automatic logic [31:0] a_ori(int rt, int rs, int imm); return itype(6'b00_1101, rt, rs, imm); endfunction
  function automatic logic [31:0] a_lw (int rt, int rs, int imm); return itype(6'b10_0011, rt, rs, imm); endfunction
  function automatic logic [31:0] a_sw (int rt, int rs, int imm); return itype(6'b10_1011, rt, rs, imm); endfunction
  function automatic logic [31:0] a_beq(int rs, int rt, int off); return itype(6'b00_0100, rt, rs, off); endfunction
  function automatic logic [31:0] a_j  (int target);              return {6'b00_0010, 26'(target)}; endfunction
endpackage
