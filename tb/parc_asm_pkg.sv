// Instruction encoders for writing small PARC programs in testbenches.
//
// Each function returns the 32-bit MIPS32-style encoding the processor
// decodes. Branch offsets are in instructions relative to the next
// instruction; jump targets are byte addresses.
package parc_asm_pkg;

  function automatic logic [31:0] r_type(int rs, int rt, int rd, int sh, logic [5:0] fn);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] s2_type(int rs, int rt, int rd, logic [5:0] fn);
    return {6'b011100, 5'(rs), 5'(rt), 5'(rd), 5'b0, fn};
  endfunction
  function automatic logic [31:0] i_type(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] addu (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'b100001); endfunction
  function automatic logic [31:0] subu (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'b100011); endfunction
  function automatic logic [31:0] and_ (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'b100100); endfunction
  function automatic logic [31:0] or_  (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'b100101); endfunction
  function automatic logic [31:0] xor_ (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'b100110); endfunction
  function automatic logic [31:0] nor_ (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'b100111); endfunction
  function automatic logic [31:0] slt  (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'b101010); endfunction
  function automatic logic [31:0] sltu (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'b101011); endfunction
  function automatic logic [31:0] sll  (int rd, int rt, int sh); return r_type(0, rt, rd, sh, 6'b000000); endfunction
  function automatic logic [31:0] srl  (int rd, int rt, int sh); return r_type(0, rt, rd, sh, 6'b000010); endfunction
  function automatic logic [31:0] sra  (int rd, int rt, int sh); return r_type(0, rt, rd, sh, 6'b000011); endfunction
  function automatic logic [31:0] sllv (int rd, int rt, int rs); return r_type(rs, rt, rd, 0, 6'b000100); endfunction
  function automatic logic [31:0] srav (int rd, int rt, int rs); return r_type(rs, rt, rd, 0, 6'b000111); endfunction
  function automatic logic [31:0] jr   (int rs);                 return r_type(rs, 0, 0, 0, 6'b001000); endfunction
  function automatic logic [31:0] jalr (int rd, int rs);         return r_type(rs, 0, rd, 0, 6'b001001); endfunction
  function automatic logic [31:0] mul  (int rd, int rs, int rt); return s2_type(rs, rt, rd, 6'b000010); endfunction
  function automatic logic [31:0] div  (int rd, int rs, int rt); return s2_type(rs, rt, rd, 6'b011010); endfunction
  function automatic logic [31:0] remu (int rd, int rs, int rt); return s2_type(rs, rt, rd, 6'b011111); endfunction

  function automatic logic [31:0] addiu(int rt, int rs, int imm); return i_type(6'b001001, rs, rt, imm); endfunction
  function automatic logic [31:0] slti (int rt, int rs, int imm); return i_type(6'b001010, rs, rt, imm); endfunction
  function automatic logic [31:0] andi (int rt, int rs, int imm); return i_type(6'b001100, rs, rt, imm); endfunction
  function automatic logic [31:0] ori  (int rt, int rs, int imm); return i_type(6'b001101, rs, rt, imm); endfunction
  function automatic logic [31:0] lui  (int rt, int imm);         return i_type(6'b001111, 0, rt, imm); endfunction
  function automatic logic [31:0] lw   (int rt, int imm, int rs); return i_type(6'b100011, rs, rt, imm); endfunction
  function automatic logic [31:0] lb   (int rt, int imm, int rs); return i_type(6'b100000, rs, rt, imm); endfunction
  function automatic logic [31:0] lbu  (int rt, int imm, int rs); return i_type(6'b100100, rs, rt, imm); endfunction
  function automatic logic [31:0] lh   (int rt, int imm, int rs); return i_type(6'b100001, rs, rt, imm); endfunction
  function automatic logic [31:0] sw   (int rt, int imm, int rs); return i_type(6'b101011, rs, rt, imm); endfunction
  function automatic logic [31:0] sb   (int rt, int imm, int rs); return i_type(6'b101000, rs, rt, imm); endfunction
  function automatic logic [31:0] sh   (int rt, int imm, int rs); return i_type(6'b101001, rs, rt, imm); endfunction
  function automatic logic [31:0] beq  (int rs, int rt, int off); return i_type(6'b000100, rs, rt, off); endfunction
  function automatic logic [31:0] bne  (int rs, int rt, int off); return i_type(6'b000101, rs, rt, off); endfunction
  function automatic logic [31:0] blez (int rs, int off);         return i_type(6'b000110, rs, 0, off); endfunction
  function automatic logic [31:0] bgtz (int rs, int off);         return i_type(6'b000111, rs, 0, off); endfunction
  function automatic logic [31:0] bltz (int rs, int off);         return i_type(6'b000001, rs, 0, off); endfunction
  function automatic logic [31:0] bgez (int rs, int off);         return i_type(6'b000001, rs, 1, off); endfunction
  function automatic logic [31:0] j    (int target); return {6'b000010, 26'(target >> 2)}; endfunction
  function automatic logic [31:0] jal  (int target); return {6'b000011, 26'(target >> 2)}; endfunction

  function automatic logic [31:0] mfc0 (int rt, int cp0); return {6'b010000, 5'b00000, 5'(rt), 5'(cp0), 11'b0}; endfunction
  function automatic logic [31:0] mtc0 (int rt, int cp0); return {6'b010000, 5'b00100, 5'(rt), 5'(cp0), 11'b0}; endfunction

  function automatic logic [31:0] nop(); return 32'd0; endfunction

endpackage
