// thumb_asm_pkg: instruction encoders used by the testbenches to build small
// Thumb programs in place.  Each function returns the 16-bit encoding of one
// instruction; register arguments are register numbers, offsets of branches
// are in halfwords relative to the branch address + 4.
package thumb_asm_pkg;
  function automatic logic [15:0] movs_i (int rd, int imm8);       return {5'b00100, 3'(rd), 8'(imm8)}; endfunction
  function automatic logic [15:0] cmp_i  (int rn, int imm8);       return {5'b00101, 3'(rn), 8'(imm8)}; endfunction
  function automatic logic [15:0] adds_i8(int rd, int imm8);       return {5'b00110, 3'(rd), 8'(imm8)}; endfunction
  function automatic logic [15:0] subs_i8(int rd, int imm8);       return {5'b00111, 3'(rd), 8'(imm8)}; endfunction
  function automatic logic [15:0] adds_r (int rd, int rn, int rm); return {7'b0001100, 3'(rm), 3'(rn), 3'(rd)}; endfunction
  function automatic logic [15:0] subs_r (int rd, int rn, int rm); return {7'b0001101, 3'(rm), 3'(rn), 3'(rd)}; endfunction
  function automatic logic [15:0] adds_i3(int rd, int rn, int i3); return {7'b0001110, 3'(i3), 3'(rn), 3'(rd)}; endfunction
  function automatic logic [15:0] subs_i3(int rd, int rn, int i3); return {7'b0001111, 3'(i3), 3'(rn), 3'(rd)}; endfunction
  function automatic logic [15:0] lsls_i (int rd, int rm, int i5); return {5'b00000, 5'(i5), 3'(rm), 3'(rd)}; endfunction
  function automatic logic [15:0] lsrs_i (int rd, int rm, int i5); return {5'b00001, 5'(i5), 3'(rm), 3'(rd)}; endfunction
  function automatic logic [15:0] asrs_i (int rd, int rm, int i5); return {5'b00010, 5'(i5), 3'(rm), 3'(rd)}; endfunction
  // Register-to-register ALU group: op 0 ands .. 15 mvns.
  function automatic logic [15:0] alu_r  (int op, int rdn, int rm); return {6'b010000, 4'(op), 3'(rm), 3'(rdn)}; endfunction
  function automatic logic [15:0] add_hi (int rdn, int rm);  return {8'b01000100, 1'(rdn >> 3), 4'(rm), 3'(rdn)}; endfunction
  function automatic logic [15:0] cmp_hi (int rn, int rm);   return {8'b01000101, 1'(rn >> 3), 4'(rm), 3'(rn)}; endfunction
  function automatic logic [15:0] mov_hi (int rd, int rm);   return {8'b01000110, 1'(rd >> 3), 4'(rm), 3'(rd)}; endfunction
  function automatic logic [15:0] bx     (int rm);           return {9'b010001110, 4'(rm), 3'b000}; endfunction
  function automatic logic [15:0] blx    (int rm);           return {9'b010001111, 4'(rm), 3'b000}; endfunction
  function automatic logic [15:0] ldr_pc (int rt, int imm8); return {5'b01001, 3'(rt), 8'(imm8)}; endfunction
  function automatic logic [15:0] str_r  (int rt, int rn, int rm); return {7'b0101000, 3'(rm), 3'(rn), 3'(rt)}; endfunction
  function automatic logic [15:0] ldr_r  (int rt, int rn, int rm); return {7'b0101100, 3'(rm), 3'(rn), 3'(rt)}; endfunction
  function automatic logic [15:0] str_i  (int rt, int rn, int i5); return {5'b01100, 5'(i5), 3'(rn), 3'(rt)}; endfunction
  function automatic logic [15:0] ldr_i  (int rt, int rn, int i5); return {5'b01101, 5'(i5), 3'(rn), 3'(rt)}; endfunction
  function automatic logic [15:0] str_sp (int rt, int imm8); return {5'b10010, 3'(rt), 8'(imm8)}; endfunction
  function automatic logic [15:0] ldr_sp (int rt, int imm8); return {5'b10011, 3'(rt), 8'(imm8)}; endfunction
  function automatic logic [15:0] add_pc (int rd, int imm8); return {5'b10100, 3'(rd), 8'(imm8)}; endfunction
  function automatic logic [15:0] add_sp (int rd, int imm8); return {5'b10101, 3'(rd), 8'(imm8)}; endfunction
  function automatic logic [15:0] addsp  (int imm7);         return {9'b101100000, 7'(imm7)}; endfunction
  function automatic logic [15:0] subsp  (int imm7);         return {9'b101100001, 7'(imm7)}; endfunction
  function automatic logic [15:0] bcond  (int cond, int off8); return {4'b1101, 4'(cond), 8'(off8)}; endfunction
  function automatic logic [15:0] b      (int off11);        return {5'b11100, 11'(off11)}; endfunction
  // bl split into its two halves; off is the byte offset from address + 4.
  function automatic logic [15:0] bl1    (int off);          return {5'b11110, 11'(off >> 12)}; endfunction
  function automatic logic [15:0] bl2    (int off);          return {5'b11111, 11'(off >> 1)}; endfunction
endpackage
