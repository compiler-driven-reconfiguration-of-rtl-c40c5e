// qc_asm_pkg: instruction encoders for building QuadroCore test programs.
//
// One function per instruction, returning its 16-bit encoding as defined
// in qc_pkg. Branch offsets are relative to the branch's own address.
package qc_asm_pkg;
  import qc_pkg::*;

  function automatic instr_t enc(int opc, int a, int b, int c);
    return instr_t'(((opc & 15) << 12) | ((a & 15) << 8) | ((b & 15) << 4) | (c & 15));
  endfunction

  function automatic instr_t i_nop();              return enc(0, 0, 0, 0); endfunction
  function automatic instr_t i_halt();             return enc(0, 1, 0, 0); endfunction
  function automatic instr_t i_bar(int m);         return enc(0, 2, 0, m); endfunction
  function automatic instr_t i_mode(mode_e md, int m);
    return enc(0, 3, int'(md), m);
  endfunction
  function automatic instr_t i_fpub();             return enc(0, 4, 0, 0); endfunction
  function automatic instr_t i_ccfg(int ext);      return enc(0, 5, 0, ext); endfunction
  function automatic instr_t i_add(int d, int s, int t); return enc(1, d, s, t); endfunction
  function automatic instr_t i_sub(int d, int s, int t); return enc(2, d, s, t); endfunction
  function automatic instr_t i_and(int d, int s, int t); return enc(3, d, s, t); endfunction
  function automatic instr_t i_or (int d, int s, int t); return enc(4, d, s, t); endfunction
  function automatic instr_t i_xor(int d, int s, int t); return enc(5, d, s, t); endfunction
  function automatic instr_t i_shl(int d, int s, int t); return enc(6, d, s, t); endfunction
  function automatic instr_t i_shr(int d, int s, int t); return enc(7, d, s, t); endfunction
  function automatic instr_t i_mul(int d, int s, int t); return enc(8, d, s, t); endfunction
  function automatic instr_t i_addi(int d, int s, int imm4); return enc(9, d, s, imm4); endfunction
  function automatic instr_t i_li(int d, int imm8);
    return instr_t'((10 << 12) | ((d & 15) << 8) | (imm8 & 255));
  endfunction
  function automatic instr_t i_cmp(cond_e cc, int s, int t); return enc(11, int'(cc), s, t); endfunction
  function automatic instr_t i_br(brcond_e bc, int off, int fsrc = 0);
    return instr_t'((12 << 12) | (int'(bc) << 10) | ((fsrc & 3) << 8) | (off & 255));
  endfunction
  function automatic instr_t i_cldw(int d, int sr);
    return instr_t'((13 << 12) | ((d & 15) << 8) | (sr & 31));
  endfunction
  function automatic instr_t i_cstw(int s, int sr);
    return instr_t'((14 << 12) | ((s & 15) << 8) | (sr & 31));
  endfunction
  function automatic instr_t i_ld (int d, int a); return enc(15, d, a, 0); endfunction
  function automatic instr_t i_st (int d, int a); return enc(15, d, a, 1); endfunction
  function automatic instr_t i_ldx(int d, int a); return enc(15, d, a, 2); endfunction
  function automatic instr_t i_stx(int d, int a); return enc(15, d, a, 3); endfunction
  function automatic instr_t i_lda(int d, int a); return enc(15, d, a, 4); endfunction
  function automatic instr_t i_sta(int d, int a); return enc(15, d, a, 5); endfunction

endpackage
