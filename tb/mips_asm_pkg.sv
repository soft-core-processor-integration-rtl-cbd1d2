// mips_asm_pkg: instruction encoders used by the testbenches to build MIPS32
// programs (standard MIPS32 encodings; COP2 moves address the scheduler
// registers by their 16-bit selector).
package mips_asm_pkg;
  function automatic logic [31:0] r_t(logic [5:0] fn, logic [4:0] rd, logic [4:0] rs, logic [4:0] rt, logic [4:0] sh = 0);
    return {6'b000000, rs, rt, rd, sh, fn};
  endfunction
  function automatic logic [31:0] i_t(logic [5:0] op, logic [4:0] rt, logic [4:0] rs, logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction
  function automatic logic [31:0] mult (int rs, int rt);              return r_t(6'h18, 5'd0, 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] multu(int rs, int rt);              return r_t(6'h19, 5'd0, 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] div  (int rs, int rt);              return r_t(6'h1A, 5'd0, 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] divu (int rs, int rt);              return r_t(6'h1B, 5'd0, 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] mfhi (int rd);                      return r_t(6'h10, 5'(rd), 5'd0, 5'd0); endfunction
  function automatic logic [31:0] mflo (int rd);                      return r_t(6'h12, 5'(rd), 5'd0, 5'd0); endfunction
  function automatic logic [31:0] mthi (int rs);                      return r_t(6'h11, 5'd0, 5'(rs), 5'd0); endfunction
  function automatic logic [31:0] mtlo (int rs);                      return r_t(6'h13, 5'd0, 5'(rs), 5'd0); endfunction
  function automatic logic [31:0] nop();                               return 32'h0; endfunction
  function automatic logic [31:0] addi (int rt, int rs, int imm);      return i_t(6'h08, 5'(rt), 5'(rs), 16'(imm)); endfunction
  function automatic logic [31:0] addiu(int rt, int rs, int imm);      return i_t(6'h09, 5'(rt), 5'(rs), 16'(imm)); endfunction
  function automatic logic [31:0] slti (int rt, int rs, int imm);      return i_t(6'h0A, 5'(rt), 5'(rs), 16'(imm)); endfunction
  function automatic logic [31:0] andi (int rt, int rs, int imm);      return i_t(6'h0C, 5'(rt), 5'(rs), 16'(imm)); endfunction
  function automatic logic [31:0] ori  (int rt, int rs, int imm);      return i_t(6'h0D, 5'(rt), 5'(rs), 16'(imm)); endfunction
  function automatic logic [31:0] xori (int rt, int rs, int imm);      return i_t(6'h0E, 5'(rt), 5'(rs), 16'(imm)); endfunction
  function automatic logic [31:0] lui  (int rt, int imm);              return i_t(6'h0F, 5'(rt), 5'd0, 16'(imm)); endfunction
  function automatic logic [31:0] lw   (int rt, int off, int base);    return i_t(6'h23, 5'(rt), 5'(base), 16'(off)); endfunction
  function automatic logic [31:0] lb   (int rt, int off, int base);    return i_t(6'h20, 5'(rt), 5'(base), 16'(off)); endfunction
  function automatic logic [31:0] lbu  (int rt, int off, int base);    return i_t(6'h24, 5'(rt), 5'(base), 16'(off)); endfunction
  function automatic logic [31:0] lh   (int rt, int off, int base);    return i_t(6'h21, 5'(rt), 5'(base), 16'(off)); endfunction
  function automatic logic [31:0] ll   (int rt, int off, int base);    return i_t(6'h30, 5'(rt), 5'(base), 16'(off)); endfunction
  function automatic logic [31:0] sc   (int rt, int off, int base);    return i_t(6'h38, 5'(rt), 5'(base), 16'(off)); endfunction
  function automatic logic [31:0] lwc2 (int sel, int off, int base);   return i_t(6'h32, 5'(sel), 5'(base), 16'(off)); endfunction
  function automatic logic [31:0] swc2 (int sel, int off, int base);   return i_t(6'h3A, 5'(sel), 5'(base), 16'(off)); endfunction
  function automatic logic [31:0] lwl  (int rt, int off, int base);    return i_t(6'h22, 5'(rt), 5'(base), 16'(off)); endfunction
  function automatic logic [31:0] lwr  (int rt, int off, int base);    return i_t(6'h26, 5'(rt), 5'(base), 16'(off)); endfunction
  function automatic logic [31:0] swl  (int rt, int off, int base);    return i_t(6'h2A, 5'(rt), 5'(base), 16'(off)); endfunction
  function automatic logic [31:0] swr  (int rt, int off, int base);    return i_t(6'h2E, 5'(rt), 5'(base), 16'(off)); endfunction
  function automatic logic [31:0] sw   (int rt, int off, int base);    return i_t(6'h2B, 5'(rt), 5'(base), 16'(off)); endfunction
  function automatic logic [31:0] sb   (int rt, int off, int base);    return i_t(6'h28, 5'(rt), 5'(base), 16'(off)); endfunction
  function automatic logic [31:0] sh_  (int rt, int off, int base);    return i_t(6'h29, 5'(rt), 5'(base), 16'(off)); endfunction
  function automatic logic [31:0] beq  (int rs, int rt, int off);      return i_t(6'h04, 5'(rt), 5'(rs), 16'(off)); endfunction
  function automatic logic [31:0] bne  (int rs, int rt, int off);      return i_t(6'h05, 5'(rt), 5'(rs), 16'(off)); endfunction
  function automatic logic [31:0] blez (int rs, int off);              return i_t(6'h06, 5'd0, 5'(rs), 16'(off)); endfunction
  function automatic logic [31:0] bgtz (int rs, int off);              return i_t(6'h07, 5'd0, 5'(rs), 16'(off)); endfunction
  function automatic logic [31:0] bltz (int rs, int off);              return i_t(6'h01, 5'd0, 5'(rs), 16'(off)); endfunction
  function automatic logic [31:0] bgez (int rs, int off);              return i_t(6'h01, 5'd1, 5'(rs), 16'(off)); endfunction
  function automatic logic [31:0] bgezal(int rs, int off);             return i_t(6'h01, 5'd17, 5'(rs), 16'(off)); endfunction
  function automatic logic [31:0] j    (int target);                   return {6'h02, 26'(target >> 2)}; endfunction
  function automatic logic [31:0] jal  (int target);                   return {6'h03, 26'(target >> 2)}; endfunction
  function automatic logic [31:0] jr   (int rs);                       return r_t(6'h08, 5'd0, 5'(rs), 5'd0); endfunction
  function automatic logic [31:0] jalr (int rd, int rs);               return r_t(6'h09, 5'(rd), 5'(rs), 5'd0); endfunction
  function automatic logic [31:0] add  (int rd, int rs, int rt);       return r_t(6'h20, 5'(rd), 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] addu (int rd, int rs, int rt);       return r_t(6'h21, 5'(rd), 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] sub  (int rd, int rs, int rt);       return r_t(6'h22, 5'(rd), 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] subu (int rd, int rs, int rt);       return r_t(6'h23, 5'(rd), 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] and_ (int rd, int rs, int rt);       return r_t(6'h24, 5'(rd), 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] or_  (int rd, int rs, int rt);       return r_t(6'h25, 5'(rd), 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] xor_ (int rd, int rs, int rt);       return r_t(6'h26, 5'(rd), 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] nor_ (int rd, int rs, int rt);       return r_t(6'h27, 5'(rd), 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] slt  (int rd, int rs, int rt);       return r_t(6'h2A, 5'(rd), 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] sltu (int rd, int rs, int rt);       return r_t(6'h2B, 5'(rd), 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] movn (int rd, int rs, int rt);       return r_t(6'h0B, 5'(rd), 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] movz (int rd, int rs, int rt);       return r_t(6'h0A, 5'(rd), 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] sll  (int rd, int rt, int sa);       return r_t(6'h00, 5'(rd), 5'd0, 5'(rt), 5'(sa)); endfunction
  function automatic logic [31:0] srl  (int rd, int rt, int sa);       return r_t(6'h02, 5'(rd), 5'd0, 5'(rt), 5'(sa)); endfunction
  function automatic logic [31:0] sra  (int rd, int rt, int sa);       return r_t(6'h03, 5'(rd), 5'd0, 5'(rt), 5'(sa)); endfunction
  function automatic logic [31:0] sllv (int rd, int rt, int rs);       return r_t(6'h04, 5'(rd), 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] teq  (int rs, int rt);               return r_t(6'h34, 5'd0, 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] tne  (int rs, int rt);               return r_t(6'h36, 5'd0, 5'(rs), 5'(rt)); endfunction
  function automatic logic [31:0] syscall();                           return r_t(6'h0C, 5'd0, 5'd0, 5'd0); endfunction
  function automatic logic [31:0] brk();                               return r_t(6'h0D, 5'd0, 5'd0, 5'd0); endfunction
  function automatic logic [31:0] mfc0 (int rt, int rd);               return {6'h10, 5'b00000, 5'(rt), 5'(rd), 11'h0}; endfunction
  function automatic logic [31:0] mtc0 (int rt, int rd);               return {6'h10, 5'b00100, 5'(rt), 5'(rd), 11'h0}; endfunction
  function automatic logic [31:0] eret();                              return {6'h10, 1'b1, 19'h0, 6'h18}; endfunction
  // scheduler (COP2) moves; sel is the register selector in the immediate field
  function automatic logic [31:0] mfc2 (int rt, int sel);              return {6'h12, 5'b00000, 5'(rt), 16'(sel)}; endfunction
  function automatic logic [31:0] cfc2 (int rt, int sel);              return {6'h12, 5'b00010, 5'(rt), 16'(sel)}; endfunction
  function automatic logic [31:0] mtc2 (int rt, int sel);              return {6'h12, 5'b00100, 5'(rt), 16'(sel)}; endfunction
  function automatic logic [31:0] ctc2 (int rt, int sel);              return {6'h12, 5'b00110, 5'(rt), 16'(sel)}; endfunction
endpackage
