// fastchart_asm: instruction encoders for FASTCHART test programs.
//
// Each function returns one 16-bit instruction word in the encoding of fastchart_pkg.
// ACTIVATE is two words: act() followed by the start address.
package fastchart_asm;
  import fastchart_pkg::*;

  function automatic word_t nop();   return 16'h0000; endfunction
  function automatic word_t ret();   return {OP_SYS, SYS_RET, 8'h00}; endfunction
  function automatic word_t term();  return {OP_SYS, SYS_TERM, 8'h00}; endfunction
  function automatic word_t setns(); return {OP_SYS, SYS_SETNS, 8'h00}; endfunction
  function automatic word_t clrns(); return {OP_SYS, SYS_CLRNS, 8'h00}; endfunction
  function automatic word_t alu(int rd, int rs, alu_op_e op);
    return {OP_ALU, 4'(rd), 4'(rs), op};
  endfunction
  function automatic word_t ldi(int rd, int imm);  return {OP_LDI, 4'(rd), 8'(imm)}; endfunction
  function automatic word_t ldhi(int rd, int imm); return {OP_LDHI, 4'(rd), 8'(imm)}; endfunction
  function automatic word_t addi(int rd, int imm); return {OP_ADDI, 4'(rd), 8'(imm)}; endfunction
  function automatic word_t load(int rd, int ra, addr_mode_e m);
    return {OP_LOAD, 4'(rd), 4'(ra), 2'b00, m};
  endfunction
  function automatic word_t store(int rs, int ra, addr_mode_e m);
    return {OP_STORE, 4'(rs), 4'(ra), 2'b00, m};
  endfunction
  // branch at address `at` to address `to`
  function automatic word_t br(cond_e c, int at, int to);
    return {OP_BR, c, 8'(to - (at + 1))};
  endfunction
  function automatic word_t jmp(int a);   return {OP_JMP, 12'(a)}; endfunction
  function automatic word_t call(int a);  return {OP_CALL, 12'(a)}; endfunction
  function automatic word_t act(int id, int prio);
    return {OP_ACT, 6'(id), 3'(prio), 3'b000};
  endfunction
  function automatic word_t delay(int t); return {OP_DELAY, 12'(t)}; endfunction

endpackage
