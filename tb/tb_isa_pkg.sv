// tb_isa_pkg: instruction encoders for the testbenches of the 16-bit RISC
// pipeline. Each function returns one 16-bit instruction word in the format
// of risc_pkg: opcode [15:12], destination [11:9], source 1 [8:6],
// source 2 [5:3], function [2:0], 6-bit immediate [5:0], shift amount [4:1]
// with the shift kind in {bit 5, bit 0}, 8-bit immediate [8:1] with the
// move-immediate byte select in bit 0.
package tb_isa_pkg;
  import risc_pkg::*;

  function automatic word_t i_r(logic [2:0] func, reg_t rd, reg_t rs1, reg_t rs2);
    return {OP_ALU, rd, rs1, rs2, func};
  endfunction
  function automatic word_t i_addi(reg_t rd, reg_t rs1, int imm6);
    return {OP_ADDI, rd, rs1, 6'(imm6)};
  endfunction
  function automatic word_t i_shift(logic [1:0] kind, reg_t rd, reg_t rs1, int amt);
    return {OP_SHIFT, rd, rs1, kind[1], 4'(amt), kind[0]};
  endfunction
  function automatic word_t i_mvi(reg_t rd, logic [7:0] imm8, logic hi);
    return {OP_MVI, rd, imm8, hi};
  endfunction
  function automatic word_t i_load(reg_t rd, reg_t rs1, int imm6);
    return {OP_LOAD, rd, rs1, 6'(imm6)};
  endfunction
  function automatic word_t i_store(reg_t rsrc, reg_t rs1, int imm6);
    return {OP_STORE, rsrc, rs1, 6'(imm6)};
  endfunction
  function automatic word_t i_in(reg_t rd);
    return {OP_IN, rd, 9'd0};
  endfunction
  function automatic word_t i_out(reg_t rs1);
    return {OP_OUT, 3'd0, rs1, 6'd0};
  endfunction
  // relative branches: offset is target - (branch address + 1)
  function automatic word_t i_bz(reg_t r, int off);
    return {OP_BZ, r, 8'(off), 1'b0};
  endfunction
  function automatic word_t i_bnz(reg_t r, int off);
    return {OP_BNZ, r, 8'(off), 1'b0};
  endfunction
  function automatic word_t i_br(int off);
    return {OP_BR, 3'd0, 8'(off), 1'b0};
  endfunction
  function automatic word_t i_jmp(reg_t rs1);
    return {OP_JMP, 3'd0, rs1, 6'd0};
  endfunction
  function automatic word_t i_jal(reg_t rd, int off);
    return {OP_JAL, rd, 8'(off), 1'b0};
  endfunction
  function automatic word_t i_rjal(reg_t rs1);
    return {OP_RJAL, 3'd0, rs1, 6'd0};
  endfunction
  function automatic word_t i_ei();   return {OP_SYS, 9'd0, F_EI};   endfunction
  function automatic word_t i_di();   return {OP_SYS, 9'd0, F_DI};   endfunction
  function automatic word_t i_reti(); return {OP_SYS, 9'd0, F_RETI}; endfunction

endpackage
