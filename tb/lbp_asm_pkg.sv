// lbp_asm_pkg: a tiny RV32IM + X_PAR assembler for the LBP testbenches.
//
// Each function returns one 32-bit instruction word in the encoding used by lbp_decoder
// (X_PAR on the custom-0 opcode, p_jal on custom-1). Register numbers follow the RISC-V ABI
// (ra = 1, sp = 2, t0 = 5, ...). Programs are built by the testbenches with a two-pass
// label scheme: the program task is run once to record label addresses and once to emit.
package lbp_asm_pkg;
  localparam int ZERO = 0, RA = 1, SP = 2, T0 = 5, T1 = 6, T2 = 7, S0 = 8, S1 = 9,
                 A0 = 10, A1 = 11, A2 = 12, A3 = 13, A4 = 14, A5 = 15, T3 = 28, T4 = 29,
                 T5 = 30, T6 = 31;

  function automatic logic [31:0] r_t(int f7, int rs2, int rs1, int f3, int rd, int opc);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction
  function automatic logic [31:0] i_t(int imm, int rs1, int f3, int rd, int opc);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction
  function automatic logic [31:0] s_t(int imm, int rs2, int rs1, int f3, int opc);
    logic [11:0] m;
    m = 12'(imm);
    return {m[11:5], 5'(rs2), 5'(rs1), 3'(f3), m[4:0], 7'(opc)};
  endfunction
  function automatic logic [31:0] b_t(int off, int rs2, int rs1, int f3);
    logic [12:0] m;
    m = 13'(off);
    return {m[12], m[10:5], 5'(rs2), 5'(rs1), 3'(f3), m[4:1], m[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] lui(int rd, int imm20);  return {20'(imm20), 5'(rd), 7'b0110111}; endfunction
  function automatic logic [31:0] addi(int rd, int rs1, int imm); return i_t(imm, rs1, 0, rd, 7'b0010011); endfunction
  function automatic logic [31:0] andi(int rd, int rs1, int imm); return i_t(imm, rs1, 7, rd, 7'b0010011); endfunction
  function automatic logic [31:0] slli(int rd, int rs1, int sh);  return i_t(sh, rs1, 1, rd, 7'b0010011); endfunction
  function automatic logic [31:0] srli(int rd, int rs1, int sh);  return i_t(sh, rs1, 5, rd, 7'b0010011); endfunction
  function automatic logic [31:0] add(int rd, int rs1, int rs2); return r_t(0, rs2, rs1, 0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sub(int rd, int rs1, int rs2); return r_t(32, rs2, rs1, 0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] mul(int rd, int rs1, int rs2); return r_t(1, rs2, rs1, 0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] div(int rd, int rs1, int rs2); return r_t(1, rs2, rs1, 4, rd, 7'b0110011); endfunction
  function automatic logic [31:0] lw(int rd, int rs1, int off);  return i_t(off, rs1, 2, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lb(int rd, int rs1, int off);  return i_t(off, rs1, 0, rd, 7'b0000011); endfunction
  function automatic logic [31:0] sw(int rs2, int rs1, int off); return s_t(off, rs2, rs1, 2, 7'b0100011); endfunction
  function automatic logic [31:0] sb(int rs2, int rs1, int off); return s_t(off, rs2, rs1, 0, 7'b0100011); endfunction
  function automatic logic [31:0] beq(int rs1, int rs2, int off); return b_t(off, rs2, rs1, 0); endfunction
  function automatic logic [31:0] bne(int rs1, int rs2, int off); return b_t(off, rs2, rs1, 1); endfunction
  function automatic logic [31:0] blt(int rs1, int rs2, int off); return b_t(off, rs2, rs1, 4); endfunction
  function automatic logic [31:0] jal(int rd, int off);
    logic [20:0] m;
    m = 21'(off);
    return {m[20], m[10:1], m[11], m[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic logic [31:0] jalr(int rd, int rs1, int off); return i_t(off, rs1, 0, rd, 7'b1100111); endfunction
  // X_PAR
  function automatic logic [31:0] p_lwcv(int rd, int off);  return i_t(off, 0, 0, rd, 7'b0001011); endfunction
  function automatic logic [31:0] p_swcv(int rs1, int rs2, int off); return s_t(off, rs2, rs1, 1, 7'b0001011); endfunction
  function automatic logic [31:0] p_lwre(int rd, int num);  return i_t(num, 0, 2, rd, 7'b0001011); endfunction
  function automatic logic [31:0] p_swre(int rs1, int rs2, int num); return s_t(num, rs2, rs1, 3, 7'b0001011); endfunction
  function automatic logic [31:0] p_jalr(int rd, int rs1, int rs2); return r_t(0, rs2, rs1, 4, rd, 7'b0001011); endfunction
  function automatic logic [31:0] p_ret();                  return p_jalr(0, RA, T0); endfunction
  function automatic logic [31:0] p_merge(int rd, int rs1, int rs2); return r_t(0, rs2, rs1, 5, rd, 7'b0001011); endfunction
  function automatic logic [31:0] p_set(int rd, int rs1);   return r_t(0, 0, rs1, 6, rd, 7'b0001011); endfunction
  function automatic logic [31:0] p_fc(int rd);             return r_t(0, 0, 0, 7, rd, 7'b0001011); endfunction
  function automatic logic [31:0] p_fn(int rd);             return r_t(1, 0, 0, 7, rd, 7'b0001011); endfunction
  function automatic logic [31:0] p_syncm();                return r_t(2, 0, 0, 7, 0, 7'b0001011); endfunction
  function automatic logic [31:0] p_jal(int rd, int rs1, int off); return i_t(off, rs1, 0, rd, 7'b0101011); endfunction
endpackage
