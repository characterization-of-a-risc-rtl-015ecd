// rv_asm_pkg: RV32I instruction encoders for the testbenches.
//
// Each function returns the 32-bit machine word of one instruction, so a testbench can build
// its program in SystemVerilog (register numbers are plain integers, immediates are byte
// offsets as in assembly). Covers the instructions the core implements, including the CSR
// instructions, ecall/ebreak, uret and fence.
package rv_asm_pkg;
  function automatic logic [31:0] enc_r(input int f7, rs2, rs1, f3, rd, op);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'(op)};
  endfunction
  function automatic logic [31:0] enc_i(input int imm, rs1, f3, rd, op);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), 7'(op)};
  endfunction
  function automatic logic [31:0] enc_s(input int imm, rs2, rs1, f3);
    logic [11:0] m;
    m = 12'(imm);
    return {m[11:5], 5'(rs2), 5'(rs1), 3'(f3), m[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] enc_b(input int imm, rs2, rs1, f3);
    logic [12:0] m;
    m = 13'(imm);
    return {m[12], m[10:5], 5'(rs2), 5'(rs1), 3'(f3), m[4:1], m[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] LUI  (input int rd, imm20); return {20'(imm20), 5'(rd), 7'b0110111}; endfunction
  function automatic logic [31:0] AUIPC(input int rd, imm20); return {20'(imm20), 5'(rd), 7'b0010111}; endfunction
  function automatic logic [31:0] JAL(input int rd, off);
    logic [20:0] m;
    m = 21'(off);
    return {m[20], m[10:1], m[11], m[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic logic [31:0] JALR(input int rd, rs1, imm); return enc_i(imm, rs1, 0, rd, 32'h67); endfunction

  function automatic logic [31:0] BEQ (input int rs1, rs2, off); return enc_b(off, rs2, rs1, 0); endfunction
  function automatic logic [31:0] BNE (input int rs1, rs2, off); return enc_b(off, rs2, rs1, 1); endfunction
  function automatic logic [31:0] BLT (input int rs1, rs2, off); return enc_b(off, rs2, rs1, 4); endfunction
  function automatic logic [31:0] BGE (input int rs1, rs2, off); return enc_b(off, rs2, rs1, 5); endfunction
  function automatic logic [31:0] BLTU(input int rs1, rs2, off); return enc_b(off, rs2, rs1, 6); endfunction
  function automatic logic [31:0] BGEU(input int rs1, rs2, off); return enc_b(off, rs2, rs1, 7); endfunction

  function automatic logic [31:0] LB (input int rd, rs1, imm); return enc_i(imm, rs1, 0, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LH (input int rd, rs1, imm); return enc_i(imm, rs1, 1, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LW (input int rd, rs1, imm); return enc_i(imm, rs1, 2, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LBU(input int rd, rs1, imm); return enc_i(imm, rs1, 4, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LHU(input int rd, rs1, imm); return enc_i(imm, rs1, 5, rd, 7'b0000011); endfunction
  function automatic logic [31:0] SB (input int rs2, rs1, imm); return enc_s(imm, rs2, rs1, 0); endfunction
  function automatic logic [31:0] SH (input int rs2, rs1, imm); return enc_s(imm, rs2, rs1, 1); endfunction
  function automatic logic [31:0] SW (input int rs2, rs1, imm); return enc_s(imm, rs2, rs1, 2); endfunction

  function automatic logic [31:0] ADDI (input int rd, rs1, imm); return enc_i(imm, rs1, 0, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLTI (input int rd, rs1, imm); return enc_i(imm, rs1, 2, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLTIU(input int rd, rs1, imm); return enc_i(imm, rs1, 3, rd, 7'b0010011); endfunction
  function automatic logic [31:0] XORI (input int rd, rs1, imm); return enc_i(imm, rs1, 4, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ORI  (input int rd, rs1, imm); return enc_i(imm, rs1, 6, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ANDI (input int rd, rs1, imm); return enc_i(imm, rs1, 7, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLLI (input int rd, rs1, sh);  return enc_i(sh & 31, rs1, 1, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRLI (input int rd, rs1, sh);  return enc_i(sh & 31, rs1, 5, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRAI (input int rd, rs1, sh);  return enc_i((sh & 31) | 32'h400, rs1, 5, rd, 7'b0010011); endfunction

  function automatic logic [31:0] ADD (input int rd, rs1, rs2); return enc_r(0,  rs2, rs1, 0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SUB (input int rd, rs1, rs2); return enc_r(32, rs2, rs1, 0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLL (input int rd, rs1, rs2); return enc_r(0,  rs2, rs1, 1, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLT (input int rd, rs1, rs2); return enc_r(0,  rs2, rs1, 2, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLTU(input int rd, rs1, rs2); return enc_r(0,  rs2, rs1, 3, rd, 7'b0110011); endfunction
  function automatic logic [31:0] XOR (input int rd, rs1, rs2); return enc_r(0,  rs2, rs1, 4, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SRL (input int rd, rs1, rs2); return enc_r(0,  rs2, rs1, 5, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SRA (input int rd, rs1, rs2); return enc_r(32, rs2, rs1, 5, rd, 7'b0110011); endfunction
  function automatic logic [31:0] OR  (input int rd, rs1, rs2); return enc_r(0,  rs2, rs1, 6, rd, 7'b0110011); endfunction
  function automatic logic [31:0] AND (input int rd, rs1, rs2); return enc_r(0,  rs2, rs1, 7, rd, 7'b0110011); endfunction

  function automatic logic [31:0] CSRRW (input int rd, csr, rs1);  return enc_i(csr, rs1, 1, rd, 7'b1110011); endfunction
  function automatic logic [31:0] CSRRS (input int rd, csr, rs1);  return enc_i(csr, rs1, 2, rd, 7'b1110011); endfunction
  function automatic logic [31:0] CSRRC (input int rd, csr, rs1);  return enc_i(csr, rs1, 3, rd, 7'b1110011); endfunction
  function automatic logic [31:0] CSRRWI(input int rd, csr, zimm); return enc_i(csr, zimm, 5, rd, 7'b1110011); endfunction
  function automatic logic [31:0] CSRRSI(input int rd, csr, zimm); return enc_i(csr, zimm, 6, rd, 7'b1110011); endfunction

  function automatic logic [31:0] ECALL();  return 32'h0000_0073; endfunction
  function automatic logic [31:0] EBREAK(); return 32'h0010_0073; endfunction
  function automatic logic [31:0] URET();   return 32'h0020_0073; endfunction
  function automatic logic [31:0] FENCE();  return 32'h0ff0_000f; endfunction
  function automatic logic [31:0] NOP();    return 32'h0000_0013; endfunction

  // lui/addi pair that loads any 32-bit constant
  function automatic logic [31:0] LI_HI(input int rd, logic [31:0] v);
    return LUI(rd, int'((v + 32'h800) >> 12));
  endfunction
  function automatic logic [31:0] LI_LO(input int rd, logic [31:0] v);
    return ADDI(rd, rd, int'({{20{v[11]}}, v[11:0]}));
  endfunction
endpackage
