// rv_asm_pkg: instruction encoders for the testbenches.
//
// Functions return the 32-bit machine word of RV32I instructions and of the
// PIM-type instructions (custom-0 opcode, funct3 000 add.p, 001 mul.p,
// 010 slli.p, 011 addi.p; two signed 6-bit word offsets in [25:20] and
// [31:26]).  Branch and jump offsets are byte offsets from the instruction.
package rv_asm_pkg;

  function automatic logic [31:0] r_type(input logic [6:0] f7, input int rs2, input int rs1,
                                         input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] i_type(input int imm, input int rs1, input logic [2:0] f3,
                                         input int rd, input logic [6:0] op);
    logic [11:0] i = 12'(imm);
    return {i, 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] s_type(input int imm, input int rs2, input int rs1, input logic [2:0] f3);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), f3, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_type(input int off, input int rs2, input int rs1, input logic [2:0] f3);
    logic [12:0] i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] add (input int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sub (input int rd, rs1, rs2); return r_type(7'h20, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sll (input int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'b001, rd, 7'b0110011); endfunction
  function automatic logic [31:0] slt (input int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'b010, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sltu(input int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'b011, rd, 7'b0110011); endfunction
  function automatic logic [31:0] xor_(input int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'b100, rd, 7'b0110011); endfunction
  function automatic logic [31:0] srl (input int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'b101, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sra (input int rd, rs1, rs2); return r_type(7'h20, rs2, rs1, 3'b101, rd, 7'b0110011); endfunction
  function automatic logic [31:0] or_ (input int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'b110, rd, 7'b0110011); endfunction
  function automatic logic [31:0] and_(input int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'b111, rd, 7'b0110011); endfunction

  function automatic logic [31:0] mul (input int rd, rs1, rs2); return r_type(7'h01, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction

  function automatic logic [31:0] addi(input int rd, rs1, imm); return i_type(imm, rs1, 3'b000, rd, 7'b0010011); endfunction
  function automatic logic [31:0] slti(input int rd, rs1, imm); return i_type(imm, rs1, 3'b010, rd, 7'b0010011); endfunction
  function automatic logic [31:0] xori(input int rd, rs1, imm); return i_type(imm, rs1, 3'b100, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ori (input int rd, rs1, imm); return i_type(imm, rs1, 3'b110, rd, 7'b0010011); endfunction
  function automatic logic [31:0] andi(input int rd, rs1, imm); return i_type(imm, rs1, 3'b111, rd, 7'b0010011); endfunction
  function automatic logic [31:0] slli(input int rd, rs1, sh);  return i_type(sh & 31, rs1, 3'b001, rd, 7'b0010011); endfunction
  function automatic logic [31:0] srli(input int rd, rs1, sh);  return i_type(sh & 31, rs1, 3'b101, rd, 7'b0010011); endfunction
  function automatic logic [31:0] srai(input int rd, rs1, sh);  return i_type((sh & 31) | 32'h400, rs1, 3'b101, rd, 7'b0010011); endfunction

  function automatic logic [31:0] lw (input int rd, imm, rs1); return i_type(imm, rs1, 3'b010, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lh (input int rd, imm, rs1); return i_type(imm, rs1, 3'b001, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lhu(input int rd, imm, rs1); return i_type(imm, rs1, 3'b101, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lb (input int rd, imm, rs1); return i_type(imm, rs1, 3'b000, rd, 7'b0000011); endfunction
  function automatic logic [31:0] lbu(input int rd, imm, rs1); return i_type(imm, rs1, 3'b100, rd, 7'b0000011); endfunction
  function automatic logic [31:0] sw (input int rs2, imm, rs1); return s_type(imm, rs2, rs1, 3'b010); endfunction
  function automatic logic [31:0] sh (input int rs2, imm, rs1); return s_type(imm, rs2, rs1, 3'b001); endfunction
  function automatic logic [31:0] sb (input int rs2, imm, rs1); return s_type(imm, rs2, rs1, 3'b000); endfunction

  function automatic logic [31:0] beq (input int rs1, rs2, off); return b_type(off, rs2, rs1, 3'b000); endfunction
  function automatic logic [31:0] bne (input int rs1, rs2, off); return b_type(off, rs2, rs1, 3'b001); endfunction
  function automatic logic [31:0] blt (input int rs1, rs2, off); return b_type(off, rs2, rs1, 3'b100); endfunction
  function automatic logic [31:0] bge (input int rs1, rs2, off); return b_type(off, rs2, rs1, 3'b101); endfunction
  function automatic logic [31:0] bltu(input int rs1, rs2, off); return b_type(off, rs2, rs1, 3'b110); endfunction
  function automatic logic [31:0] bgeu(input int rs1, rs2, off); return b_type(off, rs2, rs1, 3'b111); endfunction

  function automatic logic [31:0] lui(input int rd, input logic [19:0] imm20); return {imm20, 5'(rd), 7'b0110111}; endfunction
  function automatic logic [31:0] auipc(input int rd, input logic [19:0] imm20); return {imm20, 5'(rd), 7'b0010111}; endfunction
  function automatic logic [31:0] jal(input int rd, off);
    logic [20:0] i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic logic [31:0] jalr(input int rd, rs1, imm); return i_type(imm, rs1, 3'b000, rd, 7'b1100111); endfunction
  function automatic logic [31:0] nop(); return addi(0, 0, 0); endfunction
  function automatic logic [31:0] ecall(); return 32'h0000_0073; endfunction

  // PIM-type: off1/off2 are byte offsets, multiples of 4 in [-128, 124]
  function automatic logic [31:0] pim(input logic [2:0] f3, input int rd, input int off1, input int off2, input int rs1);
    logic [5:0] a = 6'(off1 / 4);
    logic [5:0] b = 6'(off2 / 4);
    return {b, a, 5'(rs1), f3, 5'(rd), 7'b0001011};
  endfunction
  // add.p rd, off1(rs1), off2(rs1)
  function automatic logic [31:0] add_p (input int rd, off1, off2, rs1); return pim(3'b000, rd, off1, off2, rs1); endfunction
  function automatic logic [31:0] mul_p (input int rd, off1, off2, rs1); return pim(3'b001, rd, off1, off2, rs1); endfunction
  // slli.p rd, off1(rs1), sh ; addi.p rd, off1(rs1), imm (imm in [-32, 31])
  function automatic logic [31:0] slli_p(input int rd, off1, rs1, sh);
    return {6'(sh), 6'(off1 / 4), 5'(rs1), 3'b010, 5'(rd), 7'b0001011};
  endfunction
  function automatic logic [31:0] addi_p(input int rd, off1, rs1, imm);
    return {6'(imm), 6'(off1 / 4), 5'(rs1), 3'b011, 5'(rd), 7'b0001011};
  endfunction

endpackage
