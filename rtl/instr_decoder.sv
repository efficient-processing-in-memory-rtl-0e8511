// instr_decoder: field extraction and immediate generation for RV32I and the
// PIM-type format.
//
// Splits a 32-bit instruction into opcode [6:0], rd [11:7], funct3 [14:12],
// rs1 [19:15], rs2 [24:20] and funct7 [31:25], and builds the sign-extended
// immediate of the format the opcode implies (I, S, B, U, J; R-type gives 0).
// The PIM-type instruction keeps the I-type positions of opcode, funct3, rd
// and rs1, so it needs nothing extra here: its two 6-bit immediates,
// [25:20] and [31:26], are split off by the PIM control unit.
// Combinational.
module instr_decoder
  import pim_pkg::*;
(
  input  logic [31:0]     instr,
  output logic [6:0]      opcode,
  output logic [4:0]      rd,
  output logic [2:0]      funct3,
  output logic [4:0]      rs1,
  output logic [4:0]      rs2,
  output logic [6:0]      funct7,
  output logic [XLEN-1:0] imm
);
  assign opcode = instr[6:0];
  assign rd     = instr[11:7];
  assign funct3 = instr[14:12];
  assign rs1    = instr[19:15];
  assign rs2    = instr[24:20];
  assign funct7 = instr[31:25];

  always_comb begin
    unique case (opcode)
      OP_LOAD, OP_IMM, OP_JALR, OP_PIM, OP_SYSTEM, OP_FENCE:
        imm = {{20{instr[31]}}, instr[31:20]};
      OP_STORE:
        imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      OP_BRANCH:
        imm = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
      OP_LUI, OP_AUIPC:
        imm = {instr[31:12], 12'b0};
      OP_JAL:
        imm = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};
      default:
        imm = '0;
    endcase
  end
endmodule
