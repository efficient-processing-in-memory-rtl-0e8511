// alu: RV32I integer ALU of the core's execute stage, with the branch comparator.
//
// y = a <op> b for the operations of alu_op_e (ALUsel), including the low
// 32 bits of a product for MUL, which the conventional convolution code uses.  Separately, br_taken
// evaluates the RV32I branch condition selected by funct3 (BEQ, BNE, BLT, BGE,
// BLTU, BGEU) on the two register operands.  Purely combinational.
// The operation set is that of RV32I; the encoding is this design's own.
module alu
  import pim_pkg::*;
(
  input  alu_op_e          op,
  input  logic [XLEN-1:0]  a,
  input  logic [XLEN-1:0]  b,
  output logic [XLEN-1:0]  y,
  input  logic [2:0]       br_funct3,
  input  logic [XLEN-1:0]  cmp_a,
  input  logic [XLEN-1:0]  cmp_b,
  output logic             br_taken
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_SLL:   y = a << b[4:0];
      ALU_SLT:   y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {31'b0, a < b};
      ALU_XOR:   y = a ^ b;
      ALU_SRL:   y = a >> b[4:0];
      ALU_SRA:   y = $unsigned($signed(a) >>> b[4:0]);
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_PASSB: y = b;
      ALU_MUL:   y = a * b;
      default:   y = a + b;
    endcase
  end

  always_comb begin
    unique case (br_funct3)
      3'b000:  br_taken = (cmp_a == cmp_b);
      3'b001:  br_taken = (cmp_a != cmp_b);
      3'b100:  br_taken = ($signed(cmp_a) <  $signed(cmp_b));
      3'b101:  br_taken = ($signed(cmp_a) >= $signed(cmp_b));
      3'b110:  br_taken = (cmp_a <  cmp_b);
      3'b111:  br_taken = (cmp_a >= cmp_b);
      default: br_taken = 1'b0;
    endcase
  end
endmodule
