// control_logic: main decoder of the core (the pipeCtrl source).
//
// From opcode, funct3 and funct7 of the instruction in decode it builds the
// pipeline control word pipe_ctrl_t: register write (REGctrl), load/store
// request with size and sign (LSUctrl), ALU operand sources (ALUsrc), ALU
// operation (ALUsel), write-back source (WDsel) and branch/jump kind.  An
// instruction it does not recognise yields the no-op control word and raises
// `unknown`.  The PIM-type opcode is deliberately unknown here: the PIM
// control unit downstream replaces the control word with that of lw.
// Besides RV32I it decodes MUL (low 32 bits of the product), which the
// conventional convolution code relies on; the rest of the M extension is
// unknown.  FENCE decodes as a no-op; ECALL/EBREAK/CSR accesses are reported as
// unknown.  Combinational; the control-word encoding is this design's own.
module control_logic
  import pim_pkg::*;
(
  input  logic [6:0]  opcode,
  input  logic [2:0]  funct3,
  input  logic [6:0]  funct7,
  output pipe_ctrl_t  ctrl,
  output logic        unknown
);
  function automatic alu_op_e arith_op(input logic [2:0] f3, input logic alt, input logic is_reg);
    unique case (f3)
      3'b000:  return (is_reg && alt) ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return alt ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    ctrl    = CTRL_NOP;
    unknown = 1'b0;
    unique case (opcode)
      OP_LUI: begin
        ctrl.reg_write = 1'b1; ctrl.a_sel = A_ZERO; ctrl.b_imm = 1'b1;
      end
      OP_AUIPC: begin
        ctrl.reg_write = 1'b1; ctrl.a_sel = A_PC; ctrl.b_imm = 1'b1;
      end
      OP_JAL: begin
        ctrl.reg_write = 1'b1; ctrl.jal = 1'b1; ctrl.wd_sel = WD_PC4;
      end
      OP_JALR: begin
        ctrl.reg_write = 1'b1; ctrl.jalr = 1'b1; ctrl.wd_sel = WD_PC4;
        ctrl.use_rs1 = 1'b1; ctrl.b_imm = 1'b1;
        unknown = (funct3 != 3'b000);
      end
      OP_BRANCH: begin
        ctrl.branch = 1'b1; ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1;
        unknown = (funct3 == 3'b010) || (funct3 == 3'b011);
      end
      OP_LOAD: begin
        ctrl.reg_write = 1'b1; ctrl.mem_read = 1'b1; ctrl.wd_sel = WD_MEM;
        ctrl.use_rs1 = 1'b1; ctrl.b_imm = 1'b1;
        ctrl.mem_size = mem_size_e'(funct3[1:0]); ctrl.mem_signed = ~funct3[2];
        unknown = (funct3[1:0] == 2'b11) || (funct3 == 3'b110);
      end
      OP_STORE: begin
        ctrl.mem_write = 1'b1; ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1; ctrl.b_imm = 1'b1;
        ctrl.mem_size = mem_size_e'(funct3[1:0]);
        unknown = (funct3[2] == 1'b1) || (funct3[1:0] == 2'b11);
      end
      OP_IMM: begin
        ctrl.reg_write = 1'b1; ctrl.use_rs1 = 1'b1; ctrl.b_imm = 1'b1;
        ctrl.alu_op = arith_op(funct3, funct7[5], 1'b0);
      end
      OP_REG: begin
        ctrl.reg_write = 1'b1; ctrl.use_rs1 = 1'b1; ctrl.use_rs2 = 1'b1;
        if (funct7 == 7'b0000001) begin
          ctrl.alu_op = ALU_MUL;
          unknown = (funct3 != 3'b000);
        end else begin
          ctrl.alu_op = arith_op(funct3, funct7[5], 1'b1);
          unknown = (funct7 != 7'b0000000) && !(funct7 == 7'b0100000 && (funct3 == 3'b000 || funct3 == 3'b101));
        end
      end
      OP_FENCE: ;
      default: unknown = 1'b1;
    endcase
    if (unknown) ctrl = CTRL_NOP;
  end
endmodule
