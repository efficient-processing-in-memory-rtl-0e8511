// pim_pkg: types and constants shared by the RV32I core with PIM extension.
//
// Holds the RV32I opcode values, the ALU operation encoding, the pipeline
// control word (pipeCtrl) produced by the control logic and rewritten by the
// PIM control unit, and the PIM operation encoding.  The PIM instructions
// (add.p, mul.p, slli.p, addi.p) use the I-type layout of a load with the
// 12-bit immediate split into two 6-bit fields; the opcode and funct3 values
// chosen for them here are this design's own.
package pim_pkg;

  localparam int unsigned XLEN = 32;

  // RV32I major opcodes
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_FENCE  = 7'b0001111;
  localparam logic [6:0] OP_SYSTEM = 7'b1110011;
  // PIM-type instructions live in the custom-0 opcode space
  localparam logic [6:0] OP_PIM    = 7'b0001011;

  // funct3 of the PIM-type instructions
  typedef enum logic [2:0] {
    PIM_ADD  = 3'b000,   // add.p  : M[a1] + M[a2]
    PIM_MUL  = 3'b001,   // mul.p  : M[a1] * M[a2] (low 32 bits)
    PIM_SLLI = 3'b010,   // slli.p : M[a1] << imm[31:26]
    PIM_ADDI = 3'b011    // addi.p : M[a1] + sext(imm[31:26])
  } pim_op_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU,
    ALU_XOR, ALU_SRL, ALU_SRA, ALU_OR,  ALU_AND, ALU_PASSB, ALU_MUL
  } alu_op_e;

  // first ALU operand source
  typedef enum logic [1:0] { A_RS1, A_PC, A_ZERO } a_sel_e;
  // write-back data source (WDsel)
  typedef enum logic [1:0] { WD_ALU, WD_MEM, WD_PC4 } wd_sel_e;
  // access size of loads and stores (funct3[1:0] of RV32I)
  typedef enum logic [1:0] { SZ_B = 2'b00, SZ_H = 2'b01, SZ_W = 2'b10 } mem_size_e;

  // pipeline control word (pipeCtrl)
  typedef struct packed {
    logic      reg_write;   // REGctrl: write rd
    logic      mem_read;    // LSUctrl: load
    logic      mem_write;   // LSUctrl: store
    mem_size_e mem_size;
    logic      mem_signed;  // sign-extend the loaded byte/half
    logic      branch;      // conditional branch, funct3 selects the compare
    logic      jal;
    logic      jalr;
    logic      b_imm;       // ALUsrc: second operand is the immediate
    a_sel_e    a_sel;
    alu_op_e   alu_op;      // ALUsel
    wd_sel_e   wd_sel;      // WDsel
    logic      use_rs1;
    logic      use_rs2;
  } pipe_ctrl_t;

  localparam pipe_ctrl_t CTRL_NOP = '{
    reg_write: 1'b0, mem_read: 1'b0, mem_write: 1'b0, mem_size: SZ_W,
    mem_signed: 1'b0, branch: 1'b0, jal: 1'b0, jalr: 1'b0, b_imm: 1'b0,
    a_sel: A_RS1, alu_op: ALU_ADD, wd_sel: WD_ALU, use_rs1: 1'b0, use_rs2: 1'b0};

  // forwarding selects for an EX operand
  typedef enum logic [1:0] { FWD_NONE, FWD_MEM, FWD_WB } fwd_e;

endpackage
