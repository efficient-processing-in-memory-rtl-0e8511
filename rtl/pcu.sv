// pcu: PIM control unit, the part of the core's control logic that handles
// the PIM-type instructions add.p, mul.p, slli.p and addi.p.
//
// PIM-type layout (I-type of a load, immediate split in two):
//   [31:26] imm6 (second operand)  [25:20] imm6 (first operand)
//   [19:15] rs1  [14:12] funct3  [11:7] rd  [6:0] opcode
// Decode stage (PIM Ctrl Gen): when the instruction is PIM-type, the control
// word from the main decoder (which sees an unknown opcode) is replaced by
// that of `lw rd, 0(rs1)` (pipe_ctrl_out = pipeCtrl_pim2lw), the unknown flag
// is cleared and the lw flags load_w_type_flag, load_signed_flag and
// req_w_flag are raised.  The core then moves the instruction through the
// pipeline as a word load, with no extra stall.
// Execute stage (PIM Decoder): opcode and funct3 and the two immediates are
// held in flip-flops from decode; from them and read data1 (the forwarded rs1
// value) it drives pim_en, pim_sel and the two byte addresses
//   pim_addr1 = rs1 + sext(imm[25:20]) * 4,  pim_addr2 = rs1 + sext(imm[31:26]) * 4
// and pim_imm = imm[31:26] as the operand of slli.p and addi.p.
// The scaling of the 6-bit offsets to words, the opcode and the funct3 values
// are this design's choices.
module pcu
  import pim_pkg::*;
#(
  parameter logic [6:0] PIM_OPCODE = OP_PIM
) (
  input  logic            clk,
  input  logic            rst,
  // decode stage
  input  logic [31:0]     id_instr,
  input  logic            id_valid,
  input  pipe_ctrl_t      pipe_ctrl_in,
  input  logic            unknown_in,
  output pipe_ctrl_t      pipe_ctrl_out,
  output logic            unknown_out,
  output logic            load_w_type_flag,
  output logic            load_signed_flag,
  output logic            req_w_flag,
  // decode -> execute register control
  input  logic            ex_flush,
  // execute stage
  input  logic [XLEN-1:0] ex_rs1_data,
  output logic            pim_en,
  output pim_op_e         pim_sel,
  output logic [XLEN-1:0] pim_addr1,
  output logic [XLEN-1:0] pim_addr2,
  output logic [5:0]      pim_imm
);
  // ---------------- PIM Ctrl Gen (decode) ----------------
  logic id_is_pim;
  assign id_is_pim = (id_instr[6:0] == PIM_OPCODE) && (id_instr[14] == 1'b0);

  always_comb begin
    pipe_ctrl_out    = pipe_ctrl_in;
    unknown_out      = unknown_in;
    load_w_type_flag = 1'b0;
    load_signed_flag = 1'b0;
    req_w_flag       = 1'b0;
    if (id_is_pim) begin
      pipe_ctrl_out            = CTRL_NOP;
      pipe_ctrl_out.reg_write  = 1'b1;
      pipe_ctrl_out.mem_read   = 1'b1;
      pipe_ctrl_out.mem_size   = SZ_W;
      pipe_ctrl_out.mem_signed = 1'b1;
      pipe_ctrl_out.wd_sel     = WD_MEM;
      pipe_ctrl_out.use_rs1    = 1'b1;
      unknown_out              = 1'b0;
      load_w_type_flag         = 1'b1;
      load_signed_flag         = 1'b1;
      req_w_flag               = 1'b1;
    end
  end

  // ---------------- opcode/funct phase flip-flops ----------------
  logic       ex_is_pim;
  logic [2:0] ex_funct3;
  logic [5:0] ex_imm_a, ex_imm_b;

  always_ff @(posedge clk) begin
    if (rst || ex_flush) begin
      ex_is_pim <= 1'b0;
      ex_funct3 <= '0;
      ex_imm_a  <= '0;
      ex_imm_b  <= '0;
    end else begin
      ex_is_pim <= id_is_pim && id_valid;
      ex_funct3 <= id_instr[14:12];
      ex_imm_a  <= id_instr[25:20];
      ex_imm_b  <= id_instr[31:26];
    end
  end

  // ---------------- PIM Decoder (execute) ----------------
  assign pim_en    = ex_is_pim;
  assign pim_sel   = pim_op_e'(ex_funct3);
  assign pim_addr1 = ex_rs1_data + {{24{ex_imm_a[5]}}, ex_imm_a, 2'b00};
  assign pim_addr2 = ex_rs1_data + {{24{ex_imm_b[5]}}, ex_imm_b, 2'b00};
  assign pim_imm   = ex_imm_b;
endmodule
