// rv32i_core: five-stage pipelined RV32I core with the PIM control unit.
//
// Stages: fetch (address to the instruction SRAM, word back one cycle later),
// decode (fields, register read, main control, PIM Ctrl Gen), execute (ALU,
// branch resolution, PIM address generation, data SRAM address), memory
// (data or PIM result back from the data SRAM controller, load alignment) and
// write-back.  Operands are forwarded from memory and write-back into
// execute; a load (or PIM instruction) followed by a user of its result costs
// one stall cycle; taken branches and jumps resolve in execute and flush the
// two younger instructions.
// PIM instructions (add.p, mul.p, slli.p, addi.p) are turned into word loads
// by the PIM control unit: the core only moves an address pair and a command
// to the data SRAM controller, whose processing unit computes the result that
// then returns like load data.  Each one therefore occupies one issue slot
// where the conventional sequence needs two loads and an ALU instruction.
// The pipeline organisation and PIM handling follow the document; hazard
// policy, reset PC and the handling of SYSTEM instructions (no-ops, reported
// on illegal_instr) are this design's choices.  No CSRs and no interrupts.
module rv32i_core
  import pim_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst,
  // instruction SRAM controller
  output logic            fetch_req,
  output logic [XLEN-1:0] fetch_addr,
  input  logic [31:0]     instr,
  // data SRAM controller
  output logic            d_req,
  output logic [3:0]      d_wbe,
  output logic [XLEN-1:0] d_addr1,
  output logic [XLEN-1:0] d_addr2,
  output logic [XLEN-1:0] d_wdata,
  output logic            d_pim_en,
  output pim_op_e         d_pim_sel,
  output logic [5:0]      d_pim_imm,
  input  logic [XLEN-1:0] d_rdata,
  // peripheral port
  output logic            p_req,
  output logic            p_we,
  output logic [3:0]      p_be,
  output logic [XLEN-1:0] p_addr,
  output logic [XLEN-1:0] p_wdata,
  input  logic [XLEN-1:0] p_rdata,
  // status
  output logic            retire,        // an instruction left write-back
  output logic            illegal_instr  // an unknown instruction left decode
);
  // ------------------------------------------------------------------ hazards
  fwd_e fwd_a, fwd_b;
  logic stall_id, flush_id, flush_ex;
  logic ex_redirect;
  logic [XLEN-1:0] ex_target;

  // ------------------------------------------------------------------ fetch
  logic [XLEN-1:0] pc_f;
  logic            valid_f;

  fetch #(.RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst,
    .stall      (stall_id),
    .redirect   (ex_redirect),
    .redirect_pc(ex_target),
    .fetch_addr (fetch_addr),
    .fetch_req  (fetch_req),
    .pc_f       (pc_f),
    .valid_f    (valid_f)
  );

  // IF/ID
  logic            id_valid;
  logic [XLEN-1:0] id_pc;
  logic [31:0]     id_instr;
  always_ff @(posedge clk) begin
    if (rst || flush_id) begin
      id_valid <= 1'b0;
      id_pc    <= '0;
      id_instr <= 32'h0000_0013;
    end else if (!stall_id) begin
      id_valid <= valid_f;
      id_pc    <= pc_f;
      id_instr <= instr;
    end
  end

  // ------------------------------------------------------------------ decode
  logic [6:0]      id_opcode, id_funct7;
  logic [4:0]      id_rd, id_rs1, id_rs2;
  logic [2:0]      id_funct3;
  logic [XLEN-1:0] id_imm, id_rs1_data, id_rs2_data;
  pipe_ctrl_t      base_ctrl, id_ctrl;
  logic            base_unknown, id_unknown;

  instr_decoder u_dec (
    .instr (id_instr), .opcode(id_opcode), .rd(id_rd), .funct3(id_funct3),
    .rs1(id_rs1), .rs2(id_rs2), .funct7(id_funct7), .imm(id_imm)
  );

  control_logic u_ctl (
    .opcode(id_opcode), .funct3(id_funct3), .funct7(id_funct7),
    .ctrl(base_ctrl), .unknown(base_unknown)
  );

  logic            wb_reg_write;
  logic [4:0]      wb_rd;
  logic [XLEN-1:0] wb_data;

  regfile u_rf (
    .clk, .rst,
    .ra1(id_rs1), .ra2(id_rs2), .rd1(id_rs1_data), .rd2(id_rs2_data),
    .we(wb_reg_write), .wa(wb_rd), .wd(wb_data)
  );

  logic [XLEN-1:0] ex_a_fwd;
  logic            pim_en;
  pim_op_e         pim_sel;
  logic [XLEN-1:0] pim_addr1, pim_addr2;
  logic [5:0]      pim_imm;

  pcu u_pcu (
    .clk, .rst,
    .id_instr        (id_instr),
    .id_valid        (id_valid),
    .pipe_ctrl_in    (base_ctrl),
    .unknown_in      (base_unknown),
    .pipe_ctrl_out   (id_ctrl),
    .unknown_out     (id_unknown),
    .load_w_type_flag(),
    .load_signed_flag(),
    .req_w_flag      (),
    .ex_flush        (flush_ex),
    .ex_rs1_data     (ex_a_fwd),
    .pim_en          (pim_en),
    .pim_sel         (pim_sel),
    .pim_addr1       (pim_addr1),
    .pim_addr2       (pim_addr2),
    .pim_imm         (pim_imm)
  );

  assign illegal_instr = id_valid && id_unknown && !stall_id && !flush_id;

  // ID/EX
  logic            ex_valid;
  pipe_ctrl_t      ex_ctrl;
  logic [XLEN-1:0] ex_pc, ex_imm, ex_rs1_data, ex_rs2_data;
  logic [4:0]      ex_rs1, ex_rs2, ex_rd;
  logic [2:0]      ex_funct3;
  always_ff @(posedge clk) begin
    if (rst || flush_ex || !id_valid) begin
      ex_valid <= 1'b0;
      ex_ctrl  <= CTRL_NOP;
      ex_rd    <= '0;
      ex_rs1   <= '0;
      ex_rs2   <= '0;
    end else begin
      ex_valid <= 1'b1;
      ex_ctrl  <= id_ctrl;
      ex_rd    <= id_rd;
      ex_rs1   <= id_ctrl.use_rs1 ? id_rs1 : 5'd0;
      ex_rs2   <= id_ctrl.use_rs2 ? id_rs2 : 5'd0;
    end
    ex_pc       <= id_pc;
    ex_imm      <= id_imm;
    ex_rs1_data <= id_rs1_data;
    ex_rs2_data <= id_rs2_data;
    ex_funct3   <= id_funct3;
  end

  // ------------------------------------------------------------------ execute
  logic            mem_reg_write, mem_mem_read;
  logic [4:0]      mem_rd;
  logic [XLEN-1:0] mem_fwd_val;
  logic [XLEN-1:0] ex_b_fwd, alu_a, alu_b, alu_y;
  logic            br_taken;

  always_comb begin
    unique case (fwd_a)
      FWD_MEM: ex_a_fwd = mem_fwd_val;
      FWD_WB:  ex_a_fwd = wb_data;
      default: ex_a_fwd = ex_rs1_data;
    endcase
    unique case (fwd_b)
      FWD_MEM: ex_b_fwd = mem_fwd_val;
      FWD_WB:  ex_b_fwd = wb_data;
      default: ex_b_fwd = ex_rs2_data;
    endcase
    unique case (ex_ctrl.a_sel)
      A_PC:    alu_a = ex_pc;
      A_ZERO:  alu_a = '0;
      default: alu_a = ex_a_fwd;
    endcase
    alu_b = ex_ctrl.b_imm ? ex_imm : ex_b_fwd;
  end

  alu u_alu (
    .op(ex_ctrl.alu_op), .a(alu_a), .b(alu_b), .y(alu_y),
    .br_funct3(ex_funct3), .cmp_a(ex_a_fwd), .cmp_b(ex_b_fwd), .br_taken(br_taken)
  );

  assign ex_redirect = ex_valid && ((ex_ctrl.branch && br_taken) || ex_ctrl.jal || ex_ctrl.jalr);
  assign ex_target   = ex_ctrl.jalr ? ((ex_a_fwd + ex_imm) & ~32'd1) : (ex_pc + ex_imm);

  hazard_unit u_hz (
    .id_rs1(id_rs1), .id_rs2(id_rs2),
    .id_use_rs1(id_valid && id_ctrl.use_rs1), .id_use_rs2(id_valid && id_ctrl.use_rs2),
    .ex_rs1(ex_rs1), .ex_rs2(ex_rs2), .ex_rd(ex_rd),
    .ex_reg_write(ex_ctrl.reg_write), .ex_mem_read(ex_ctrl.mem_read),
    .ex_redirect(ex_redirect),
    .mem_rd(mem_rd), .mem_reg_write(mem_reg_write), .mem_mem_read(mem_mem_read),
    .wb_rd(wb_rd), .wb_reg_write(wb_reg_write),
    .fwd_a(fwd_a), .fwd_b(fwd_b),
    .stall_id(stall_id), .flush_id(flush_id), .flush_ex(flush_ex)
  );

  logic [XLEN-1:0] mem_load_data;

  lsu u_lsu (
    .clk, .rst,
    .ex_read(ex_ctrl.mem_read), .ex_write(ex_ctrl.mem_write),
    .ex_size(ex_ctrl.mem_size), .ex_signed(ex_ctrl.mem_signed),
    .ex_addr(alu_y), .ex_wdata(ex_b_fwd),
    .ex_pim_en(pim_en), .ex_pim_sel(pim_sel),
    .ex_pim_addr1(pim_addr1), .ex_pim_addr2(pim_addr2), .ex_pim_imm(pim_imm),
    .d_req, .d_wbe, .d_addr1, .d_addr2, .d_wdata, .d_pim_en, .d_pim_sel, .d_pim_imm, .d_rdata,
    .p_req, .p_we, .p_be, .p_addr, .p_wdata, .p_rdata,
    .mem_load_data(mem_load_data)
  );

  // EX/MEM
  logic            mem_valid;
  wd_sel_e         mem_wd_sel;
  logic [XLEN-1:0] mem_alu, mem_pc4;
  always_ff @(posedge clk) begin
    if (rst) begin
      mem_valid     <= 1'b0;
      mem_reg_write <= 1'b0;
      mem_mem_read  <= 1'b0;
      mem_rd        <= '0;
      mem_wd_sel    <= WD_ALU;
    end else begin
      mem_valid     <= ex_valid;
      mem_reg_write <= ex_ctrl.reg_write;
      mem_mem_read  <= ex_ctrl.mem_read;
      mem_rd        <= ex_rd;
      mem_wd_sel    <= ex_ctrl.wd_sel;
    end
    mem_alu <= alu_y;
    mem_pc4 <= ex_pc + 32'd4;
  end

  // ------------------------------------------------------------------ memory
  assign mem_fwd_val = (mem_wd_sel == WD_PC4) ? mem_pc4 : mem_alu;

  // MEM/WB
  logic wb_valid;
  always_ff @(posedge clk) begin
    if (rst) begin
      wb_valid     <= 1'b0;
      wb_reg_write <= 1'b0;
      wb_rd        <= '0;
      wb_data      <= '0;
    end else begin
      wb_valid     <= mem_valid;
      wb_reg_write <= mem_reg_write;
      wb_rd        <= mem_rd;
      wb_data      <= mem_mem_read ? mem_load_data : mem_fwd_val;
    end
  end

  // ------------------------------------------------------------------ write-back
  assign retire = wb_valid;
endmodule
