// tb_control_logic: for each RV32I instruction class checks the control word
// fields the pipeline relies on, and that undefined encodings, SYSTEM and the
// PIM-type opcode are reported as unknown with a no-op control word.
module tb_control_logic;
  import pim_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] w; pipe_ctrl_t c; logic unk;
  int checks = 0, failures = 0;
  control_logic dut (.opcode(w[6:0]), .funct3(w[14:12]), .funct7(w[31:25]), .ctrl(c), .unknown(unk));

  task automatic chk(input logic [31:0] iw, input logic e_rw, input logic e_rd, input logic e_wr,
                     input logic e_bimm, input alu_op_e e_op, input wd_sel_e e_wd, input logic e_unk, input string n);
    w = iw; #1; checks++;
    if (c.reg_write !== e_rw || c.mem_read !== e_rd || c.mem_write !== e_wr || unk !== e_unk ||
        (!e_unk && (c.b_imm !== e_bimm || c.alu_op !== e_op || c.wd_sel !== e_wd))) begin
      failures++; $display("%s: rw=%b rd=%b wr=%b bimm=%b op=%s wd=%s unk=%b", n, c.reg_write, c.mem_read,
                           c.mem_write, c.b_imm, c.alu_op.name(), c.wd_sel.name(), unk);
    end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    chk(add(1,2,3),  1,0,0,0,ALU_ADD, WD_ALU,0,"add");
    chk(sub(1,2,3),  1,0,0,0,ALU_SUB, WD_ALU,0,"sub");
    chk(sll(1,2,3),  1,0,0,0,ALU_SLL, WD_ALU,0,"sll");
    chk(slt(1,2,3),  1,0,0,0,ALU_SLT, WD_ALU,0,"slt");
    chk(sltu(1,2,3), 1,0,0,0,ALU_SLTU,WD_ALU,0,"sltu");
    chk(xor_(1,2,3), 1,0,0,0,ALU_XOR, WD_ALU,0,"xor");
    chk(srl(1,2,3),  1,0,0,0,ALU_SRL, WD_ALU,0,"srl");
    chk(sra(1,2,3),  1,0,0,0,ALU_SRA, WD_ALU,0,"sra");
    chk(or_(1,2,3),  1,0,0,0,ALU_OR,  WD_ALU,0,"or");
    chk(and_(1,2,3), 1,0,0,0,ALU_AND, WD_ALU,0,"and");
    chk(mul(1,2,3),  1,0,0,0,ALU_MUL, WD_ALU,0,"mul");
    chk(r_type(7'h01,3,2,3'b100,1,7'b0110011), 0,0,0,0,ALU_ADD,WD_ALU,1,"div");
    chk(r_type(7'h40,3,2,3'b000,1,7'b0110011), 0,0,0,0,ALU_ADD,WD_ALU,1,"bad funct7");
    chk(addi(1,2,-5),1,0,0,1,ALU_ADD, WD_ALU,0,"addi");
    chk(slli(1,2,3), 1,0,0,1,ALU_SLL, WD_ALU,0,"slli");
    chk(srai(1,2,3), 1,0,0,1,ALU_SRA, WD_ALU,0,"srai");
    chk(srli(1,2,3), 1,0,0,1,ALU_SRL, WD_ALU,0,"srli");
    chk(andi(1,2,3), 1,0,0,1,ALU_AND, WD_ALU,0,"andi");
    chk(lw(1,8,2),   1,1,0,1,ALU_ADD, WD_MEM,0,"lw");
    chk(lbu(1,8,2),  1,1,0,1,ALU_ADD, WD_MEM,0,"lbu");
    chk(sw(1,8,2),   0,0,1,1,ALU_ADD, WD_ALU,0,"sw");
    chk(sb(1,8,2),   0,0,1,1,ALU_ADD, WD_ALU,0,"sb");
    chk(beq(1,2,8),  0,0,0,0,ALU_ADD, WD_ALU,0,"beq");
    chk(jal(1,8),    1,0,0,0,ALU_ADD, WD_PC4,0,"jal");
    chk(jalr(1,2,8), 1,0,0,1,ALU_ADD, WD_PC4,0,"jalr");
    chk(lui(1,20'h12345), 1,0,0,1,ALU_ADD,WD_ALU,0,"lui");
    chk(32'h0ff0_000f, 0,0,0,0,ALU_ADD,WD_ALU,0,"fence");
    chk(ecall(),       0,0,0,0,ALU_ADD,WD_ALU,1,"ecall");
    chk(add_p(15,-32,-56,8), 0,0,0,0,ALU_ADD,WD_ALU,1,"add.p");
    chk(32'h0000_3003, 0,0,0,0,ALU_ADD,WD_ALU,1,"ld (RV64)");
    chk(32'h0000_2063, 0,0,0,0,ALU_ADD,WD_ALU,1,"branch f3=010");
    // signedness and size of loads
    w = lh(1,2,3); #1; checks++; if (c.mem_size !== SZ_H || c.mem_signed !== 1'b1) failures++;
    w = lbu(1,2,3); #1; checks++; if (c.mem_size !== SZ_B || c.mem_signed !== 1'b0) failures++;
    w = auipc(1,20'h1); #1; checks++; if (c.a_sel !== A_PC) failures++;
    w = lui(1,20'h1); #1; checks++; if (c.a_sel !== A_ZERO) failures++;
    w = beq(1,2,8); #1; checks++; if (!c.branch || !c.use_rs1 || !c.use_rs2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
