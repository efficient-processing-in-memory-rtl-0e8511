// tb_instr_decoder: encodes instructions of every format with known fields and
// immediates (with the encoders of rv_asm_pkg) and checks the decoded values.
module tb_instr_decoder;
  import rv_asm_pkg::*;
  logic [31:0] instr, imm; logic [6:0] opcode, funct7; logic [4:0] rd, rs1, rs2; logic [2:0] funct3;
  int checks = 0, failures = 0;
  instr_decoder dut (.instr, .opcode, .rd, .funct3, .rs1, .rs2, .funct7, .imm);

  task automatic chk(input logic [31:0] w, input int e_imm, input int e_rd, input int e_rs1, input int e_rs2, input string what);
    instr = w; #1; checks++;
    if (imm !== 32'(e_imm) || (e_rd >= 0 && rd !== 5'(e_rd)) || (e_rs1 >= 0 && rs1 !== 5'(e_rs1)) ||
        (e_rs2 >= 0 && rs2 !== 5'(e_rs2)) || opcode !== w[6:0] || funct3 !== w[14:12] || funct7 !== w[31:25]) begin
      failures++; $display("%s: imm=%h exp %h rd=%0d rs1=%0d rs2=%0d", what, imm, 32'(e_imm), rd, rs1, rs2);
    end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      automatic int r1 = $urandom_range(0,31), r2 = $urandom_range(0,31), d = $urandom_range(0,31);
      automatic int i12 = $urandom_range(0, 4095) - 2048;
      automatic int b13 = ($urandom_range(0, 4095) - 2048) * 2;
      automatic int j21 = ($urandom_range(0, 1048575) - 524288) * 2;
      automatic logic [19:0] u20 = 20'($urandom);
      chk(addi(d, r1, i12), i12, d, r1, -1, "addi");
      chk(lw(d, i12, r1), i12, d, r1, -1, "lw");
      chk(sw(r2, i12, r1), i12, -1, r1, r2, "sw");
      chk(beq(r1, r2, b13), b13, -1, r1, r2, "beq");
      chk(lui(d, u20), int'({u20, 12'b0}), d, -1, -1, "lui");
      chk(auipc(d, u20), int'({u20, 12'b0}), d, -1, -1, "auipc");
      chk(jal(d, j21), j21, d, -1, -1, "jal");
      chk(jalr(d, r1, i12), i12, d, r1, -1, "jalr");
      chk(add(d, r1, r2), 0, d, r1, r2, "add");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
