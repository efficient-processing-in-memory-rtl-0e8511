// tb_pcu: random PIM and ordinary instructions.  In decode, a PIM-type word
// must turn the (unknown, no-op) control word into that of lw with the lw
// flags raised, and leave other control words untouched.  One cycle later
// (execute) pim_en/pim_sel/pim_imm and the two word-scaled addresses must
// follow Table-3 semantics for the rs1 value given; a flush must clear pim_en.
module tb_pcu;
  import pim_pkg::*;
  import rv_asm_pkg::*;
  logic clk = 0, rst = 1;
  logic [31:0] id_instr, ex_rs1_data, pim_addr1, pim_addr2; logic id_valid, unknown_in, unknown_out, ex_flush;
  pipe_ctrl_t pipe_ctrl_in, pipe_ctrl_out; logic load_w_type_flag, load_signed_flag, req_w_flag, pim_en;
  pim_op_e pim_sel; logic [5:0] pim_imm;
  int checks = 0, failures = 0, n_pim = 0, n_flush = 0;
  pcu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    id_instr = nop(); id_valid = 0; unknown_in = 0; ex_flush = 0; pipe_ctrl_in = CTRL_NOP; ex_rs1_data = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic logic is_pim = ($urandom_range(0,1) == 1);
      automatic int o1 = ($urandom_range(0,63) - 32) * 4, o2 = ($urandom_range(0,63) - 32) * 4;
      automatic int op = $urandom_range(0,3);
      logic flush;
      @(negedge clk);
      id_valid = 1;
      if (is_pim) begin
        case (op)
          0: id_instr = add_p(15, o1, o2, 8);
          1: id_instr = mul_p(15, o1, o2, 8);
          2: id_instr = slli_p(15, o1, 8, o2 / 4);
          default: id_instr = addi_p(15, o1, 8, o2 / 4);
        endcase
        pipe_ctrl_in = CTRL_NOP; unknown_in = 1;
      end else begin
        id_instr = addi(5, 6, o1); pipe_ctrl_in = pipe_ctrl_t'($urandom); unknown_in = 0;
      end
      #1;
      checks++;
      if (is_pim) begin
        if (!pipe_ctrl_out.mem_read || !pipe_ctrl_out.reg_write || pipe_ctrl_out.mem_size != SZ_W ||
            pipe_ctrl_out.wd_sel != WD_MEM || !pipe_ctrl_out.use_rs1 || pipe_ctrl_out.mem_write ||
            unknown_out || !load_w_type_flag || !load_signed_flag || !req_w_flag) begin
          failures++; if (failures < 10) $display("pim2lw wrong");
        end
      end else if (pipe_ctrl_out !== pipe_ctrl_in || unknown_out || load_w_type_flag || req_w_flag) failures++;
      flush = ($urandom_range(0,9) == 0);
      ex_flush = flush;
      @(posedge clk); #1;
      ex_flush = 0;
      ex_rs1_data = $urandom & 32'h000f_fffc;
      #1;
      checks++;
      if (pim_en !== (is_pim && !flush)) begin failures++; if (failures < 10) $display("pim_en=%b", pim_en); end
      if (is_pim && !flush) begin
        n_pim++;
        checks++;
        if (pim_sel !== pim_op_e'(op) || pim_addr1 !== ex_rs1_data + 32'(o1) || pim_imm !== 6'(o2 / 4) ||
            ((op < 2) && pim_addr2 !== ex_rs1_data + 32'(o2))) begin
          failures++; if (failures < 10) $display("op=%0d a1=%h a2=%h imm=%0d (o1=%0d o2=%0d rs1=%h)", op, pim_addr1, pim_addr2, pim_imm, o1, o2, ex_rs1_data);
        end
      end
      if (flush) n_flush++;
    end
    checks++; if (n_pim == 0 || n_flush == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
