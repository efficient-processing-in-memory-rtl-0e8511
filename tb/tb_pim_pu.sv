// tb_pim_pu: drives a request each cycle and one cycle later the memory words;
// checks the PIM operations of Table-3 semantics and the bypass of ordinary
// loads, so the phase registers must delay the controls by exactly one cycle.
module tb_pim_pu;
  import pim_pkg::*;
  logic clk = 0, rst = 1, pim_en; pim_op_e pim_sel; logic [5:0] pim_imm; logic [31:0] q1, q2, result;
  int checks = 0, failures = 0, n_op [8], n_bypass = 0;
  pim_pu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic p_en; pim_op_e p_sel; logic [5:0] p_imm; logic [31:0] e;
    pim_en = 0; pim_sel = PIM_ADD; pim_imm = 0; q1 = 0; q2 = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // request for the next cycle; the previous request's data now
      p_en = pim_en; p_sel = pim_sel; p_imm = pim_imm;
      q1 = $urandom; q2 = (i % 9 == 0) ? 32'hffff_ffff : $urandom;
      pim_en = 1'($urandom); pim_sel = pim_op_e'($urandom_range(0,3)); pim_imm = 6'($urandom);
      #1;
      if (i > 0) begin
        if (!p_en) e = q1;
        else case (p_sel)
          PIM_ADD:  e = q1 + q2;
          PIM_MUL:  e = 32'(64'(q1) * 64'(q2));
          PIM_SLLI: e = q1 << p_imm[4:0];
          default:  e = q1 + 32'($signed(p_imm));
        endcase
        if (p_en) n_op[p_sel]++; else n_bypass++;
        checks++;
        if (result !== e) begin failures++; if (failures < 10) $display("en=%b sel=%s q1=%h q2=%h -> %h exp %h", p_en, p_sel.name(), q1, q2, result, e); end
      end
    end
    for (int k = 0; k < 4; k++) begin checks++; if (n_op[k] == 0) failures++; end
    checks++; if (n_bypass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
