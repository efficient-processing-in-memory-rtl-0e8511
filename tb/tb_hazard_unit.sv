// tb_hazard_unit: random pipeline states checked against a reference of the
// forwarding priority (MEM before WB, no x0, no MEM-stage loads), the
// load-use stall and the redirect flush.
module tb_hazard_unit;
  import pim_pkg::*;
  logic [4:0] id_rs1, id_rs2, ex_rs1, ex_rs2, ex_rd, mem_rd, wb_rd;
  logic id_use_rs1, id_use_rs2, ex_reg_write, ex_mem_read, ex_redirect, mem_reg_write, mem_mem_read, wb_reg_write;
  fwd_e fwd_a, fwd_b; logic stall_id, flush_id, flush_ex;
  int checks = 0, failures = 0;
  hazard_unit dut (.*);

  function automatic fwd_e rf(logic [4:0] r);
    if (r != 0 && mem_reg_write && !mem_mem_read && mem_rd == r) return FWD_MEM;
    if (r != 0 && wb_reg_write && wb_rd == r) return FWD_WB;
    return FWD_NONE;
  endfunction

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      // small register range so that matches are frequent
      id_rs1 = 5'($urandom_range(0,3)); id_rs2 = 5'($urandom_range(0,3));
      ex_rs1 = 5'($urandom_range(0,3)); ex_rs2 = 5'($urandom_range(0,3));
      ex_rd = 5'($urandom_range(0,3)); mem_rd = 5'($urandom_range(0,3)); wb_rd = 5'($urandom_range(0,3));
      {id_use_rs1, id_use_rs2, ex_reg_write, ex_mem_read, mem_reg_write, mem_mem_read, wb_reg_write} = 7'($urandom);
      ex_redirect = ($urandom_range(0,3) == 0) && !ex_mem_read;
      #1;
      begin
        automatic logic lu = ex_mem_read && ex_reg_write && ex_rd != 0 &&
                   ((id_use_rs1 && id_rs1 == ex_rd) || (id_use_rs2 && id_rs2 == ex_rd));
        checks++;
        if (fwd_a !== rf(ex_rs1) || fwd_b !== rf(ex_rs2)) begin failures++; if (failures < 10) $display("fwd mismatch"); end
        checks++;
        if (stall_id !== (lu && !ex_redirect) || flush_id !== ex_redirect || flush_ex !== (lu || ex_redirect)) begin
          failures++; if (failures < 10) $display("stall/flush mismatch");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
