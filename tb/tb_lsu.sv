// tb_lsu: random loads and stores of every size to the data memory and the
// peripheral range, and PIM accesses; checks byte enables, lane-replicated
// store data, routing, the PIM address substitution, and the aligned and
// extended load data one cycle later.
module tb_lsu;
  import pim_pkg::*;
  logic clk = 0, rst = 1;
  logic ex_read, ex_write, ex_signed, ex_pim_en; mem_size_e ex_size; pim_op_e ex_pim_sel; logic [5:0] ex_pim_imm;
  logic [31:0] ex_addr, ex_wdata, ex_pim_addr1, ex_pim_addr2;
  logic d_req, d_pim_en, p_req, p_we; logic [3:0] d_wbe, p_be; pim_op_e d_pim_sel; logic [5:0] d_pim_imm;
  logic [31:0] d_addr1, d_addr2, d_wdata, d_rdata, p_addr, p_wdata, p_rdata, mem_load_data;
  int checks = 0, failures = 0;
  lsu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ex_read = 0; ex_write = 0; ex_signed = 0; ex_pim_en = 0; ex_size = SZ_W; ex_pim_sel = PIM_ADD; ex_pim_imm = 0;
    ex_addr = 0; ex_wdata = 0; ex_pim_addr1 = 0; ex_pim_addr2 = 0; d_rdata = 0; p_rdata = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic int kind = $urandom_range(0,2);   // 0 store, 1 load, 2 pim
      automatic logic peri = ($urandom_range(0,3) == 0) && kind != 2;
      automatic mem_size_e sz = mem_size_e'($urandom_range(0,2));
      automatic logic [31:0] a = {peri, 19'($urandom), 12'($urandom)};
      logic [3:0] e_be; logic [31:0] e_wd, word, sh, e_ld;
      if (sz == SZ_W) a[1:0] = 0; else if (sz == SZ_H) a[0] = 0;
      @(negedge clk);
      ex_read = (kind != 0); ex_write = (kind == 0); ex_size = (kind == 2) ? SZ_W : sz; ex_signed = 1'($urandom);
      ex_pim_en = (kind == 2); ex_addr = (kind == 2) ? 32'h1234_5670 : a; ex_wdata = $urandom;
      ex_pim_addr1 = {12'b0, 18'($urandom), 2'b00}; ex_pim_addr2 = {12'b0, 18'($urandom), 2'b00};
      ex_pim_sel = pim_op_e'($urandom_range(0,3)); ex_pim_imm = 6'($urandom);
      #1;
      case (ex_size)
        SZ_B:    begin e_be = 4'b0001 << a[1:0]; e_wd = {4{ex_wdata[7:0]}}; end
        SZ_H:    begin e_be = a[1] ? 4'b1100 : 4'b0011; e_wd = {2{ex_wdata[15:0]}}; end
        default: begin e_be = 4'hf; e_wd = ex_wdata; end
      endcase
      checks++;
      if (kind == 2) begin
        if (!d_req || p_req || !d_pim_en || d_addr1 !== ex_pim_addr1 || d_addr2 !== ex_pim_addr2 ||
            d_pim_sel !== ex_pim_sel || d_pim_imm !== ex_pim_imm || d_wbe !== 0) begin failures++; $display("pim routing"); end
      end else if (peri) begin
        if (d_req || !p_req || p_addr !== a || p_we !== ex_write || p_be !== e_be || (ex_write && p_wdata !== e_wd)) begin
          failures++; $display("peri routing");
        end
      end else begin
        if (!d_req || p_req || d_pim_en || d_addr1 !== a || d_wbe !== (ex_write ? e_be : 4'h0) || (ex_write && d_wdata !== e_wd)) begin
          failures++; $display("dmem routing a=%h be=%b exp %b", d_addr1, d_wbe, e_be);
        end
      end
      @(posedge clk); #1;
      ex_read = 0; ex_write = 0; ex_pim_en = 0;
      word = $urandom; d_rdata = peri ? $urandom : word; p_rdata = peri ? word : $urandom;
      #1;
      if (kind != 0) begin
        automatic logic [1:0] off = (kind == 2) ? 2'b00 : a[1:0];
        sh = word >> (8 * off);
        if (kind == 2 || sz == SZ_W) e_ld = word;
        else if (sz == SZ_H) e_ld = ex_signed ? 32'($signed(sh[15:0])) : {16'b0, sh[15:0]};
        else e_ld = ex_signed ? 32'($signed(sh[7:0])) : {24'b0, sh[7:0]};
        checks++;
        if (mem_load_data !== e_ld) begin failures++; if (failures < 10) $display("load sz=%s off=%0d -> %h exp %h", sz.name(), off, mem_load_data, e_ld); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
