// tb_sram_ctrl_dmem: the controller with a dual-read-port data SRAM.  Loads
// data through the host port, then issues random core stores, loads and PIM
// requests (add.p, mul.p, slli.p, addi.p at two addresses) and checks rdata
// one cycle later against a model; also checks host priority and host reads.
module tb_sram_ctrl_dmem;
  import pim_pkg::*;
  localparam int W = 256;
  logic clk = 0, rst = 1;
  logic req, pim_en, host_req, host_we; logic [3:0] wbe; logic [31:0] addr1, addr2, wdata, rdata, host_wdata, host_rdata;
  pim_op_e pim_sel; logic [5:0] pim_imm; logic [7:0] host_addr;
  logic mem_en1, mem_en2; logic [3:0] mem_wbe; logic [7:0] mem_addr1, mem_addr2; logic [31:0] mem_wdata, mem_q1, mem_q2;
  logic [31:0] model [W];
  int checks = 0, failures = 0, n_pim = 0, n_ld = 0, n_st = 0;
  sram_ctrl_dmem #(.WORDS(W)) dut (.*);
  dmem #(.WORDS(W)) u_mem (.clk, .en1(mem_en1), .wbe(mem_wbe), .addr1(mem_addr1), .wdata(mem_wdata), .q1(mem_q1),
                           .en2(mem_en2), .addr2(mem_addr2), .q2(mem_q2));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    req = 0; pim_en = 0; pim_sel = PIM_ADD; pim_imm = 0; wbe = 0; addr1 = 0; addr2 = 0; wdata = 0;
    host_req = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); host_req = 1; host_we = 1; host_addr = 8'(i); host_wdata = $urandom; model[i] = host_wdata;
      req = 1; wbe = 4'hf; addr1 = 0; wdata = 32'hdead_beef;   // core store must lose
    end
    @(negedge clk); host_req = 0; host_we = 0; req = 0; wbe = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic logic [7:0] a = 8'($urandom), b = 8'($urandom); automatic int kind = $urandom_range(0,2); automatic logic [31:0] e;
      @(negedge clk);
      req = 1; addr1 = {22'b0, a, 2'b00}; addr2 = {22'b0, b, 2'b00};
      pim_sel = pim_op_e'($urandom_range(0,3)); pim_imm = 6'($urandom);
      pim_en = (kind == 2); wbe = (kind == 0) ? 4'($urandom_range(1,15)) : 4'h0; wdata = $urandom;
      if (kind == 0) begin
        for (int k = 0; k < 4; k++) if (wbe[k]) model[a][8*k +: 8] = wdata[8*k +: 8];
        n_st++;
        @(posedge clk);
      end else begin
        if (!pim_en) e = model[a];
        else case (pim_sel)
          PIM_ADD:  e = model[a] + model[b];
          PIM_MUL:  e = model[a] * model[b];
          PIM_SLLI: e = model[a] << pim_imm[4:0];
          default:  e = model[a] + 32'($signed(pim_imm));
        endcase
        if (pim_en) n_pim++; else n_ld++;
        @(posedge clk); #1;
        req = 0; pim_en = 0;
        checks++;
        if (rdata !== e) begin failures++; if (failures < 10) $display("pim=%b sel=%s a=%0d b=%0d -> %h exp %h", pim_en, pim_sel.name(), a, b, rdata, e); end
      end
    end
    // host read-back of everything
    for (int i = 0; i < W; i++) begin
      @(negedge clk); req = 0; host_req = 1; host_addr = 8'(i);
      @(posedge clk); #1; checks++; if (host_rdata !== model[i]) failures++;
    end
    checks++; if (n_pim == 0 || n_ld == 0 || n_st == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
