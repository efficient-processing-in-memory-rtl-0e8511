// tb_rv32i_core: runs a directed program on the core with memories modelled
// in the testbench (instruction SRAM with one-cycle read; dual-read-port data
// SRAM whose PIM arithmetic is modelled here; a peripheral responder).
// Each test leaves a value in x10 and stores it to a result area; the
// results are compared with values worked out in the testbench.  Covered:
// ALU and MUL, forwarding from MEM and WB, load-use stall, byte/half/word
// loads and stores, all branch kinds, JAL/JALR/LUI/AUIPC, the four PIM
// instructions (including a PIM result used at once), peripheral read and
// write, and the unknown-instruction flag.  Timing checks: 8 independent PIM
// instructions issue back to back (9 cycles between the marker stores that
// frame them), and a load-use pair costs exactly one stall cycle.
module tb_rv32i_core;
  import pim_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 0, rst = 1;
  logic fetch_req; logic [31:0] fetch_addr, instr;
  logic d_req, d_pim_en; logic [3:0] d_wbe; logic [31:0] d_addr1, d_addr2, d_wdata, d_rdata;
  pim_op_e d_pim_sel; logic [5:0] d_pim_imm;
  logic p_req, p_we; logic [3:0] p_be; logic [31:0] p_addr, p_wdata, p_rdata;
  logic retire, illegal_instr;

  rv32i_core dut (.*);
  always #5 clk = ~clk;

  // ---------------- memories modelled in the testbench ----------------
  logic [31:0] prog [1024];
  logic [31:0] dm [4096];
  always_ff @(posedge clk) if (fetch_req) instr <= prog[fetch_addr[11:2]];

  always_ff @(posedge clk) begin
    if (d_req) begin
      automatic logic [31:0] q1 = dm[d_addr1[13:2]], q2 = dm[d_addr2[13:2]];
      if (d_wbe != 0) begin
        for (int b = 0; b < 4; b++) if (d_wbe[b]) dm[d_addr1[13:2]][8*b +: 8] <= d_wdata[8*b +: 8];
      end else if (!d_pim_en) d_rdata <= q1;
      else case (d_pim_sel)
        PIM_ADD:  d_rdata <= q1 + q2;
        PIM_MUL:  d_rdata <= q1 * q2;
        PIM_SLLI: d_rdata <= q1 << d_pim_imm[4:0];
        default:  d_rdata <= q1 + {{26{d_pim_imm[5]}}, d_pim_imm};
      endcase
    end
  end

  localparam logic [31:0] PERI_ID = 32'hCAFE_F00D;
  int cyc = 0, marker_cyc [$], n_illegal = 0, n_stall = 0, n_fwd = 0, n_pim = 0;
  logic done = 0;
  logic [31:0] last_peri_w;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (p_req && !p_we) p_rdata <= (p_addr == 32'h8000_0004) ? PERI_ID : 32'h0;
    if (p_req && p_we) begin
      last_peri_w <= p_wdata;
      if (p_addr == 32'h8000_0010) done <= 1;
      if (p_addr == 32'h8000_0008) marker_cyc.push_back(cyc);
    end
    if (illegal_instr) n_illegal++;
    if (!rst && dut.stall_id) n_stall++;
    if (!rst && (dut.fwd_a != FWD_NONE || dut.fwd_b != FWD_NONE)) n_fwd++;
    if (d_req && d_pim_en) n_pim++;
  end

  // ---------------- program builder ----------------
  int pc = 0, nres = 0, checks = 0, failures = 0;
  logic [31:0] expv [64];
  function automatic void p(logic [31:0] w); prog[pc/4] = w; pc += 4; endfunction
  function automatic void emit(logic [31:0] e); p(sw(10, 4*nres, 20)); expv[nres] = e; nres++; endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int loop_pc, t0, j_pc, a_pc;
    for (int i = 0; i < 1024; i++) prog[i] = nop();
    for (int i = 0; i < 4096; i++) dm[i] = 0;
    p(lui(20, 20'h1));                 // x20 = 0x1000 result area
    p(lui(22, 20'h2));                 // x22 = 0x2000 scratch
    p(lui(21, 20'h80000));             // x21 = peripheral base
    p(addi(1, 0, 123));
    p(addi(2, 0, -45));
    p(add(10, 1, 2));                  emit(78);            // forwarded from MEM and WB
    p(sub(10, 1, 2));                  emit(168);
    p(lui(3, 20'hABCDE)); p(addi(3, 3, 32'h123)); p(add(10, 3, 0)); emit(32'hABCDE123);
    p(xor_(10, 3, 1));                 emit(32'hABCDE123 ^ 123);
    p(sra(10, 2, 1));                  emit(32'($signed(-45) >>> (123 & 31)));
    p(srli(10, 3, 4));                 emit(32'hABCDE123 >> 4);
    p(slt(10, 2, 1));                  emit(1);
    p(sltu(10, 2, 1));                 emit(0);
    p(mul(10, 1, 2));                  emit(32'(-5535));
    p(and_(10, 3, 2)); p(or_(10, 10, 1)); emit((32'hABCDE123 & 32'hFFFFFFD3) | 123);
    // memory and load-use
    p(sw(3, 0, 22)); p(lw(4, 0, 22)); p(addi(10, 4, 1)); emit(32'hABCDE124);
    p(lb(10, 1, 22));                  emit(32'hFFFFFFE1);
    p(lbu(10, 1, 22));                 emit(32'h000000E1);
    p(lh(10, 2, 22));                  emit(32'hFFFFABCD);
    p(lhu(10, 2, 22));                 emit(32'h0000ABCD);
    p(sb(1, 3, 22)); p(sh(2, 0, 22)); p(lw(10, 0, 22)); emit(32'h7BCDFFD3);
    // loop with bne
    p(addi(5, 0, 0)); p(addi(6, 0, 10));
    loop_pc = pc; p(addi(5, 5, 3)); p(addi(6, 6, -1)); p(bne(6, 0, loop_pc - pc));
    p(add(10, 5, 0));                  emit(30);
    // branch kinds: x2 = -45, x1 = 123
    p(addi(10, 0, 0));
    p(blt(2, 1, 8));  p(addi(10, 10, 1));    // taken
    p(bltu(2, 1, 8)); p(addi(10, 10, 2));    // not taken
    p(bge(1, 2, 8));  p(addi(10, 10, 4));    // taken
    p(bgeu(1, 2, 8)); p(addi(10, 10, 8));    // not taken
    p(beq(1, 1, 8));  p(addi(10, 10, 16));   // taken
    p(bne(1, 1, 8));  p(addi(10, 10, 32));   // not taken
    emit(2 + 8 + 32);
    // jumps
    j_pc = pc; p(jal(7, 12)); p(addi(10, 0, 99)); p(addi(10, 0, 98));
    p(add(10, 7, 0));                  emit(j_pc + 4);
    a_pc = pc; p(auipc(8, 20'h1)); p(add(10, 8, 0)); emit(a_pc + 32'h1000);
    p(addi(8, 8, -32'sh1000)); p(jalr(9, 8, 28)); p(addi(9, 0, 77)); p(addi(9, 0, 76));
    p(add(10, 9, 0));                  emit(a_pc + 20);   // jalr at a_pc+16 links a_pc+20, skips two
    // PIM instructions on words at x22+64 / x22+68
    p(sw(1, 64, 22)); p(sw(2, 68, 22));
    p(mul_p(10, 64, 68, 22));          emit(32'(-5535));
    p(add_p(10, 64, 68, 22));          emit(78);
    p(slli_p(10, 64, 22, 3));          emit(984);
    p(addi_p(10, 68, 22, -7));         emit(32'(-52));
    p(add_p(11, -64 + 128, 68, 22)); p(addi(10, 11, 1)); emit(79);   // PIM result used at once
    p(lui(23, 20'h2)); p(addi(23, 23, 128));          // x23 = x22 + 128: negative offsets
    p(add_p(10, -64, -60, 23));        emit(78);
    // peripheral
    p(sw(1, 0, 21)); p(lw(10, 4, 21)); emit(PERI_ID);
    // timing: 8 independent PIM instructions between two marker stores
    p(sw(0, 8, 21));
    for (int k = 0; k < 8; k++) p(add_p(12 + k % 4, 64, 68, 22));
    p(sw(0, 8, 21));
    // timing: load-use pair (one stall) between markers
    p(sw(0, 8, 21)); p(lw(4, 0, 22)); p(addi(5, 4, 1)); p(sw(0, 8, 21));
    p(ecall());
    p(sw(0, 16, 21));                  // done
    for (int k = 0; k < 8; k++) p(nop());

    repeat (3) @(posedge clk); #1 rst = 0;
    wait (done); repeat (5) @(posedge clk);
    for (int k = 0; k < nres; k++) begin
      checks++;
      if (dm[(32'h1000 >> 2) + k] !== expv[k]) begin
        failures++; $display("result %0d = %h, expected %h", k, dm[(32'h1000 >> 2) + k], expv[k]);
      end
    end
    checks++; if (last_peri_w !== 0) failures++;
    checks++; if (n_illegal != 1) begin failures++; $display("illegal count %0d", n_illegal); end
    checks++;
    if (marker_cyc.size() != 4 || marker_cyc[1] - marker_cyc[0] != 9 || marker_cyc[3] - marker_cyc[2] != 4) begin
      failures++; $display("marker cycles %p", marker_cyc);
    end
    checks++; if (n_stall == 0 || n_fwd == 0 || n_pim < 14) begin failures++; $display("stall %0d fwd %0d pim %0d", n_stall, n_fwd, n_pim); end
    $display("stalls=%0d forwards=%0d pim=%0d cycles=%0d", n_stall, n_fwd, n_pim, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
