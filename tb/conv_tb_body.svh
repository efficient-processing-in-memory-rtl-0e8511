// conv_tb_body.svh: common body of the convolution testbenches.
//
// Declares the pim_soc instance at its default sizes with a clock, host-port
// tasks, counters of the mechanisms the design exercises, a cycle watchdog
// (WATCHDOG_CYCLES, a localparam of the including module) and run(), which
// loads and runs one convolution and checks its output against a reference
// computed here.  Included inside a testbench module after
//   import pim_pkg::*; import rv_asm_pkg::*; import conv_prog_pkg::*;

  logic clk = 0, rst = 1;
  logic host_i_req = 0, host_i_we = 0, host_d_req = 0, host_d_we = 0;
  logic [11:0] host_i_addr = 0; logic [17:0] host_d_addr = 0;
  logic [31:0] host_i_wdata = 0, host_i_rdata, host_d_wdata = 0, host_d_rdata;
  logic p_req, p_we; logic [3:0] p_be; logic [31:0] p_addr, p_wdata, p_rdata;
  logic retire, illegal_instr;

  pim_soc dut (.*);
  always #5 clk = ~clk;
  assign p_rdata = 32'h0;

  int checks = 0, failures = 0;
  longint cyc = 0;
  // mechanism counters
  longint n_pim [8], n_bypass = 0, n_stall = 0, n_fwd = 0, n_redirect = 0, n_host = 0, n_peri = 0, n_illegal = 0, n_retire = 0;
  logic done = 0;
  longint n_dacc = 0;     // data-memory requests issued by the core

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (dut.d_req && dut.d_pim_en) n_pim[dut.d_pim_sel] <= n_pim[dut.d_pim_sel] + 1;
      if (dut.d_req && !dut.d_pim_en && dut.d_wbe == 0) n_bypass <= n_bypass + 1;
      if (dut.u_core.stall_id) n_stall <= n_stall + 1;
      if (dut.u_core.fwd_a != FWD_NONE || dut.u_core.fwd_b != FWD_NONE) n_fwd <= n_fwd + 1;
      if (dut.u_core.ex_redirect) n_redirect <= n_redirect + 1;
      if (illegal_instr) n_illegal <= n_illegal + 1;
      if (retire) n_retire <= n_retire + 1;
      if (p_req) n_peri <= n_peri + 1;
      if (p_req && p_we && p_addr == DONE_ADDR) done <= 1;
    end
    if (host_i_req || host_d_req) n_host <= n_host + 1;
    if (!rst && dut.d_req) n_dacc <= n_dacc + 1;
  end

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic host_write_i(int a, logic [31:0] v);
    @(negedge clk); host_i_req = 1; host_i_we = 1; host_i_addr = 12'(a); host_i_wdata = v;
    @(negedge clk); host_i_req = 0; host_i_we = 0;
  endtask
  task automatic host_write_d(int byte_addr, logic [31:0] v);
    @(negedge clk); host_d_req = 1; host_d_we = 1; host_d_addr = 18'(byte_addr >> 2); host_d_wdata = v;
    @(negedge clk); host_d_req = 0; host_d_we = 0;
  endtask
  task automatic host_read_d(int byte_addr, output logic [31:0] v);
    @(negedge clk); host_d_req = 1; host_d_we = 0; host_d_addr = 18'(byte_addr >> 2);
    @(posedge clk); #1 v = host_d_rdata;
    @(negedge clk); host_d_req = 0;
  endtask

  // Runs one convolution (H x W x D image, K x K x D kernel) with PIM or
  // conventional code, checks every output word and returns the cycle count
  // from reset release to the completion store.
  task automatic run(input bit pim, input int H, input int W, input int D, input int K,
                     input bit add_unknown, output longint cycles);
    logic [31:0] q[$];
    logic [31:0] v;
    logic [31:0] img[], ker[], ref_out[];
    int HO = H - K + 1, WO = W - K + 1;
    longint t0, acc0;
    img = new[H * W * D]; ker = new[K * K * D]; ref_out = new[HO * WO];
    foreach (img[i]) img[i] = $urandom_range(0, 255);
    foreach (ker[i]) ker[i] = 32'($urandom_range(0, 15)) - 32'd8;
    for (int oy = 0; oy < HO; oy++)
      for (int ox = 0; ox < WO; ox++) begin
        automatic logic [31:0] acc = 0;
        for (int d = 0; d < D; d++)
          for (int ky = 0; ky < K; ky++)
            for (int kx = 0; kx < K; kx++)
              acc += img[(d * H + oy + ky) * W + ox + kx] * ker[(d * K + ky) * K + kx];
        ref_out[oy * WO + ox] = acc;
      end
    gen_conv(q, pim, H, W, D, K);
    if (add_unknown) q.insert(q.size() - 9, ecall());   // one unknown instruction before the end
    rst = 1; done = 0;
    foreach (q[i]) host_write_i(i, q[i]);
    foreach (img[i]) host_write_d(IMG_BASE + 4 * i, img[i]);
    foreach (ker[i]) host_write_d(KER_BASE + 4 * i, ker[i]);
    for (int i = 0; i < HO * WO; i++) host_write_d(out_base(H, W, D) + 4 * i, 32'hdead_beef);
    @(negedge clk); rst = 0; t0 = cyc; acc0 = n_dacc;
    wait (done);
    cycles = cyc - t0;
    @(negedge clk); rst = 1;
    for (int i = 0; i < HO * WO; i++) begin
      host_read_d(out_base(H, W, D) + 4 * i, v);
      checks++;
      if (v !== ref_out[i]) begin
        failures++; if (failures < 10) $display("pim=%0d out[%0d] = %h, expected %h", pim, i, v, ref_out[i]);
      end
    end
    $display("convolution %0dx%0dx%0d, kernel %0dx%0dx%0d, %s: %0d cycles, %0d data-memory requests",
             H, W, D, K, K, D, pim ? "PIM" : "conventional", cycles, n_dacc - acc0);
  endtask
