// tb_sram_ctrl_imem: the controller with an instruction SRAM; loads words
// through the host port, then fetches them by byte address and checks the
// word one cycle later, and that the host port wins over a fetch.
module tb_sram_ctrl_imem;
  localparam int W = 256;
  logic clk = 0;
  logic fetch_req, host_req, host_we; logic [31:0] fetch_addr, instr, host_wdata, host_rdata;
  logic [7:0] host_addr;
  logic mem_en, mem_we; logic [7:0] mem_addr; logic [31:0] mem_wdata, mem_q;
  logic [31:0] model [W];
  int checks = 0, failures = 0;
  sram_ctrl_imem #(.WORDS(W)) dut (.*);
  imem #(.WORDS(W)) u_mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .q(mem_q));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    fetch_req = 0; fetch_addr = 0; host_req = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); host_req = 1; host_we = 1; host_addr = 8'(i); host_wdata = $urandom; model[i] = host_wdata;
      fetch_req = 1; fetch_addr = $urandom & 32'h3fc;   // must lose against the host
    end
    @(negedge clk); host_req = 0; host_we = 0;
    for (int i = 0; i < 2000; i++) begin
      automatic logic [7:0] a = 8'($urandom);
      @(negedge clk);
      if (i % 10 == 0) begin
        host_req = 1; host_we = 0; host_addr = a; fetch_req = 1; fetch_addr = 32'h0;
        @(posedge clk); #1; checks++; if (host_rdata !== model[a]) failures++;
        host_req = 0;
      end else begin
        fetch_req = 1; fetch_addr = {22'b0, a, 2'b00};
        @(posedge clk); #1; checks++;
        if (instr !== model[a]) begin failures++; if (failures < 10) $display("fetch %h -> %h exp %h", fetch_addr, instr, model[a]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
