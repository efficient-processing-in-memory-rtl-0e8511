// tb_fetch: checks the fetch address sequence after reset, on stalls and on
// redirects, and that pc_f follows the presented address one cycle later.
module tb_fetch;
  logic clk = 0, rst = 1, stall = 0, redirect = 0, fetch_req, valid_f;
  logic [31:0] redirect_pc = 0, fetch_addr, pc_f;
  int checks = 0, failures = 0;
  fetch #(.RESET_PC(32'h100)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] exp_addr, prev;
    repeat (3) @(posedge clk);
    #1; checks++; if (valid_f !== 0 || fetch_req !== 0) failures++;
    rst = 0; #1;
    checks++; if (fetch_addr !== 32'h100) begin failures++; $display("reset addr %h", fetch_addr); end
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk); #1;
      prev = pc_f;
      checks++; if (valid_f !== 1) failures++;
      stall = ($urandom_range(0,3) == 0); redirect = ($urandom_range(0,4) == 0);
      redirect_pc = {$urandom} & 32'h0000_fffc;
      #1;
      exp_addr = redirect ? redirect_pc : (stall ? prev : prev + 4);
      checks++;
      if (fetch_addr !== exp_addr) begin failures++; if (failures < 10) $display("addr %h exp %h", fetch_addr, exp_addr); end
      @(posedge clk); #1;
      checks++; if (pc_f !== exp_addr) failures++;
      stall = 0; redirect = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
