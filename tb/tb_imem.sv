// tb_imem: random writes and reads against a model; checks the one-cycle
// read latency and that a disabled cycle keeps the output.
module tb_imem;
  localparam int W = 256;
  logic clk = 0, en, we; logic [7:0] addr; logic [31:0] wdata, q;
  logic [31:0] model [W]; bit known [W];
  int checks = 0, failures = 0;
  imem #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 8'(i); wdata = $urandom; model[i] = wdata; known[i] = 1;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0,7) != 0); we = ($urandom_range(0,3) == 0); addr = 8'($urandom); wdata = $urandom;
      begin
        automatic logic [31:0] q_prev = q; automatic logic r = en && !we; automatic logic [7:0] a = addr;
        if (en && we) model[addr] = wdata;
        @(posedge clk); #1;
        checks++;
        if (r ? (q !== model[a]) : (q !== q_prev)) begin failures++; if (failures < 10) $display("q=%h", q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
