// tb_dmem: random byte-enabled writes on port 1 and reads on both ports
// against a model; both read ports answer one cycle after the request.
module tb_dmem;
  localparam int W = 256;
  logic clk = 0, en1, en2; logic [3:0] wbe; logic [7:0] addr1, addr2; logic [31:0] wdata, q1, q2;
  logic [31:0] model [W];
  int checks = 0, failures = 0;
  dmem #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en1 = 0; en2 = 0; wbe = 0; addr1 = 0; addr2 = 0; wdata = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); en1 = 1; wbe = 4'hf; addr1 = 8'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      en1 = ($urandom_range(0,7) != 0); en2 = ($urandom_range(0,3) != 0);
      wbe = ($urandom_range(0,2) == 0) ? 4'($urandom) : 4'h0;
      addr1 = 8'($urandom); addr2 = (i % 5 == 0) ? addr1 : 8'($urandom); wdata = $urandom;
      begin
        automatic logic [31:0] b1 = q1, b2 = q2, e2 = model[addr2];
        automatic logic r1 = en1 && wbe == 0, r2 = en2; automatic logic [7:0] a1 = addr1;
        if (en1) for (int b = 0; b < 4; b++) if (wbe[b]) model[addr1][8*b +: 8] = wdata[8*b +: 8];
        @(posedge clk); #1;
        checks++;
        if (r1 ? (q1 !== model[a1]) : (q1 !== b1)) begin failures++; if (failures < 10) $display("q1=%h", q1); end
        checks++;
        if (r2 ? (q2 !== e2) : (q2 !== b2)) begin failures++; if (failures < 10) $display("q2=%h exp %h", q2, e2); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
