// tb_regfile: random writes and reads against a model array; checks x0,
// reset to zero and same-cycle write-through.
module tb_regfile;
  logic clk = 0, rst = 1;
  logic [4:0] ra1, ra2, wa; logic [31:0] rd1, rd2, wd; logic we;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  regfile dut (.clk, .rst, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) model[i] = 0;
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); ra2 = 5'(31 - i); #1; checks++;
      if (rd1 !== 0 || rd2 !== 0) failures++;
    end
    for (int i = 0; i < 4000; i++) begin
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = (i % 4 == 0) ? wa : 5'($urandom); ra2 = 5'($urandom);
      #1;
      checks++;
      begin
        automatic logic [31:0] e1 = (ra1 == 0) ? 0 : ((we && wa == ra1) ? wd : model[ra1]);
        automatic logic [31:0] e2 = (ra2 == 0) ? 0 : ((we && wa == ra2) ? wd : model[ra2]);
        if (rd1 !== e1 || rd2 !== e2) begin
          failures++; if (failures < 10) $display("r%0d=%h exp %h r%0d=%h exp %h", ra1, rd1, e1, ra2, rd2, e2);
        end
      end
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
