// tb_conv_full: the PIM system at its default sizes running the full
// evaluation input, a 224x224x3 image convolved with a 3x3x3 kernel
// (222x222 outputs), first with PIM instructions and then with conventional
// instructions.  Every output word is checked against a reference computed in
// the testbench, and the PIM run must take fewer cycles.
module tb_conv_full;
  import pim_pkg::*;
  import rv_asm_pkg::*;
  import conv_prog_pkg::*;

  localparam int WATCHDOG_CYCLES = 200_000_000;
`include "conv_tb_body.svh"

  initial begin
    longint c_pim, c_conv;
    repeat (3) @(posedge clk);
    run(1'b1, 224, 224, 3, 3, 1'b0, c_pim);
    run(1'b0, 224, 224, 3, 3, 1'b0, c_conv);
    $display("PIM run %0.1f%% fewer cycles", 100.0 * real'(c_conv - c_pim) / real'(c_conv));
    checks++; if (c_pim >= c_conv) begin failures++; $display("PIM run is not faster"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
