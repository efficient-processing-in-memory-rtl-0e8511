// tb_conv_workload: the three evaluated kernel sizes (3x3x3, 5x5x3, 7x7x3)
// on a reduced 32x32x3 image, each with PIM and with conventional
// instructions.  Checks every output and that the PIM code is faster for
// each kernel, and prints the cycle counts and the reduction.
module tb_conv_workload;
  import pim_pkg::*;
  import rv_asm_pkg::*;
  import conv_prog_pkg::*;

  localparam int WATCHDOG_CYCLES = 50_000_000;
`include "conv_tb_body.svh"

  initial begin
    longint c_pim, c_conv;
    repeat (3) @(posedge clk);
    for (int k = 3; k <= 7; k += 2) begin
      run(1'b1, 32, 32, 3, k, 1'b0, c_pim);
      run(1'b0, 32, 32, 3, k, 1'b0, c_conv);
      $display("kernel %0dx%0dx3: PIM %0d, conventional %0d cycles, %0.1f%% fewer", k, k, c_pim, c_conv,
               100.0 * real'(c_conv - c_pim) / real'(c_conv));
      checks++; if (c_pim >= c_conv) begin failures++; $display("PIM run is not faster"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
