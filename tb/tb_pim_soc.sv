// tb_pim_soc: end-to-end test of the PIM system at its default sizes.
//
// Loads a convolution program and its data (8x8x3 image, 3x3x3 kernel, random
// small values) through the host ports, releases reset, waits for the
// completion store on the peripheral port, reads the output back through the
// host port and compares it with a convolution computed in the testbench.
// The convolution runs twice, with PIM instructions and with the equivalent
// conventional instructions; both must be correct and the PIM run must take
// fewer cycles.  Every mechanism of the design must occur at least once: each
// of the four PIM operations, ordinary loads through the bypass path,
// load-use stalls, operand forwarding, taken branches, host loads,
// peripheral accesses and unknown instructions.
module tb_pim_soc;
  import pim_pkg::*;
  import rv_asm_pkg::*;
  import conv_prog_pkg::*;

  localparam int WATCHDOG_CYCLES = 2000000;
`include "conv_tb_body.svh"

  initial begin
    longint c_pim, c_conv;
    repeat (3) @(posedge clk);
    run(1'b1, 8, 8, 3, 3, 1'b1, c_pim);
    run(1'b0, 8, 8, 3, 3, 1'b1, c_conv);
    $display("PIM run %0.1f%% fewer cycles", 100.0 * real'(c_conv - c_pim) / real'(c_conv));
    checks++; if (c_pim >= c_conv) begin failures++; $display("PIM run is not faster"); end
    $display("mechanisms: add.p=%0d mul.p=%0d slli.p=%0d addi.p=%0d bypass=%0d stall=%0d fwd=%0d redirect=%0d host=%0d peri=%0d unknown=%0d retired=%0d",
             n_pim[PIM_ADD], n_pim[PIM_MUL], n_pim[PIM_SLLI], n_pim[PIM_ADDI], n_bypass, n_stall, n_fwd, n_redirect, n_host, n_peri, n_illegal, n_retire);
    for (int k = 0; k < 4; k++) begin checks++; if (n_pim[k] == 0) failures++; end
    checks++; if (n_bypass == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_fwd == 0) failures++;
    checks++; if (n_redirect == 0) failures++;
    checks++; if (n_host == 0) failures++;
    checks++; if (n_peri == 0) failures++;
    checks++; if (n_illegal != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
