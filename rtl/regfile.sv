// regfile: the core's 32 x 32-bit integer register file.
//
// Two asynchronous read ports (read register1/2 -> read data1/2) and one
// synchronous write port (write register, write data, enabled by REGctrl).
// x0 always reads zero.  A write and a read of the same register in the same
// cycle return the new value (write-through), so the decode stage needs no
// forwarding from write-back.  The write-through is this design's choice.
module regfile
  import pim_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [4:0]      ra1,
  input  logic [4:0]      ra2,
  output logic [XLEN-1:0] rd1,
  output logic [XLEN-1:0] rd2,
  input  logic            we,
  input  logic [4:0]      wa,
  input  logic [XLEN-1:0] wd
);
  logic [XLEN-1:0] regs [1:31];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    if (ra1 == 5'd0)                rd1 = '0;
    else if (we && wa == ra1)       rd1 = wd;
    else                            rd1 = regs[ra1];
    if (ra2 == 5'd0)                rd2 = '0;
    else if (we && wa == ra2)       rd2 = wd;
    else                            rd2 = regs[ra2];
  end
endmodule
