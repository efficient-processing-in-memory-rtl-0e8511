// fetch: program counter and instruction-fetch addressing.
//
// The instruction SRAM has a registered read, so fetch presents the address
// of the next instruction (fetch_addr) during the cycle before it is needed;
// after the clock edge pc_f holds that address and the SRAM output is the
// instruction at pc_f, qualified by valid_f.  fetch_addr is RESET_PC in the
// first cycle after reset, the redirect target when a branch or jump is taken
// in execute, pc_f itself while decode is stalled (the SRAM re-reads the same
// word) and pc_f + 4 otherwise.  The document only names this block; the
// addressing scheme is this design's own.
module fetch
  import pim_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            stall,
  input  logic            redirect,
  input  logic [XLEN-1:0] redirect_pc,
  output logic [XLEN-1:0] fetch_addr,
  output logic            fetch_req,
  output logic [XLEN-1:0] pc_f,
  output logic            valid_f
);
  logic started;

  always_comb begin
    if (!started)      fetch_addr = RESET_PC;
    else if (redirect) fetch_addr = redirect_pc;
    else if (stall)    fetch_addr = pc_f;
    else               fetch_addr = pc_f + 32'd4;
  end
  assign fetch_req = !rst;

  always_ff @(posedge clk) begin
    if (rst) begin
      started <= 1'b0;
      valid_f <= 1'b0;
      pc_f    <= RESET_PC;
    end else begin
      started <= 1'b1;
      valid_f <= 1'b1;
      pc_f    <= fetch_addr;
    end
  end
endmodule
