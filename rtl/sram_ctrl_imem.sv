// sram_ctrl_imem: controller of the instruction SRAM (SRAM Controller 1).
//
// Drives the single-port instruction SRAM from either the core's fetch
// address (byte address, read only) or the host port (word address, write or
// read), the host taking priority.  The SRAM word appears one cycle after the
// request on instr (to the core) and on host_rdata.  The host port stands
// where the system bus interface loads the program.  The document names this
// block only; this arbitration is this design's own.
module sram_ctrl_imem
  import pim_pkg::*;
#(
  parameter int unsigned WORDS = 4096,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  // core fetch
  input  logic            fetch_req,
  input  logic [XLEN-1:0] fetch_addr,
  output logic [31:0]     instr,
  // host port
  input  logic            host_req,
  input  logic            host_we,
  input  logic [AW-1:0]   host_addr,
  input  logic [31:0]     host_wdata,
  output logic [31:0]     host_rdata,
  // SRAM
  output logic            mem_en,
  output logic            mem_we,
  output logic [AW-1:0]   mem_addr,
  output logic [31:0]     mem_wdata,
  input  logic [31:0]     mem_q
);
  always_comb begin
    if (host_req) begin
      mem_en    = 1'b1;
      mem_we    = host_we;
      mem_addr  = host_addr;
      mem_wdata = host_wdata;
    end else begin
      mem_en    = fetch_req;
      mem_we    = 1'b0;
      mem_addr  = fetch_addr[AW+1:2];
      mem_wdata = '0;
    end
  end
  assign instr      = mem_q;
  assign host_rdata = mem_q;
endmodule
