// sram_ctrl_dmem: controller of the data SRAM (SRAM Controller 2) with the
// PIM processing unit.
//
// Request cycle: the core (through the LSU) or the host port presents an
// access; the host takes priority.  Port 1 of the dual-read-port SRAM gets
// addr1 and the write (byte enables wbe, wdata); port 2 gets addr2 and is
// enabled only for a PIM request.  Response cycle: the read words q1 and q2
// pass through the PIM PU, which returns either q1 (ordinary load) or the PIM
// result on rdata.  host_rdata is q1.  Addresses from the core are byte
// addresses; the host port uses word addresses.  The PU placement follows
// the document; the host arbitration is this design's own.
module sram_ctrl_dmem
  import pim_pkg::*;
#(
  parameter int unsigned WORDS = 262144,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic            clk,
  input  logic            rst,
  // core side (from the LSU)
  input  logic            req,
  input  logic [3:0]      wbe,
  input  logic [XLEN-1:0] addr1,
  input  logic [XLEN-1:0] addr2,
  input  logic [XLEN-1:0] wdata,
  input  logic            pim_en,
  input  pim_op_e         pim_sel,
  input  logic [5:0]      pim_imm,
  output logic [XLEN-1:0] rdata,
  // host port
  input  logic            host_req,
  input  logic            host_we,
  input  logic [AW-1:0]   host_addr,
  input  logic [31:0]     host_wdata,
  output logic [31:0]     host_rdata,
  // SRAM
  output logic            mem_en1,
  output logic [3:0]      mem_wbe,
  output logic [AW-1:0]   mem_addr1,
  output logic [31:0]     mem_wdata,
  input  logic [31:0]     mem_q1,
  output logic            mem_en2,
  output logic [AW-1:0]   mem_addr2,
  input  logic [31:0]     mem_q2
);
  logic core_pim;
  assign core_pim = req && pim_en && !host_req;

  always_comb begin
    if (host_req) begin
      mem_en1   = 1'b1;
      mem_wbe   = {4{host_we}};
      mem_addr1 = host_addr;
      mem_wdata = host_wdata;
    end else begin
      mem_en1   = req;
      mem_wbe   = pim_en ? 4'b0 : wbe;
      mem_addr1 = addr1[AW+1:2];
      mem_wdata = wdata;
    end
    mem_en2   = core_pim;
    mem_addr2 = addr2[AW+1:2];
  end

  pim_pu u_pu (
    .clk    (clk),
    .rst    (rst),
    .pim_en (core_pim),
    .pim_sel(pim_sel),
    .pim_imm(pim_imm),
    .q1     (mem_q1),
    .q2     (mem_q2),
    .result (rdata)
  );

  assign host_rdata = mem_q1;
endmodule
