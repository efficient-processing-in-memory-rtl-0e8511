// pim_soc: RISC-V processing-in-memory system, top level.
//
// A five-stage RV32I core (rv32i_core, with the PIM control unit) fetches
// from an instruction SRAM through SRAM controller 1 and accesses a
// dual-read-port data SRAM through SRAM controller 2, which contains the PIM
// processing unit.  A PIM instruction reads two data words in one SRAM cycle
// (ports Q1 and Q2), combines them in the controller and returns only the
// result to the core.  Harvard organisation: separate instruction and data
// spaces.
// Ports brought out:
//   host_*  word-wide load/inspect port into both memories, where the system
//           bus interface would attach; hold rst while using it for the
//           instruction memory.  Read data follows a request by one cycle.
//   p_*     peripheral port: data accesses with address bit 31 set, one-cycle
//           read response.
//   retire / illegal_instr  core status.
// Memory sizes (16 KiB instruction, 1 MiB data) are this design's choices.
module pim_soc
  import pim_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 4096,
  parameter int unsigned DMEM_WORDS = 262144,
  parameter logic [XLEN-1:0] RESET_PC = '0,
  localparam int unsigned IAW = $clog2(IMEM_WORDS),
  localparam int unsigned DAW = $clog2(DMEM_WORDS)
) (
  input  logic            clk,
  input  logic            rst,
  // host port, instruction memory
  input  logic            host_i_req,
  input  logic            host_i_we,
  input  logic [IAW-1:0]  host_i_addr,
  input  logic [31:0]     host_i_wdata,
  output logic [31:0]     host_i_rdata,
  // host port, data memory
  input  logic            host_d_req,
  input  logic            host_d_we,
  input  logic [DAW-1:0]  host_d_addr,
  input  logic [31:0]     host_d_wdata,
  output logic [31:0]     host_d_rdata,
  // peripheral port
  output logic            p_req,
  output logic            p_we,
  output logic [3:0]      p_be,
  output logic [XLEN-1:0] p_addr,
  output logic [XLEN-1:0] p_wdata,
  input  logic [XLEN-1:0] p_rdata,
  // status
  output logic            retire,
  output logic            illegal_instr
);
  logic            fetch_req;
  logic [XLEN-1:0] fetch_addr;
  logic [31:0]     instr;
  logic            d_req, d_pim_en;
  logic [3:0]      d_wbe;
  logic [XLEN-1:0] d_addr1, d_addr2, d_wdata, d_rdata;
  pim_op_e         d_pim_sel;
  logic [5:0]      d_pim_imm;

  rv32i_core #(.RESET_PC(RESET_PC)) u_core (
    .clk, .rst,
    .fetch_req, .fetch_addr, .instr,
    .d_req, .d_wbe, .d_addr1, .d_addr2, .d_wdata, .d_pim_en, .d_pim_sel, .d_pim_imm, .d_rdata,
    .p_req, .p_we, .p_be, .p_addr, .p_wdata, .p_rdata,
    .retire, .illegal_instr
  );

  // instruction side
  logic           im_en, im_we;
  logic [IAW-1:0] im_addr;
  logic [31:0]    im_wdata, im_q;

  sram_ctrl_imem #(.WORDS(IMEM_WORDS)) u_ictl (
    .fetch_req, .fetch_addr, .instr,
    .host_req(host_i_req), .host_we(host_i_we), .host_addr(host_i_addr),
    .host_wdata(host_i_wdata), .host_rdata(host_i_rdata),
    .mem_en(im_en), .mem_we(im_we), .mem_addr(im_addr), .mem_wdata(im_wdata), .mem_q(im_q)
  );

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .en(im_en), .we(im_we), .addr(im_addr), .wdata(im_wdata), .q(im_q)
  );

  // data side
  logic           dm_en1, dm_en2;
  logic [3:0]     dm_wbe;
  logic [DAW-1:0] dm_addr1, dm_addr2;
  logic [31:0]    dm_wdata, dm_q1, dm_q2;

  sram_ctrl_dmem #(.WORDS(DMEM_WORDS)) u_dctl (
    .clk, .rst,
    .req(d_req), .wbe(d_wbe), .addr1(d_addr1), .addr2(d_addr2), .wdata(d_wdata),
    .pim_en(d_pim_en), .pim_sel(d_pim_sel), .pim_imm(d_pim_imm), .rdata(d_rdata),
    .host_req(host_d_req), .host_we(host_d_we), .host_addr(host_d_addr),
    .host_wdata(host_d_wdata), .host_rdata(host_d_rdata),
    .mem_en1(dm_en1), .mem_wbe(dm_wbe), .mem_addr1(dm_addr1), .mem_wdata(dm_wdata), .mem_q1(dm_q1),
    .mem_en2(dm_en2), .mem_addr2(dm_addr2), .mem_q2(dm_q2)
  );

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .en1(dm_en1), .wbe(dm_wbe), .addr1(dm_addr1), .wdata(dm_wdata), .q1(dm_q1),
    .en2(dm_en2), .addr2(dm_addr2), .q2(dm_q2)
  );
endmodule
