// hazard_unit: pipeline interlock and forwarding control of the five-stage core.
//
// Forwarding: an EX operand register equal to the destination of the
// instruction in MEM (not a load) takes the MEM result; otherwise one equal to
// the destination in WB takes the write-back value; x0 is never forwarded.
// Load-use: when the instruction in EX is a load (a PIM instruction counts as
// a load) and the instruction in decode reads its destination, decode and
// fetch hold for one cycle and a bubble enters EX.  A taken branch or jump
// resolved in EX (redirect) flushes decode and EX.  Combinational.
// The policy is a standard one; the document only says the control logic
// manages the pipeline.
module hazard_unit
  import pim_pkg::*;
(
  // decode stage
  input  logic [4:0] id_rs1,
  input  logic [4:0] id_rs2,
  input  logic       id_use_rs1,
  input  logic       id_use_rs2,
  // execute stage
  input  logic [4:0] ex_rs1,
  input  logic [4:0] ex_rs2,
  input  logic [4:0] ex_rd,
  input  logic       ex_reg_write,
  input  logic       ex_mem_read,
  input  logic       ex_redirect,
  // memory stage
  input  logic [4:0] mem_rd,
  input  logic       mem_reg_write,
  input  logic       mem_mem_read,
  // write-back stage
  input  logic [4:0] wb_rd,
  input  logic       wb_reg_write,
  output fwd_e       fwd_a,
  output fwd_e       fwd_b,
  output logic       stall_id,    // hold fetch and decode
  output logic       flush_id,    // bubble into decode
  output logic       flush_ex     // bubble into execute
);
  function automatic fwd_e sel(input logic [4:0] r);
    if (r != 5'd0 && mem_reg_write && !mem_mem_read && mem_rd == r) return FWD_MEM;
    if (r != 5'd0 && wb_reg_write && wb_rd == r)                      return FWD_WB;
    return FWD_NONE;
  endfunction

  logic load_use;
  always_comb begin
    fwd_a = sel(ex_rs1);
    fwd_b = sel(ex_rs2);
    load_use = ex_mem_read && ex_reg_write && ex_rd != 5'd0 &&
               ((id_use_rs1 && id_rs1 == ex_rd) || (id_use_rs2 && id_rs2 == ex_rd));
    stall_id = load_use && !ex_redirect;
    flush_id = ex_redirect;
    flush_ex = ex_redirect || load_use;
  end
endmodule
