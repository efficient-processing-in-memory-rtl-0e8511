// pim_pu: PIM processing unit inside the data SRAM controller.
//
// The core issues a PIM request (pim_en, pim_sel, pim_imm) in the same cycle
// as the SRAM address; the SRAM answers one cycle later on q1 (addr1) and q2
// (addr2).  Phase registers hold pim_en, pim_sel and pim_imm for that cycle so
// that they line up with the read data.  The ALU then computes
//   add.p : q1 + q2          mul.p  : low 32 bits of q1 * q2
//   slli.p: q1 << imm[4:0]   addi.p : q1 + sext(imm)
// and the bypass mux returns the ALU result when the delayed pim_en is set
// and q1 unchanged otherwise, so ordinary loads pass straight through.
// Phase registers, ALU on Q1/Q2 and bypass mux follow the document's PU;
// the immediate phase register and the 32-bit product width are this
// design's additions.
module pim_pu
  import pim_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            pim_en,
  input  pim_op_e         pim_sel,
  input  logic [5:0]      pim_imm,
  input  logic [XLEN-1:0] q1,
  input  logic [XLEN-1:0] q2,
  output logic [XLEN-1:0] result
);
  logic     en_phase;
  pim_op_e  sel_phase;
  logic [5:0] imm_phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      en_phase  <= 1'b0;
      sel_phase <= PIM_ADD;
      imm_phase <= '0;
    end else begin
      en_phase  <= pim_en;
      sel_phase <= pim_sel;
      imm_phase <= pim_imm;
    end
  end

  logic [XLEN-1:0] alu_y;
  always_comb begin
    unique case (sel_phase)
      PIM_ADD:  alu_y = q1 + q2;
      PIM_MUL:  alu_y = q1 * q2;
      PIM_SLLI: alu_y = q1 << imm_phase[4:0];
      PIM_ADDI: alu_y = q1 + {{26{imm_phase[5]}}, imm_phase};
      default:  alu_y = q1;
    endcase
  end

  // o_bypass_mux: 0 -> memory data, 1 -> PIM result
  assign result = en_phase ? alu_y : q1;
endmodule
