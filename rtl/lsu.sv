// lsu: load-store unit of the core.
//
// Execute stage: a load, store or PIM instruction presents its access.  Byte
// addresses with bit 31 clear go to the data SRAM controller, those with bit
// 31 set to the peripheral port.  Stores get byte enables and the store data
// replicated into the addressed lanes; loads request the whole word.  For a
// PIM instruction the two PIM addresses from the PIM control unit replace the
// ALU address and pim_en/pim_sel/pim_imm travel with the request; a PIM access
// always goes to the data memory.
// Memory stage (one cycle later): the word returned by the addressed target
// is shifted and zero- or sign-extended by size; PIM results are words.
// Both targets answer in one cycle.  The address map and the one-cycle
// peripheral timing are this design's choices.
module lsu
  import pim_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  // execute stage
  input  logic            ex_read,
  input  logic            ex_write,
  input  mem_size_e       ex_size,
  input  logic            ex_signed,
  input  logic [XLEN-1:0] ex_addr,
  input  logic [XLEN-1:0] ex_wdata,
  input  logic            ex_pim_en,
  input  pim_op_e         ex_pim_sel,
  input  logic [XLEN-1:0] ex_pim_addr1,
  input  logic [XLEN-1:0] ex_pim_addr2,
  input  logic [5:0]      ex_pim_imm,
  // data SRAM controller
  output logic            d_req,
  output logic [3:0]      d_wbe,
  output logic [XLEN-1:0] d_addr1,
  output logic [XLEN-1:0] d_addr2,
  output logic [XLEN-1:0] d_wdata,
  output logic            d_pim_en,
  output pim_op_e         d_pim_sel,
  output logic [5:0]      d_pim_imm,
  input  logic [XLEN-1:0] d_rdata,
  // peripheral port
  output logic            p_req,
  output logic            p_we,
  output logic [3:0]      p_be,
  output logic [XLEN-1:0] p_addr,
  output logic [XLEN-1:0] p_wdata,
  input  logic [XLEN-1:0] p_rdata,
  // memory stage
  output logic [XLEN-1:0] mem_load_data
);
  logic [XLEN-1:0] addr;
  logic            access, to_peri;
  logic [3:0]      be;
  logic [XLEN-1:0] wdata_lanes;

  assign addr    = ex_pim_en ? ex_pim_addr1 : ex_addr;
  assign access  = ex_read || ex_write;
  assign to_peri = addr[31] && !ex_pim_en;

  always_comb begin
    unique case (ex_size)
      SZ_B:    begin be = 4'b0001 << addr[1:0];        wdata_lanes = {4{ex_wdata[7:0]}};  end
      SZ_H:    begin be = addr[1] ? 4'b1100 : 4'b0011; wdata_lanes = {2{ex_wdata[15:0]}}; end
      default: begin be = 4'b1111;                     wdata_lanes = ex_wdata;            end
    endcase
  end

  assign d_req     = access && !to_peri;
  assign d_wbe     = ex_write ? be : 4'b0;
  assign d_addr1   = addr;
  assign d_addr2   = ex_pim_addr2;
  assign d_wdata   = wdata_lanes;
  assign d_pim_en  = ex_pim_en && ex_read;
  assign d_pim_sel = ex_pim_sel;
  assign d_pim_imm = ex_pim_imm;

  assign p_req   = access && to_peri;
  assign p_we    = ex_write;
  assign p_be    = be;
  assign p_addr  = addr;
  assign p_wdata = wdata_lanes;

  // memory-stage bookkeeping
  logic      m_peri, m_signed;
  mem_size_e m_size;
  logic [1:0] m_off;
  always_ff @(posedge clk) begin
    if (rst) begin
      m_peri <= 1'b0; m_signed <= 1'b0; m_size <= SZ_W; m_off <= '0;
    end else begin
      m_peri   <= to_peri;
      m_signed <= ex_signed;
      m_size   <= ex_pim_en ? SZ_W : ex_size;
      m_off    <= ex_pim_en ? 2'b00 : addr[1:0];
    end
  end

  logic [XLEN-1:0] word, shifted;
  always_comb begin
    word    = m_peri ? p_rdata : d_rdata;
    shifted = word >> {m_off, 3'b000};
    unique case (m_size)
      SZ_B:    mem_load_data = m_signed ? {{24{shifted[7]}},  shifted[7:0]}  : {24'b0, shifted[7:0]};
      SZ_H:    mem_load_data = m_signed ? {{16{shifted[15]}}, shifted[15:0]} : {16'b0, shifted[15:0]};
      default: mem_load_data = word;
    endcase
  end

  // accesses are naturally aligned
  property p_aligned;
    @(posedge clk) disable iff (rst)
      (access && !ex_pim_en) |-> ((ex_size == SZ_W) ? (addr[1:0] == 2'b00)
                                 : (ex_size == SZ_H) ? (addr[0] == 1'b0) : 1'b1);
  endproperty
  a_aligned: assert property (p_aligned) else $error("lsu: misaligned access at %h", addr);
endmodule
