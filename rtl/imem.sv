// imem: instruction memory, a single-port synchronous SRAM of WORDS x 32 bits.
//
// One access per cycle: with we high the word at addr is written, otherwise it
// is read and appears on q after the clock edge (one-cycle read latency, as a
// compiled SRAM macro).  addr is a word address.  The document does not give
// the size; WORDS = 4096 (16 KiB) is this design's choice.
module imem #(
  parameter int unsigned WORDS = 4096,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   q
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    q <= mem[addr];
    end
  end
endmodule
