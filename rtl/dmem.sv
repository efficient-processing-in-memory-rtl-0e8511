// dmem: data memory, a synchronous SRAM of WORDS x 32 bits with two read
// ports.
//
// Port 1 (addr1) reads to q1 or writes wdata under the byte enables wbe;
// port 2 (addr2) only reads, to q2.  Both reads have one cycle of latency,
// so a PIM instruction gets its two operands in the same cycle.  A write
// leaves q1 unchanged.  Addresses are word addresses.  The second read port
// is what the PIM system adds to the data memory; the size, 262144 words
// (1 MiB), is this design's choice, large enough for a 224x224x3 image of
// 32-bit words and its convolution output.
module dmem #(
  parameter int unsigned WORDS = 262144,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en1,
  input  logic [3:0]    wbe,
  input  logic [AW-1:0] addr1,
  input  logic [31:0]   wdata,
  output logic [31:0]   q1,
  input  logic          en2,
  input  logic [AW-1:0] addr2,
  output logic [31:0]   q2
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en1) begin
      if (wbe != 4'b0) begin
        for (int b = 0; b < 4; b++)
          if (wbe[b]) mem[addr1][8*b +: 8] <= wdata[8*b +: 8];
      end else begin
        q1 <= mem[addr1];
      end
    end
    if (en2) q2 <= mem[addr2];
  end
endmodule
