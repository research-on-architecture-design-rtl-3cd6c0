// fme_c8_sram: two-port coefficient SRAM of the FME core, one per transformed candidate.
//
// 128 words of 240 bits: each word is 16 HT8x8 coefficients of 15 bits, so one 32x32 block of
// coefficients fills 64 words and the two halves of the memory hold two 32x32 blocks, written
// and read in ping-pong fashion. Word address = {bank, zidx[3:0], row_pair[1:0]}: the four words
// of an 8x8 block are consecutive, and the blocks follow Z order, so a quadrant (16x16) is a run
// of 16 words and a 32x32 block a run of 64 words. The document gives the size, the two ports and
// the ping-pong use; the address layout is this design's own.
//
// One write port and one read port; the read is synchronous (data one cycle after the address).
// Written as an array so a memory compiler macro can replace it.
module fme_c8_sram #(
  parameter int DEPTH = 128,
  parameter int WIDTH = 240
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
