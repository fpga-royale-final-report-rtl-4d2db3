// data_mem: data BRAM of the game processor, 32-bit words, word addressed.
//
// One port: a write stores wdata at addr on the rising edge; a read returns
// mem[addr] one cycle after the address (so a load costs the memory stage a
// second cycle, as the report describes). Depth 1024 words is this design's
// choice; the report gives none. Contents start at zero.
module data_mem
  import royale_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     we,
  input  word_t                    wdata,
  output word_t                    rdata
);
  word_t mem [DEPTH];

  initial for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
