// instr_mem: instruction BRAM of the game processor, 36-bit words.
//
// One synchronous read port for the instruction handler (address is an
// instruction index; data appears one cycle after the address) and one write
// port used to load a program. The report loads the assembled program into
// BRAM; the load port and the optional $readmemh file are this design's way
// of getting it there. Depth 1024 holds the report's 648-instruction game
// program; the report gives no depth.
module instr_mem
  import royale_pkg::*;
#(
  parameter int unsigned DEPTH     = 1024,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output instr_t                   rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  instr_t                   wdata
);
  instr_t mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;   // NOP
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
