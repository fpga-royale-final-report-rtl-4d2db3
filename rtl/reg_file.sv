// reg_file: the processor's 32 x 32-bit general register file.
//
// Three combinational read ports (one per register field of the instruction
// word) and one synchronous write port. Register 0 reads as zero and ignores
// writes, as in RISC-V, which the instruction set follows; the report only
// gives the count of 32 registers. Registers 30 and 31 hold the elixir of the
// two players by software convention and are brought out directly for the
// sprite renderer.
// Timing: a write on a rising edge is visible on the read ports in the next
// cycle. Reset clears every register (synchronous, active high).
module reg_file
  import royale_pkg::*;
#(
  parameter int unsigned N = NREGS
) (
  input  logic  clk,
  input  logic  rst,
  input  ridx_t ra1,
  input  ridx_t ra2,
  input  ridx_t ra3,
  output word_t rd1,
  output word_t rd2,
  output word_t rd3,
  input  logic  we,
  input  ridx_t wa,
  input  word_t wd,
  output word_t elixir0,   // register 30
  output word_t elixir1    // register 31
);
  word_t regs [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1     = regs[ra1];
  assign rd2     = regs[ra2];
  assign rd3     = regs[ra3];
  assign elixir0 = regs[ELIXIR0_REG];
  assign elixir1 = regs[ELIXIR1_REG];
endmodule
