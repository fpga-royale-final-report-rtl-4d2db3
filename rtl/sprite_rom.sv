// sprite_rom: the spritesheet BROM. One 4-bit palette index per pixel of each
// SIZE x SIZE animation frame, frames stored one after another, pixels of a
// frame in row-major order: address = frame*SIZE*SIZE + row*SIZE + col.
// The report has 24 frames of 48x48 pixels and 16 palette colours; index 0
// is transparent.
// Read latency is one cycle (registered output).
// The artwork itself comes from a PNG that is not part of this design. If
// INIT_FILE is given it is loaded with $readmemh; otherwise the ROM holds a
// computed test pattern: pixel (f, r, c) = ((r/4) + (c/4) + f) mod 13, which
// uses the sprite colours 1..12 and leaves transparent (0) pixels in every
// frame. Colours 13..15 are kept for the background.
module sprite_rom #(
  parameter int unsigned SIZE       = 48,
  parameter int unsigned NUM_FRAMES = 24,
  parameter string       INIT_FILE  = "",
  localparam int unsigned DEPTH     = NUM_FRAMES * SIZE * SIZE,
  localparam int unsigned AW        = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [3:0]    data
);
  logic [3:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
    else
      for (int f = 0; f < int'(NUM_FRAMES); f++)
        for (int r = 0; r < int'(SIZE); r++)
          for (int c = 0; c < int'(SIZE); c++)
            mem[(f * int'(SIZE) + r) * int'(SIZE) + c] = 4'(((r / 4) + (c / 4) + f) % 13);
  end

  always_ff @(posedge clk) data <= mem[addr];
endmodule
