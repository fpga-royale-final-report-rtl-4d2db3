// frame_mem: one frame memory of the graphics module, a single-port BRAM of
// 4-bit palette indices, one per canvas pixel (address = y*WIDTH + x).
// Read-first: in a cycle with we set, dout returns (one cycle later) the
// value the location held before the write. The graphics module relies on
// this to read a pixel for display and overwrite it with the background
// colour in the same cycle. The default depth is the 360 x 720 canvas.
module frame_mem #(
  parameter int unsigned DEPTH = 360 * 720,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [3:0]    din,
  output logic [3:0]    dout
);
  logic [3:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    dout <= mem[addr];
    if (we) mem[addr] <= din;
  end
endmodule
