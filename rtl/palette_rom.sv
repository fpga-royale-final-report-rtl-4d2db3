// palette_rom: 16-entry palette of 24-bit RGB colours (0xRRGGBB), read with
// one cycle of latency. Entry 0 is white, the colour of transparent
// spritesheet pixels; the last three are the background colours the report
// fixes by hand: green terrain (13), blue water (14) and the grey banner
// behind the cards (15). Entries 1..12 come from the spritesheet artwork,
// which is not part of this design; the defaults are placeholder colours and
// can be replaced through the COLORS parameter.
module palette_rom #(
  parameter logic [23:0] COLORS [16] = '{
    24'hFFFFFF, 24'hE04040, 24'hF08020, 24'hF0E040, 24'h40A0F0, 24'h8040C0,
    24'hC060A0, 24'h805020, 24'h202020, 24'hFFC0A0, 24'h6060F0, 24'hA0A0A0,
    24'hFF60FF, 24'h20D060, 24'h2060F0, 24'hA0A0D0}
) (
  input  logic        clk,
  input  logic [3:0]  index,
  output logic [23:0] rgb
);
  always_ff @(posedge clk) rgb <= COLORS[index];
endmodule
