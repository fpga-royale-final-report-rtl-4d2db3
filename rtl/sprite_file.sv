// sprite_file: the second register file of the processor, holding 64 sprites
// of eight 13-bit attributes each.
//
// Ports: two record read ports (a whole sprite, for the decoder), one record
// read port for the sprite renderer, one attribute write port for the
// processor's write-back, the mouse inputs, and the hitpoints of the four
// tower sprites for the 7-segment display.
// The two mice are wired into sprites 62 and 63: every cycle attribute 1
// takes the mouse x, attribute 2 the mouse y and attribute 6 the button state.
// The report says the mice are "wired" into these two sprites but not which
// attribute holds the button; attribute 6 is this design's choice. A mouse
// write wins over a processor write to the same attribute.
// The tower sprites are 0 and 1 (top player) and 60 and 61 (bottom player):
// the report asks for "the first two and last two sprites" but also gives 62
// and 63 to the mice, so the last two non-mouse sprites are used.
// Reads are combinational; writes take effect on the rising edge. Reset
// clears all attributes.
module sprite_file
  import royale_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sidx_t   rsa,
  input  sidx_t   rsb,
  output sprite_t rda,
  output sprite_t rdb,
  input  sidx_t   rsr,        // renderer port
  output sprite_t rdr,
  input  logic    we,
  input  sidx_t   ws,
  input  aidx_t   wi,
  input  sval_t   wd,
  input  sval_t   mouse_x [2],
  input  sval_t   mouse_y [2],
  input  logic    mouse_click [2],
  output sval_t   tower_hp [4]
);
  sprite_t spr [NSPRITES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NSPRITES); i++) spr[i] <= '0;
    end else begin
      if (we) spr[ws][wi] <= wd;
      for (int m = 0; m < 2; m++) begin
        spr[MOUSE0_SPRITE + m][ATTR_X]     <= mouse_x[m];
        spr[MOUSE0_SPRITE + m][ATTR_Y]     <= mouse_y[m];
        spr[MOUSE0_SPRITE + m][ATTR_STATE] <= sval_t'(mouse_click[m]);
      end
    end
  end

  assign rda = spr[rsa];
  assign rdb = spr[rsb];
  assign rdr = spr[rsr];
  assign tower_hp[0] = spr[0][ATTR_HP];
  assign tower_hp[1] = spr[1][ATTR_HP];
  assign tower_hp[2] = spr[60][ATTR_HP];
  assign tower_hp[3] = spr[61][ATTR_HP];
endmodule
