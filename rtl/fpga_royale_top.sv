// fpga_royale_top: the complete FPGA Royale system on one 74.25 MHz clock.
//
// Two PS/2 mouse interfaces feed cursor positions and buttons into sprites 62
// and 63 of the game processor. The processor runs the game program from its
// instruction BRAM, keeps its state in the register file, the sprite file and
// the data BRAM, and on every new_frame from the graphics module streams the
// alive sprites and the elixir bars to it. The graphics module draws them
// into the back frame memory and scans the front one out as a 720p raster
// (24-bit RGB, sync and data enable; the HDMI encoder is outside this
// design). The tower hitpoints go to the 8-digit 7-segment display.
// The program is loaded through the prog_* port (hold rst high while loading)
// or from PROG_FILE at start-up.
// PS/2 lines are open-drain: each *_drive_low output pulls its pin low.
module fpga_royale_top
  import royale_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 74_250_000,
  parameter int unsigned IMEM_DEPTH    = 1024,
  parameter int unsigned DMEM_DEPTH    = 1024,
  parameter int unsigned H_ACTIVE      = 1280,
  parameter int unsigned H_FP          = 110,
  parameter int unsigned H_SYNC        = 40,
  parameter int unsigned H_TOTAL       = 1650,
  parameter int unsigned V_ACTIVE      = 720,
  parameter int unsigned V_FP          = 5,
  parameter int unsigned V_SYNC        = 5,
  parameter int unsigned V_TOTAL       = 750,
  parameter int unsigned CANVAS_WIDTH  = 360,
  parameter int unsigned CANVAS_HEIGHT = 720,
  parameter int unsigned SIZE          = 48,
  parameter int unsigned NUM_FRAMES    = 24,
  parameter int unsigned BANNER_H      = 96,
  parameter int unsigned MOAT_Y0       = 336,
  parameter int unsigned MOAT_Y1       = 384,
  parameter int unsigned BRIDGE0_X     = 48,
  parameter int unsigned BRIDGE1_X     = 264,
  parameter int unsigned BRIDGE_W      = 48,
  parameter int unsigned MAX_ELIXIR    = 10,
  parameter int unsigned ELIXIR_FRAME  = NUM_FRAMES - 1,
  parameter int unsigned ELIXIR_DX     = 36,
  parameter int unsigned DIGIT_CYCLES  = CLK_HZ / 1000,
  parameter string       SPRITE_FILE   = "",
  parameter string       PROG_FILE     = ""
) (
  input  logic                          clk,
  input  logic                          rst,
  // two PS/2 mice
  input  logic [1:0]                    ps2_clk,
  input  logic [1:0]                    ps2_data,
  output logic [1:0]                    ps2_clk_drive_low,
  output logic [1:0]                    ps2_data_drive_low,
  // program load port
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  instr_t                        prog_data,
  // video
  output logic [23:0]                   rgb,
  output logic                          hsync,
  output logic                          vsync,
  output logic                          de,
  // 7-segment display
  output logic [7:0]                    an,
  output logic [6:0]                    seg,
  // status
  output word_t                         pc,
  output logic                          retire
);
  // ---- mice ----
  sval_t mouse_x [2], mouse_y [2];
  logic  mouse_click [2];

  for (genvar m = 0; m < 2; m++) begin : g_mouse
    mouse_interface #(
      .CLK_HZ(CLK_HZ), .CANVAS_WIDTH(CANVAS_WIDTH), .CANVAS_HEIGHT(CANVAS_HEIGHT)
    ) u_mouse (
      .clk, .rst, .ps2_clk(ps2_clk[m]), .ps2_data(ps2_data[m]),
      .ps2_clk_drive_low(ps2_clk_drive_low[m]), .ps2_data_drive_low(ps2_data_drive_low[m]),
      .mouse_x(mouse_x[m]), .mouse_y(mouse_y[m]), .clicked(mouse_click[m]),
      .streaming(), .packet_valid()
    );
  end

  // ---- memories ----
  logic [$clog2(IMEM_DEPTH)-1:0] imem_addr;
  instr_t                        imem_rdata;
  logic [$clog2(DMEM_DEPTH)-1:0] dmem_addr;
  logic                          dmem_we;
  word_t                         dmem_wdata, dmem_rdata;

  instr_mem #(.DEPTH(IMEM_DEPTH), .INIT_FILE(PROG_FILE)) u_imem (
    .clk, .raddr(imem_addr), .rdata(imem_rdata),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data)
  );

  data_mem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk, .addr(dmem_addr), .we(dmem_we), .wdata(dmem_wdata), .rdata(dmem_rdata)
  );

  // ---- processor ----
  logic  new_frame, sprite_valid, sprite_ready;
  sval_t sprite_x, sprite_y, sprite_frame;
  sval_t tower_hp [4];

  game_processor #(
    .IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH), .MAX_ELIXIR(MAX_ELIXIR),
    .ELIXIR_FRAME(ELIXIR_FRAME), .ELIXIR_X0(0), .ELIXIR_DX(ELIXIR_DX),
    .ELIXIR_Y_TOP(0), .ELIXIR_Y_BOT(CANVAS_HEIGHT - SIZE)
  ) u_cpu (
    .clk, .rst, .imem_addr, .imem_rdata, .dmem_addr, .dmem_we, .dmem_wdata, .dmem_rdata,
    .mouse_x, .mouse_y, .mouse_click,
    .new_frame, .sprite_valid, .sprite_ready, .sprite_x, .sprite_y, .sprite_frame,
    .tower_hp, .pc, .retire
  );

  // ---- graphics ----
  graphics #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_TOTAL(H_TOTAL),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_TOTAL(V_TOTAL),
    .CANVAS_WIDTH(CANVAS_WIDTH), .CANVAS_HEIGHT(CANVAS_HEIGHT), .SIZE(SIZE),
    .NUM_FRAMES(NUM_FRAMES), .BANNER_H(BANNER_H), .MOAT_Y0(MOAT_Y0), .MOAT_Y1(MOAT_Y1),
    .BRIDGE0_X(BRIDGE0_X), .BRIDGE1_X(BRIDGE1_X), .BRIDGE_W(BRIDGE_W),
    .SPRITE_FILE(SPRITE_FILE)
  ) u_gfx (
    .clk, .rst, .sprite_valid, .sprite_ready, .sprite_x, .sprite_y,
    .sprite_frame_number(sprite_frame), .new_frame, .rgb, .hsync, .vsync, .de
  );

  // ---- tower hitpoints ----
  tower_health_display #(.DIGIT_CYCLES(DIGIT_CYCLES)) u_seg (
    .clk, .rst, .tower_hp, .an, .seg
  );
endmodule
