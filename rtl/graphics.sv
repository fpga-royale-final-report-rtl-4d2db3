// graphics: double-buffered sprite renderer for the HDMI raster.
//
// Two frame memories hold a CANVAS_WIDTH x CANVAS_HEIGHT image of 4-bit
// palette indices. write_mem_1 selects the roles: when it is 1, frame_mem_1
// collects the sprites of the next frame and frame_mem_2 is shown; when 0,
// the other way round. It toggles on every new_frame pulse.
//
// Sprite path. The processor offers a sprite with sprite_valid, sprite_x,
// sprite_y (top-left corner on the canvas) and sprite_frame_number; it is
// taken on a rising edge with sprite_valid && sprite_ready. The module then
// walks the SIZE x SIZE pixels of that spritesheet frame, one per cycle,
// starting at spritesheet_addr = frame*SIZE*SIZE and
// frame_loc_ptr = y*CANVAS_WIDTH + x, and writes each palette index into the
// write-role frame memory one cycle later (spritesheet read latency). A pixel
// is not written when its index is 0 (transparent) or when it lies right of
// or below the canvas, so clipped sprites do not wrap around. sprite_ready
// goes high again in the last pixel cycle, so a stream of sprites costs
// exactly SIZE*SIZE cycles each (2304 for 48x48).
// A sprite still being drawn at new_frame is dropped, and sprite_ready is
// low in the new_frame cycle; this is this design's choice, since the report
// only requires that all sprites fit in one frame.
//
// Display path. output_index = hcount + CANVAS_WIDTH*vcount addresses the
// display-role frame memory inside the canvas. The same cycle writes the
// background index for that pixel into the same location (read-first), so
// the memory is clean when it next becomes the write-role memory.
// Background: grey (15) in a BANNER_H tall band at the top and bottom of the
// canvas, blue water (14) in the moat rows MOAT_Y0..MOAT_Y1-1 except on the
// two bridges, green (13) elsewhere. The report names these three colours;
// the band positions are this design's choice. Outside the canvas and in
// blanking the output is black.
// Latency: rgb, hsync, vsync and de lag hcount/vcount by two cycles (frame
// memory read, palette read).
// Canvas size: the report does not give CANVAS_WIDTH/HEIGHT; 360 x 720 is the
// largest portrait canvas that fits the report's 32 RAMB36 per frame memory
// (32 x 8192 4-bit entries).
module graphics #(
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
  parameter string       SPRITE_FILE   = ""
) (
  input  logic        clk,
  input  logic        rst,
  // from the processor
  input  logic        sprite_valid,
  output logic        sprite_ready,
  input  logic [12:0] sprite_x,
  input  logic [12:0] sprite_y,
  input  logic [12:0] sprite_frame_number,
  output logic        new_frame,
  // video out
  output logic [23:0] rgb,
  output logic        hsync,
  output logic        vsync,
  output logic        de
);
  localparam int unsigned PIXELS_PER_FRAME = SIZE * SIZE;
  localparam int unsigned FDEPTH = CANVAS_WIDTH * CANVAS_HEIGHT;
  localparam int unsigned FAW    = $clog2(FDEPTH);
  localparam int unsigned SAW    = $clog2(NUM_FRAMES * PIXELS_PER_FRAME);
  localparam int unsigned CW     = $clog2(SIZE);

  // ---------------- raster ----------------
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hs0, vs0, act0;

  video_timing #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_TOTAL(H_TOTAL),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_TOTAL(V_TOTAL)
  ) u_timing (
    .clk, .rst, .hcount, .vcount, .hsync(hs0), .vsync(vs0), .active(act0), .new_frame
  );

  logic write_mem_1;
  always_ff @(posedge clk) begin
    if (rst)            write_mem_1 <= 1'b1;
    else if (new_frame) write_mem_1 <= !write_mem_1;
  end

  logic           in_canvas;
  logic [FAW-1:0] output_index;
  logic [3:0]     bg_index;
  assign in_canvas    = (hcount < 11'(CANVAS_WIDTH)) && (vcount < 10'(CANVAS_HEIGHT));
  assign output_index = FAW'(hcount) + FAW'(CANVAS_WIDTH) * FAW'(vcount);

  always_comb begin
    logic bridge;
    bridge = ((hcount >= 11'(BRIDGE0_X)) && (hcount < 11'(BRIDGE0_X + BRIDGE_W)))
          || ((hcount >= 11'(BRIDGE1_X)) && (hcount < 11'(BRIDGE1_X + BRIDGE_W)));
    if (vcount < 10'(BANNER_H) || vcount >= 10'(CANVAS_HEIGHT - BANNER_H)) bg_index = 4'd15;
    else if (vcount >= 10'(MOAT_Y0) && vcount < 10'(MOAT_Y1) && !bridge)  bg_index = 4'd14;
    else                                                                  bg_index = 4'd13;
  end

  // ---------------- sprite path ----------------
  logic           reading;
  logic [SAW-1:0] spritesheet_addr;
  logic [FAW-1:0] frame_loc_ptr;
  logic [CW-1:0]  col, row;
  logic [13:0]    frame_x, frame_y;
  logic           frame_ok;
  logic           last_pixel;
  logic           onscreen;
  // one-cycle delayed copy, aligned with the spritesheet read data
  logic           p1_valid, p1_on;
  logic [FAW-1:0] p1_ptr;
  logic [3:0]     read_color_index;

  assign last_pixel   = reading && (col == CW'(SIZE - 1)) && (row == CW'(SIZE - 1));
  assign sprite_ready = (!reading || last_pixel) && !new_frame;
  assign onscreen     = (frame_x < 14'(CANVAS_WIDTH)) && (frame_y < 14'(CANVAS_HEIGHT)) && frame_ok;

  always_ff @(posedge clk) begin
    if (rst) begin
      reading <= 1'b0; col <= '0; row <= '0;
      spritesheet_addr <= '0; frame_loc_ptr <= '0;
      frame_x <= '0; frame_y <= '0; frame_ok <= 1'b0;
      p1_valid <= 1'b0; p1_on <= 1'b0; p1_ptr <= '0;
    end else begin
      p1_valid <= reading && !new_frame;
      p1_on    <= onscreen;
      p1_ptr   <= frame_loc_ptr;
      if (new_frame) begin
        reading <= 1'b0;
      end else if (sprite_valid && sprite_ready) begin
        reading          <= 1'b1;
        col              <= '0;
        row              <= '0;
        frame_ok         <= (sprite_frame_number < 13'(NUM_FRAMES));
        spritesheet_addr <= SAW'(sprite_frame_number) * SAW'(PIXELS_PER_FRAME);
        frame_loc_ptr    <= FAW'(sprite_y) * FAW'(CANVAS_WIDTH) + FAW'(sprite_x);
        frame_x          <= {1'b0, sprite_x};
        frame_y          <= {1'b0, sprite_y};
      end else if (reading) begin
        spritesheet_addr <= spritesheet_addr + 1'b1;
        if (col == CW'(SIZE - 1)) begin
          col           <= '0;
          row           <= row + 1'b1;
          frame_x       <= frame_x - 14'(SIZE - 1);
          frame_y       <= frame_y + 1'b1;
          frame_loc_ptr <= frame_loc_ptr + FAW'(CANVAS_WIDTH - SIZE + 1);
        end else begin
          col           <= col + 1'b1;
          frame_x       <= frame_x + 1'b1;
          frame_loc_ptr <= frame_loc_ptr + 1'b1;
        end
        if (last_pixel) reading <= 1'b0;
      end
    end
  end

  sprite_rom #(.SIZE(SIZE), .NUM_FRAMES(NUM_FRAMES), .INIT_FILE(SPRITE_FILE)) u_sprite_mem (
    .clk, .addr(spritesheet_addr), .data(read_color_index)
  );

  logic sprite_wen;
  assign sprite_wen = p1_valid && p1_on && (read_color_index != 4'd0);

  // ---------------- frame memories ----------------
  logic [FAW-1:0] addr1, addr2;
  logic           wen1, wen2;
  logic [3:0]     din1, din2, color_index_1, color_index_2;

  always_comb begin
    if (write_mem_1) begin
      addr1 = p1_ptr;       wen1 = sprite_wen; din1 = read_color_index;
      addr2 = output_index; wen2 = in_canvas;  din2 = bg_index;
    end else begin
      addr1 = output_index; wen1 = in_canvas;  din1 = bg_index;
      addr2 = p1_ptr;       wen2 = sprite_wen; din2 = read_color_index;
    end
  end

  frame_mem #(.DEPTH(FDEPTH)) u_frame_mem_1 (.clk, .addr(addr1), .we(wen1), .din(din1), .dout(color_index_1));
  frame_mem #(.DEPTH(FDEPTH)) u_frame_mem_2 (.clk, .addr(addr2), .we(wen2), .din(din2), .dout(color_index_2));

  // ---------------- output pipeline ----------------
  logic       wm1_d1, canvas_d1, canvas_d2;
  logic [1:0] hs_d, vs_d, act_d;
  logic [23:0] color_out;

  always_ff @(posedge clk) begin
    if (rst) begin
      wm1_d1 <= 1'b1; canvas_d1 <= 1'b0; canvas_d2 <= 1'b0;
      hs_d <= '0; vs_d <= '0; act_d <= '0;
    end else begin
      wm1_d1    <= write_mem_1;
      canvas_d1 <= in_canvas;
      canvas_d2 <= canvas_d1;
      hs_d      <= {hs_d[0], hs0};
      vs_d      <= {vs_d[0], vs0};
      act_d     <= {act_d[0], act0};
    end
  end

  palette_rom u_palette_mem (
    .clk, .index(wm1_d1 ? color_index_2 : color_index_1), .rgb(color_out)
  );

  assign rgb   = (canvas_d2 && act_d[1]) ? color_out : 24'h000000;
  assign hsync = hs_d[1];
  assign vsync = vs_d[1];
  assign de    = act_d[1];
endmodule
