// Self-checking testbench for graphics at a reduced raster (80x56 total,
// 64x48 active, 40x48 canvas, 8x8 sprites, 4 spritesheet frames).
// After every new_frame it offers a random batch of sprites, some crossing
// the right or bottom edge of the canvas and some naming a frame past the
// end of the spritesheet, and builds its own picture of the canvas:
// background bands, then the sprites in order with transparent pixels
// skipped and clipped pixels dropped. During the active period after the
// following new_frame every output pixel is compared with that picture
// (black outside the canvas and in blanking, two cycles of latency). Also
// checked: a back-to-back sprite takes exactly SIZE*SIZE cycles, and
// sprite_ready is low while a sprite is being drawn.
module tb_graphics;
  localparam int HA = 64, HT = 80, VA = 48, VT = 56;
  localparam int W = 40, H = 48, S = 8, NF = 4;
  localparam int BANNER = 6, MY0 = 22, MY1 = 26, BX0 = 4, BX1 = 28, BW = 6;
  localparam int FRAMES = 8;

  logic clk = 0, rst = 1;
  logic valid = 0, ready, new_frame, hsync, vsync, de;
  logic [12:0] sx = 0, sy = 0, sf = 0;
  logic [23:0] rgb;
  logic [23:0] pal [16] = '{
    24'hFFFFFF, 24'hE04040, 24'hF08020, 24'hF0E040, 24'h40A0F0, 24'h8040C0,
    24'hC060A0, 24'h805020, 24'h202020, 24'hFFC0A0, 24'h6060F0, 24'hA0A0A0,
    24'hFF60FF, 24'h20D060, 24'h2060F0, 24'hA0A0D0};
  int checks = 0, failures = 0;
  int n_clipped = 0, n_badframe = 0, n_stall = 0, n_swaps = 0, n_transparent = 0, n_b2b = 0;

  logic [3:0] next_img [H][W];   // being built (sprites sent since the last new_frame)
  logic [3:0] show_img [H][W];   // shown in the current active period
  bit         show_ok = 0;

  graphics #(
    .H_ACTIVE(HA), .H_FP(4), .H_SYNC(4), .H_TOTAL(HT), .V_ACTIVE(VA), .V_FP(2), .V_SYNC(2), .V_TOTAL(VT),
    .CANVAS_WIDTH(W), .CANVAS_HEIGHT(H), .SIZE(S), .NUM_FRAMES(NF), .BANNER_H(BANNER),
    .MOAT_Y0(MY0), .MOAT_Y1(MY1), .BRIDGE0_X(BX0), .BRIDGE1_X(BX1), .BRIDGE_W(BW)
  ) dut (
    .clk, .rst, .sprite_valid(valid), .sprite_ready(ready), .sprite_x(sx), .sprite_y(sy),
    .sprite_frame_number(sf), .new_frame, .rgb, .hsync, .vsync, .de
  );
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  function automatic logic [3:0] bg(int x, int y);
    bit bridge;
    bridge = (x >= BX0 && x < BX0 + BW) || (x >= BX1 && x < BX1 + BW);
    if (y < BANNER || y >= H - BANNER) return 4'd15;
    if (y >= MY0 && y < MY1 && !bridge) return 4'd14;
    return 4'd13;
  endfunction

  task automatic clear_next();
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) next_img[y][x] = bg(x, y);
  endtask

  task automatic paint(int x, int y, int f);
    for (int r = 0; r < S; r++)
      for (int c = 0; c < S; c++) begin
        int v;
        v = ((r / 4) + (c / 4) + f) % 13;
        if (f >= NF) continue;
        if (v == 0) begin n_transparent++; continue; end
        if (x + c < W && y + r < H) next_img[y + r][x + c] = 4'(v);
      end
  endtask

  // raster position of the pixel now on rgb (two cycles behind the counters)
  int hc = 0, vc = 0, h2 = 0, v2 = 0, h1 = 0, v1 = 0;
  always @(posedge clk) begin
    if (rst) begin
      hc <= 0; vc <= 0; h1 <= 0; v1 <= 0; h2 <= 0; v2 <= 0;
    end else begin
      h1 <= hc; v1 <= vc; h2 <= h1; v2 <= v1;
      if (hc == HT - 1) begin hc <= 0; vc <= (vc == VT - 1) ? 0 : vc + 1; end
      else hc <= hc + 1;
    end
  end

  // output checker
  always @(negedge clk) if (!rst && show_ok && !(h2 == 0 && v2 == 0 && hc < 2 && vc == 0)) begin
    if (h2 < HA && v2 < VA) begin
      check(de, "de in active area");
      if (h2 < W && v2 < H) check(rgb == pal[show_img[v2][h2]], "canvas pixel");
      else                  check(rgb == 24'h0, "black outside canvas");
    end else begin
      check(!de && rgb == 24'h0, "blanking");
    end
  end

  always @(posedge clk) if (valid && !ready) n_stall++;

  initial begin
    repeat (FRAMES * HT * VT + 10 * HT * VT) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear_next();
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int fr = 0; fr < FRAMES; fr++) begin
      int nspr, t_prev;
      @(posedge clk iff new_frame);
      n_swaps++;
      #1;
      if (fr >= 1) begin
        show_img = next_img;
        show_ok  = (fr >= 2);     // the first memory shown after reset is uninitialised
      end
      clear_next();
      nspr = $urandom_range(3, 12);
      t_prev = -1;
      for (int i = 0; i < nspr; i++) begin
        int x, y, f, t;
        x = $urandom_range(0, W + 2); y = $urandom_range(0, H + 2);
        f = ($urandom % 6 == 0) ? NF : $urandom_range(0, NF - 1);
        if (x + S > W || y + S > H) n_clipped++;
        if (f >= NF) n_badframe++;
        @(negedge clk);
        valid = 1; sx = 13'(x); sy = 13'(y); sf = 13'(f);
        @(posedge clk iff ready);
        t = $time / 10;
        if (t_prev >= 0) begin
          check(t - t_prev == S * S, "one sprite every SIZE*SIZE cycles");
          n_b2b++;
        end
        t_prev = t;
        paint(x, y, f);
        #1;
        check(!ready, "busy while drawing");
      end
      @(negedge clk); valid = 0;
    end
    check(n_clipped > 0 && n_badframe > 0 && n_stall > 0 && n_transparent > 0 && n_b2b > 0,
          "all mechanisms exercised");
    $display("swaps=%0d clipped=%0d badframe=%0d stall_cycles=%0d", n_swaps, n_clipped, n_badframe, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
