// Capacity testbench for graphics at its default (full) size: how many
// 48 x 48 sprites fit in one 720p frame of 1650 x 750 cycles.
//
// The processor side is replaced by a source that always has a sprite
// ready to hand over (sprite_valid held high), with positions spread over the
// canvas and frame numbers cycling through the spritesheet. Between two
// new_frame pulses the testbench counts the hand-overs and measures the gap
// between consecutive ones. Every gap must be exactly 48^2 = 2304 cycles (one
// pixel per cycle, no bubbles between sprites), and the number of sprites
// completed in one frame must reach 1650 * 750 / 2304 = 537, the graphics
// module's capacity per frame. At most one sprite per frame may be cut off
// by the buffer swap. The testbench also checks that sprite_ready is low in
// the new_frame cycle itself and that the frame length stays 1,237,500 cycles
// while the module is saturated.
module tb_graphics_capacity;
  localparam int HT = 1650, VT = 750, S = 48;
  localparam int FRAME = HT * VT;
  localparam int CAP = FRAME / (S * S);

  logic clk = 0, rst = 1;
  logic sprite_valid, sprite_ready, new_frame, hsync, vsync, de;
  logic [12:0] sprite_x, sprite_y, sprite_frame_number;
  logic [23:0] rgb;

  graphics dut (
    .clk, .rst, .sprite_valid, .sprite_ready, .sprite_x, .sprite_y, .sprite_frame_number,
    .new_frame, .rgb, .hsync, .vsync, .de
  );
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // sprite source: a new sprite after every hand-over
  int k = 0;
  always_ff @(posedge clk) if (!rst && sprite_valid && sprite_ready) k <= k + 1;
  assign sprite_valid        = !rst;
  assign sprite_x            = 13'((k % 7) * 48);
  assign sprite_y            = 13'(((k / 7) % 14) * 48);
  assign sprite_frame_number = 13'(k % 24);

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, t_prev_hs, t_frame, n_hs, gaps_bad;
    repeat (4) @(posedge clk);
    rst = 0;
    // skip to a frame boundary so the counts cover whole frames
    @(posedge clk iff new_frame);
    for (int f = 0; f < 3; f++) begin
      check(!sprite_ready, "sprite_ready low in the new_frame cycle");
      t = 0; n_hs = 0; gaps_bad = 0; t_prev_hs = -1;
      do begin
        @(posedge clk);
        t++;
        if (new_frame) break;
        if (sprite_valid && sprite_ready) begin
          if (t_prev_hs >= 0 && t - t_prev_hs != S * S) gaps_bad++;
          t_prev_hs = t;
          n_hs++;
        end
      end while (1);
      t_frame = t;
      // the last hand-over of a frame completes only if 2304 cycles remain
      // before the swap; all earlier ones are separated by exactly 2304
      check(t_frame == FRAME, "frame length while saturated");
      check(gaps_bad == 0, "back-to-back sprites every 48^2 cycles");
      check(n_hs - ((t_frame - t_prev_hs) < S * S ? 1 : 0) >= CAP, "at least 537 complete sprites per frame");
      check(n_hs <= CAP + 1, "no more hand-overs than cycles allow");
      $display("frame %0d: %0d hand-overs, last at cycle %0d of %0d, capacity %0d",
               f, n_hs, t_prev_hs, t_frame, CAP);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
