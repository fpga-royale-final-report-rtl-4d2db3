// Self-checking testbench for video_timing: two whole 720p frames. Checks the
// frame length (1650 x 750 cycles between new_frame pulses), the number of
// active pixels per frame (1280 x 720), sync pulse widths and positions, and
// that new_frame falls on the first blanking line.
module tb_video_timing;
  logic clk = 0, rst = 1;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic hsync, vsync, active, new_frame;
  int checks = 0, failures = 0;
  longint cyc = 0, last_nf = -1, act_cnt = 0, hs_cnt = 0, vs_cnt = 0;
  int frames = 0;

  video_timing dut (.clk, .rst, .hcount, .vcount, .hsync, .vsync, .active, .new_frame);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (active) act_cnt++;
    if (hsync) hs_cnt++;
    if (vsync) vs_cnt++;
    if (hsync) check(hcount >= 1390 && hcount < 1430, "hsync position");
    if (vsync) check(vcount >= 725 && vcount < 730, "vsync position");
    check(active == (hcount < 1280 && vcount < 720), "active region");
    if (new_frame) begin
      check(hcount == 0 && vcount == 720, "new_frame position");
      if (last_nf >= 0) begin
        check(cyc - last_nf == 1650 * 750, "frame length");
        check(act_cnt == 1280 * 720, "active pixels per frame");
        check(hs_cnt == 40 * 750, "hsync cycles per frame");
        check(vs_cnt == 5 * 1650, "vsync cycles per frame");
        frames++;
      end
      last_nf = cyc; act_cnt = 0; hs_cnt = 0; vs_cnt = 0;
    end
  end

  initial begin
    @(posedge clk); @(posedge clk); #1 rst = 0;
    wait (frames == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
