// Self-checking testbench for mouse_interface against the PS/2 mouse model:
// the start-up command 0xF4 must reach the mouse, then random movement
// packets must move the cursor (x += dx, y -= dy) with clamping at 0 and at
// CANVAS_WIDTH / CANVAS_HEIGHT, overflowed axes ignored, the left button
// reported, and a corrupted packet byte must not move the cursor.
module tb_mouse_interface;
  localparam int W = 360, H = 720;
  logic clk = 0, rst = 1;
  logic host_clk_low, host_data_low, line_clk, line_data;
  logic send = 0, bad = 0;
  logic [7:0] b0, b1, b2, last_cmd;
  logic busy, clicked, streaming, packet_valid;
  logic [12:0] mx, my;
  int cmds;
  int checks = 0, failures = 0;
  int clamps = 0, npk = 0;

  mouse_interface #(.CLK_HZ(1_000_000), .CANVAS_WIDTH(W), .CANVAS_HEIGHT(H)) dut (
    .clk, .rst, .ps2_clk(line_clk), .ps2_data(line_data),
    .ps2_clk_drive_low(host_clk_low), .ps2_data_drive_low(host_data_low),
    .mouse_x(mx), .mouse_y(my), .clicked, .streaming, .packet_valid
  );
  ps2_mouse_model #(.HALF_NS(200)) u_mouse (
    .host_clk_low, .host_data_low, .line_clk, .line_data, .send, .bad_parity(bad),
    .b0, .b1, .b2, .busy, .last_cmd, .cmds
  );
  always #5 clk = ~clk;
  always @(posedge clk) if (packet_valid) npk++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (x=%0d y=%0d)", what, mx, my); end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex, ey;
    #20 rst = 0;
    wait (streaming);
    check(cmds == 1 && last_cmd == 8'hF4, "enable-reporting command sent");
    check(mx == W / 2 && my == H / 2, "start position");
    ex = W / 2; ey = H / 2;
    for (int n = 0; n < 40; n++) begin
      int dx, dy, p0;
      bit ox, oy, l;
      dx = $urandom_range(0, 511) - 256; dy = $urandom_range(0, 511) - 256;
      ox = (n % 9 == 4); oy = (n % 13 == 6); l = 1'($urandom);
      bad = (n % 10 == 8);
      b0 = {oy, ox, dy < 0, dx < 0, 1'b1, 1'b0, 1'b0, l};
      b1 = 8'(dx); b2 = 8'(dy);
      p0 = npk;
      send = 1; wait (busy); send = 0; wait (!busy);
      #200;
      if (bad) begin
        check(npk == p0 && mx == ex && my == ey, "corrupted packet ignored");
      end else begin
        int nx, ny;
        nx = ex + (ox ? 0 : dx); ny = ey - (oy ? 0 : dy);
        if (nx < 0 || nx > W || ny < 0 || ny > H) clamps++;
        ex = nx < 0 ? 0 : (nx > W ? W : nx);
        ey = ny < 0 ? 0 : (ny > H ? H : ny);
        check(npk == p0 + 1, "packet decoded");
        check(mx == ex && my == ey, "position");
        check(clicked == l, "left button");
      end
    end
    check(clamps > 0, "clamping exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
