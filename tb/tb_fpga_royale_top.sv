// End-to-end testbench for fpga_royale_top at its default (full) size:
// 720p raster of 1650 x 750 cycles, 360 x 720 canvas, 48 x 48 sprites,
// 24-frame spritesheet, 74.25 MHz timing constants.
//
// A small game program is loaded through the program port: it places four
// towers (one crossing the right edge and one the bottom edge of the canvas),
// a troop, and gives the two mouse sprites a type and frame. It then runs a
// loop 20 times: the troop steps right (SPADD), DST measures its distance to
// a tower, BGE skips or ATTACK takes the troop's damage off the tower's
// hitpoints, a loop counter makes a round trip through data memory
// (SW/LW/ADD), register 30 (elixir) counts up, WAIT pauses, BLT loops back.
// Then it parks in a WAIT loop.
// Meanwhile two PS/2 mouse models accept the start-up command and send
// movement packets; one pushes its cursor past the canvas edge (clamp).
// Mouse 1 then sends a packet with a bad parity bit, which must be dropped.
//
// Checked: the final hitpoints on the 7-segment display (decoded from the
// multiplexed segments), and one complete displayed frame, pixel by pixel
// over the whole 1280 x 720 active area, against a picture painted here:
// background bands, every alive sprite in index order at its expected
// place (the troop's final x, the cursors at the clamped mouse positions),
// then the elixir bars (10 of 20 for the top player, 3 for the bottom),
// with transparency and clipping. Each mechanism (sprite hand-over stalls,
// frame swaps, transparent pixels, clipping, attacks, both branch
// outcomes, loads, waits, mouse packets, clamping, mouse receive errors,
// elixir cap) is counted
// and must have happened.
module tb_fpga_royale_top;
  import royale_pkg::*;
  localparam int HA = 1280, HT = 1650, VA = 720, VT = 750;
  localparam int W = 360, H = 720, S = 48, NF = 24;
  localparam int BANNER = 96, MY0 = 336, MY1 = 384, BX0 = 48, BX1 = 264, BW = 48;
  localparam int ELIX_DX = 36, ELIX_FRAME = NF - 1, MAXE = 10;
  localparam int STEP = 10, NITER = 20, RANGE = 60, DMG = 7, LOOP_WAIT = 150_000;

  logic clk = 0, rst = 1;
  logic [1:0] ps2_clk, ps2_data, clk_low, data_low;
  logic prog_we = 0;
  logic [9:0] prog_addr = 0;
  instr_t prog_data = '0;
  logic [23:0] rgb;
  logic hsync, vsync, de, retire;
  logic [7:0] an;
  logic [6:0] seg;
  word_t pc;

  fpga_royale_top dut (
    .clk, .rst, .ps2_clk, .ps2_data, .ps2_clk_drive_low(clk_low), .ps2_data_drive_low(data_low),
    .prog_we, .prog_addr, .prog_data, .rgb, .hsync, .vsync, .de, .an, .seg, .pc, .retire
  );
  always #5 clk = ~clk;

  // ---------------- mice ----------------
  logic send [2], busy [2], bad [2];
  logic [7:0] mb0 [2], mb1 [2], mb2 [2], last_cmd [2];
  int cmds [2];
  for (genvar m = 0; m < 2; m++) begin : g_m
    ps2_mouse_model #(.HALF_NS(20_000)) u_m (
      .host_clk_low(clk_low[m]), .host_data_low(data_low[m]), .line_clk(ps2_clk[m]), .line_data(ps2_data[m]),
      .send(send[m]), .bad_parity(bad[m]), .b0(mb0[m]), .b1(mb1[m]), .b2(mb2[m]), .busy(busy[m]),
      .last_cmd(last_cmd[m]), .cmds(cmds[m])
    );
  end

  int checks = 0, failures = 0;
  int n_stall = 0, n_handover = 0, n_swap = 0, n_transp = 0, n_clip = 0, n_attack = 0, n_skip = 0;
  int n_load = 0, n_wait = 0, n_packets = 0, n_clamp = 0, n_elix_cap = 0, n_moved = 0, n_rx_err = 0;
  sval_t troop_seen = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // ---------------- program ----------------
  instr_t prog [$];
  function automatic instr_t I(opcode_e op, int a, int b, int imm, int ind = 0);
    bit sp;
    sp = (op >= OP_SPLI && op <= OP_DST);
    return mk_instr(op, 6'(a), 6'(b), 14'(imm), aidx_t'(ind), sp);
  endfunction
  task automatic sprite(int s, int ty, int x, int y, int f, int hp);
    prog.push_back(I(OP_SPLI, s, 0, ty, 0));
    prog.push_back(I(OP_SPLI, s, 0, x, 1));
    prog.push_back(I(OP_SPLI, s, 0, y, 2));
    prog.push_back(I(OP_SPLI, s, 0, f, 3));
    prog.push_back(I(OP_SPLI, s, 0, hp, 4));
  endtask

  int tw_x [4] = '{24, 330, 24, 288};
  int tw_y [4] = '{100, 100, 560, 700};
  int tw_f [4] = '{0, 0, 1, 1};
  int tw_hp [4] = '{255, 200, 255, 100};
  int tw_id [4] = '{0, 1, 60, 61};
  int TROOP_X0 = 100, TROOP_Y = 100, TROOP_F = 2;
  int L_LOOP, L_SKIP, L_PARK;

  task automatic build_program();
    prog.push_back(I(OP_LI, 1, 0, STEP));
    prog.push_back(I(OP_LI, 3, 0, NITER));
    prog.push_back(I(OP_LI, 4, 0, RANGE));
    prog.push_back(I(OP_LI, 31, 0, 3));
    prog.push_back(I(OP_LI, 8, 0, 1));
    for (int t = 0; t < 4; t++) sprite(tw_id[t], 1, tw_x[t], tw_y[t], tw_f[t], tw_hp[t]);
    sprite(5, 2, TROOP_X0, TROOP_Y, TROOP_F, 50);
    prog.push_back(I(OP_SPLI, 5, 0, DMG, 5));
    prog.push_back(I(OP_SPLI, 62, 0, 3, 0));
    prog.push_back(I(OP_SPLI, 62, 0, 3, 3));
    prog.push_back(I(OP_SPLI, 63, 0, 3, 0));
    prog.push_back(I(OP_SPLI, 63, 0, 4, 3));
    L_LOOP = prog.size();
    L_SKIP = L_LOOP + 4;
    prog.push_back(I(OP_SPADD, 5, 1, 0, 1));                 // troop.x += r1
    prog.push_back(I(OP_DST, 6, 5, 1 << 8));                 // r6 = dist(sprite 5, sprite 1)
    prog.push_back(I(OP_BGE, 6, 4, L_SKIP));                 // far away: no attack
    prog.push_back(I(OP_ATTACK, 1, 5, 5, 4));                // sprite1.hp -= sprite5.damage
    prog.push_back(I(OP_SW, 2, 0, 100));                     // L_SKIP
    prog.push_back(I(OP_LW, 7, 0, 100));
    prog.push_back(I(OP_ADD, 2, 7, 8 << 8));                 // r2 = r7 + r8 (r8 = 1)
    prog.push_back(I(OP_ADDI, 30, 30, 1));                   // elixir
    prog.push_back(I(OP_WAIT, 0, LOOP_WAIT >> 14, LOOP_WAIT & 16383));   // spreads the loop over several frames
    prog.push_back(I(OP_BLT, 2, 3, L_LOOP));
    L_PARK = prog.size();
    prog.push_back(I(OP_WAIT, 0, 0, 50));
    prog.push_back(I(OP_JMP, 0, 0, L_PARK));
  endtask

  // ---------------- event counters ----------------
  always @(posedge clk) if (!rst) begin
    if (dut.sprite_valid && !dut.sprite_ready) n_stall++;
    if (dut.sprite_valid && dut.sprite_ready) n_handover++;
    if (dut.new_frame) begin
      // a sprite that moved between frames must be erased from its old place
      n_swap++;
      if (dut.u_cpu.u_sf.spr[5][1] != troop_seen && troop_seen != 0) n_moved++;
      troop_seen = dut.u_cpu.u_sf.spr[5][1];
    end
    if (dut.g_mouse[0].u_mouse.packet_valid) n_packets++;
    if (dut.g_mouse[1].u_mouse.packet_valid) n_packets++;
    if (dut.g_mouse[0].u_mouse.rx_err || dut.g_mouse[1].u_mouse.rx_err) n_rx_err++;
  end
  word_t pc_prev = 0;
  always @(posedge clk) begin
    if (pc != pc_prev) begin
      if (pc == word_t'((L_SKIP - 1) * 4)) n_attack++;
      if (pc == word_t'(L_SKIP * 4) && pc_prev == word_t'((L_SKIP - 2) * 4)) n_skip++;
      if (pc_prev == word_t'((L_SKIP + 1) * 4)) n_load++;
      if (pc_prev == word_t'((L_SKIP + 4) * 4) || pc_prev == word_t'(L_PARK * 4)) n_wait++;
    end
    pc_prev <= pc;
  end

  // ---------------- expected picture ----------------
  logic [3:0] img [H][W];
  logic [23:0] pal [16] = '{
    24'hFFFFFF, 24'hE04040, 24'hF08020, 24'hF0E040, 24'h40A0F0, 24'h8040C0,
    24'hC060A0, 24'h805020, 24'h202020, 24'hFFC0A0, 24'h6060F0, 24'hA0A0A0,
    24'hFF60FF, 24'h20D060, 24'h2060F0, 24'hA0A0D0};

  function automatic logic [3:0] bg(int x, int y);
    bit bridge;
    bridge = (x >= BX0 && x < BX0 + BW) || (x >= BX1 && x < BX1 + BW);
    if (y < BANNER || y >= H - BANNER) return 4'd15;
    if (y >= MY0 && y < MY1 && !bridge) return 4'd14;
    return 4'd13;
  endfunction

  task automatic paint(int x, int y, int f);
    if (x + S > W || y + S > H) n_clip++;
    for (int r = 0; r < S; r++)
      for (int c = 0; c < S; c++) begin
        int v;
        v = ((r / 4) + (c / 4) + f) % 13;
        if (v == 0) begin n_transp++; continue; end
        if (x + c < W && y + r < H) img[y + r][x + c] = 4'(v);
      end
  endtask

  // ---------------- 7-segment decode ----------------
  logic [6:0] font [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                            7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
  function automatic int seg_val(logic [6:0] s);
    for (int i = 0; i < 16; i++) if (font[i] == ~s) return i;
    return -1;
  endfunction

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mx [2], my [2];
    int troop_x, hp1;
    int dxs [2][3] = '{'{40, -15, 100}, '{-30, 120, 127}};
    int dys [2][3] = '{'{20, -40, 60}, '{-100, -127, -127}};
    for (int m = 0; m < 2; m++) begin send[m] = 0; mb0[m] = 0; mb1[m] = 0; mb2[m] = 0; bad[m] = 0; end
    build_program();
    repeat (2) @(negedge clk);
    foreach (prog[k]) begin
      @(negedge clk); prog_we = 1; prog_addr = 10'(k); prog_data = prog[k];
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk); rst = 0;

    // mice: start-up, then three packets each
    wait (dut.g_mouse[0].u_mouse.streaming && dut.g_mouse[1].u_mouse.streaming);
    for (int m = 0; m < 2; m++) begin
      check(cmds[m] == 1 && last_cmd[m] == 8'hF4, "mouse start-up command");
      mx[m] = W / 2; my[m] = H / 2;
    end
    for (int p = 0; p < 3; p++) begin
      for (int m = 0; m < 2; m++) begin
        int dx, dy, nx, ny;
        dx = dxs[m][p]; dy = dys[m][p];
        mb0[m] = {2'b00, dy < 0, dx < 0, 1'b1, 2'b00, 1'(p == 2)};
        mb1[m] = 8'(dx); mb2[m] = 8'(dy);
        nx = mx[m] + dx; ny = my[m] - dy;
        if (nx < 0 || nx > W || ny < 0 || ny > H) n_clamp++;
        mx[m] = nx < 0 ? 0 : (nx > W ? W : nx);
        my[m] = ny < 0 ? 0 : (ny > H ? H : ny);
        send[m] = 1;
      end
      for (int m = 0; m < 2; m++) begin wait (busy[m]); send[m] = 0; end
      for (int m = 0; m < 2; m++) wait (!busy[m]);
    end
    // a packet from mouse 1 whose status byte has a bad parity bit: the whole
    // packet is dropped and the cursor must stay where it is
    mb0[1] = 8'h29; mb1[1] = 8'd40; mb2[1] = 8'd40; bad[1] = 1; send[1] = 1;
    wait (busy[1]); send[1] = 0;
    wait (!busy[1]); bad[1] = 0;
    repeat (100) @(posedge clk);
    for (int m = 0; m < 2; m++) begin
      check(dut.mouse_x[m] == sval_t'(mx[m]) && dut.mouse_y[m] == sval_t'(my[m]), "mouse position");
      check(dut.mouse_click[m] == 1'b1, "mouse button");
    end

    // program must have parked by now
    wait (pc == word_t'(L_PARK * 4) || pc == word_t'((L_PARK + 1) * 4));

    // independent model of the game loop
    troop_x = TROOP_X0; hp1 = tw_hp[1];
    for (int i = 0; i < NITER; i++) begin
      int d;
      troop_x += STEP;
      d = (tw_x[1] > troop_x ? tw_x[1] - troop_x : troop_x - tw_x[1]) + (tw_y[1] > TROOP_Y ? tw_y[1] - TROOP_Y : TROOP_Y - tw_y[1]);
      if (d < RANGE) hp1 -= DMG;
    end

    // expected picture
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = bg(x, y);
    // sprite file order: 0, 1, 5, 60, 61, 62, 63
    paint(tw_x[0], tw_y[0], tw_f[0]);
    paint(tw_x[1], tw_y[1], tw_f[1]);
    paint(troop_x, TROOP_Y, TROOP_F);
    paint(tw_x[2], tw_y[2], tw_f[2]);
    paint(tw_x[3], tw_y[3], tw_f[3]);
    paint(mx[0], my[0], 3);
    paint(mx[1], my[1], 4);
    begin
      int e0;
      e0 = NITER;
      if (e0 > MAXE) n_elix_cap++;
      for (int k = 0; k < (e0 > MAXE ? MAXE : e0); k++) paint(k * ELIX_DX, 0, ELIX_FRAME);
      for (int k = 0; k < 3; k++) paint(k * ELIX_DX, H - S, ELIX_FRAME);
    end

    // let two more frames pass so the picture reaches the screen, then compare one frame
    repeat (2) @(posedge clk iff dut.new_frame);
    // the edge that ends the cycle showing raster position (0,0) at the counters;
    // the output lags the counters by two cycles, so pixel (0,0) is on rgb after one more edge
    @(posedge clk iff (dut.u_gfx.u_timing.hcount == 0 && dut.u_gfx.u_timing.vcount == 0));
    @(posedge clk);
    for (int y = 0; y < VT; y++)
      for (int x = 0; x < HT; x++) begin
        #1;
        if (x < HA && y < VA) begin
          if (x < W && y < H) check(de && rgb == pal[img[y][x]], "canvas pixel");
          else                check(de && rgb == 24'h0, "black outside canvas");
        end else check(!de && rgb == 24'h0, "blanking");
        @(posedge clk);
      end

    // tower hitpoints on the 7-segment display
    begin
      logic [31:0] want, seen_val;
      int seen;
      logic [7:0] lit;
      want = {8'(tw_hp[0]), 8'(hp1), 8'(tw_hp[2]), 8'(tw_hp[3])};
      seen = 0; seen_val = 0;
      repeat (9 * (74_250_000 / 1000)) begin
        @(negedge clk);
        lit = ~an;
        if ($countones(lit) == 1) begin
          int d;
          d = $clog2(int'(lit));
          seen |= 1 << d;
          seen_val[d*4 +: 4] = 4'(seg_val(seg));
        end
      end
      check(seen == 255 && seen_val == want, "tower hitpoints on the display");
      $display("display %h expected %h", seen_val, want);
    end

    $display("rx_errors=%0d handover=%0d stall_cycles=%0d swaps=%0d transparent=%0d clipped=%0d attacks=%0d skips=%0d loads=%0d waits=%0d packets=%0d clamps=%0d elixir_cap=%0d moved=%0d",
             n_rx_err, n_handover, n_stall, n_swap, n_transp, n_clip, n_attack, n_skip, n_load, n_wait, n_packets, n_clamp, n_elix_cap, n_moved);
    check(n_moved > 0, "troop moved between frames (background reset)");
    check(n_stall > 0, "stall happened");
    check(n_handover > 0, "sprite hand-over happened");
    check(n_swap > 2, "frame swaps happened");
    check(n_transp > 0, "transparent pixels happened");
    check(n_clip > 0, "clipping happened");
    check(n_attack > 0, "attack happened");
    check(n_skip > 0, "branch skip happened");
    check(n_rx_err > 0, "mouse receive error happened");
    check(n_load > 0, "load happened");
    check(n_wait > 0, "wait happened");
    check(n_packets == 6, "mouse packets decoded");
    check(n_clamp > 0, "clamp happened");
    check(n_elix_cap > 0, "elixir cap happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
