// Self-checking testbench for sprite_renderer. A sprite file model with a
// random set of alive sprites and random elixir counts (including more than
// the maximum) is walked after new_frame while the consumer stalls
// sprite_ready at random. The sequence of (x, y, frame) handed over must be
// exactly the alive sprites in index order followed by the elixir bars;
// a new_frame in the middle of a walk must restart it.
module tb_sprite_renderer;
  import royale_pkg::*;
  logic clk = 0, rst = 1, new_frame = 0, ready = 0, valid;
  sidx_t rd_sprite;
  sprite_t rd_data;
  word_t e0, e1;
  sval_t sx, sy, sf;
  logic busy;
  sprite_t sprs [64];
  int checks = 0, failures = 0;
  int stalls = 0, restarts = 0;
  logic [38:0] exp_q [$];   // {x, y, frame}
  int got;

  sprite_renderer dut (.clk, .rst, .new_frame, .rd_sprite, .rd_data, .elixir0(e0), .elixir1(e1),
                       .sprite_valid(valid), .sprite_ready(ready), .sprite_x(sx), .sprite_y(sy),
                       .sprite_frame(sf), .busy);
  assign rd_data = sprs[rd_sprite];
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer
  always @(posedge clk) begin
    if (!rst && valid && ready) begin
      if (got < exp_q.size()) begin
        check({sx, sy, sf} == exp_q[got], "sprite order/data");
      end else check(0, "extra sprite");
      got++;
    end
    if (valid && !ready) stalls++;
  end
  always @(negedge clk) ready <= ($urandom % 3 != 0);

  task automatic build();
    exp_q.delete();
    for (int s = 0; s < 64; s++) begin
      for (int k = 0; k < 8; k++) sprs[s][k] = sval_t'($urandom);
      if ($urandom % 3 == 0) sprs[s][0] = 0;
      if (sprs[s][0] != 0) exp_q.push_back({sprs[s][1], sprs[s][2], sprs[s][3]});
    end
    e0 = $urandom_range(0, 14); e1 = $urandom_range(0, 14);
    for (int k = 0; k < (e0 > 10 ? 10 : e0); k++) exp_q.push_back({sval_t'(36 * k), sval_t'(0), sval_t'(23)});
    for (int k = 0; k < (e1 > 10 ? 10 : e1); k++) exp_q.push_back({sval_t'(36 * k), sval_t'(672), sval_t'(23)});
  endtask

  initial begin
    build();
    got = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int f = 0; f < 12; f++) begin
      build();
      @(negedge clk); new_frame = 1; got = 0; @(negedge clk); new_frame = 0;
      if (f % 4 == 3) begin
        // restart in the middle of a walk
        repeat (40) @(negedge clk);
        new_frame = 1; got = 0; @(negedge clk); new_frame = 0;
        restarts++;
      end
      wait (!busy);
      @(negedge clk);
      check(got == exp_q.size(), "all sprites and elixir bars sent");
      check(!valid, "valid low when idle");
    end
    check(stalls > 0, "stall exercised");
    check(restarts > 0, "restart exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
