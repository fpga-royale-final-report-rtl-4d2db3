// Self-checking testbench for sprite_file: random attribute writes against a
// reference model, record reads on all three ports, 13-bit width, mouse
// values forced into sprites 62/63 (attributes 1, 2, 6) with priority over
// processor writes, and the tower hitpoint outputs (sprites 0, 1, 60, 61).
module tb_sprite_file;
  import royale_pkg::*;
  logic clk = 0, rst = 1;
  sidx_t rsa, rsb, rsr, ws;
  sprite_t rda, rdb, rdr;
  logic we;
  aidx_t wi;
  sval_t wd;
  sval_t mx [2], my [2];
  logic mc [2];
  sval_t hp [4];
  sval_t model [64][8];
  int checks = 0, failures = 0;

  sprite_file dut (.clk, .rst, .rsa, .rsb, .rda, .rdb, .rsr, .rdr, .we, .ws, .wi, .wd,
                   .mouse_x(mx), .mouse_y(my), .mouse_click(mc), .tower_hp(hp));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ws = 0; wi = 0; wd = 0; rsa = 0; rsb = 0; rsr = 0;
    mx[0] = 100; my[0] = 200; mc[0] = 1; mx[1] = 7; my[1] = 9; mc[1] = 0;
    for (int s = 0; s < 64; s++) for (int i = 0; i < 8; i++) model[s][i] = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      we = 1; ws = sidx_t'($urandom); wi = aidx_t'($urandom); wd = sval_t'($urandom);
      if (n % 7 == 0) begin mx[n % 2] = sval_t'($urandom); my[n % 2] = sval_t'($urandom); mc[n % 2] = 1'($urandom); end
      model[ws][wi] = wd;
      @(negedge clk);
      we = 0;
      for (int m = 0; m < 2; m++) begin
        model[62 + m][1] = mx[m]; model[62 + m][2] = my[m]; model[62 + m][6] = sval_t'(mc[m]);
      end
      rsa = sidx_t'($urandom); rsb = (n % 4 == 0) ? 6'd62 + 6'(n % 8 == 0) : sidx_t'($urandom); rsr = sidx_t'($urandom);
      #1;
      for (int i = 0; i < 8; i++) begin
        check(rda[i] == model[rsa][i], "port a");
        check(rdb[i] == model[rsb][i], "port b");
        check(rdr[i] == model[rsr][i], "port r");
      end
      check(hp[0] == model[0][4] && hp[1] == model[1][4] && hp[2] == model[60][4] && hp[3] == model[61][4],
            "tower hp");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
