// Self-checking testbench for sprite_rom: every address of the default
// 24-frame 48x48 sheet is read and compared with the pattern formula
// ((row/4) + (col/4) + frame) mod 13, one cycle after the address.
module tb_sprite_rom;
  logic clk = 0;
  logic [15:0] addr;
  logic [3:0] data;
  int checks = 0, failures = 0;

  sprite_rom dut (.clk, .addr, .data);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0;
    for (int f = 0; f < 24; f++)
      for (int r = 0; r < 48; r++)
        for (int c = 0; c < 48; c++) begin
          @(negedge clk); addr = 16'(f * 2304 + r * 48 + c);
          @(posedge clk); #1;
          checks++;
          if (data !== 4'(((r / 4) + (c / 4) + f) % 13)) begin
            failures++;
            if (failures < 10) $display("FAIL f%0d r%0d c%0d got %0d", f, r, c, data);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
