// Self-checking testbench for palette_rom: the white transparent entry, the
// three background colours and the remaining entries, one cycle of latency.
module tb_palette_rom;
  logic clk = 0;
  logic [3:0] index;
  logic [23:0] rgb;
  logic [23:0] expect_c [16] = '{
    24'hFFFFFF, 24'hE04040, 24'hF08020, 24'hF0E040, 24'h40A0F0, 24'h8040C0,
    24'hC060A0, 24'h805020, 24'h202020, 24'hFFC0A0, 24'h6060F0, 24'hA0A0A0,
    24'hFF60FF, 24'h20D060, 24'h2060F0, 24'hA0A0D0};
  int checks = 0, failures = 0;

  palette_rom dut (.clk, .index, .rgb);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    index = 0;
    for (int n = 0; n < 64; n++) begin
      @(negedge clk); index = 4'(n * 5);
      @(posedge clk); #1;
      checks++;
      if (rgb !== expect_c[index]) begin failures++; $display("FAIL idx %0d", index); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
