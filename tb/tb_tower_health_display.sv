// Self-checking testbench for tower_health_display: for random hitpoints,
// decodes the lit segments of each multiplexed digit back to a hex value
// and compares with the expected digit order (sprite 0 leftmost).
module tb_tower_health_display;
  localparam int DC = 8;
  logic clk = 0, rst = 1;
  logic [12:0] hp [4];
  logic [7:0] an;
  logic [6:0] seg;
  int checks = 0, failures = 0;
  logic [6:0] font [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                            7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  tower_health_display #(.DIGIT_CYCLES(DC)) dut (.clk, .rst, .tower_hp(hp), .an, .seg);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] want;
    int seen;
    logic [7:0] lit;
    for (int i = 0; i < 4; i++) hp[i] = 255;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 20; n++) begin
      if (n > 0) for (int i = 0; i < 4; i++) hp[i] = 13'($urandom_range(0, 255));
      want = {hp[0][7:0], hp[1][7:0], hp[2][7:0], hp[3][7:0]};
      seen = 0;
      repeat (8 * DC) begin
        @(negedge clk);
        checks++;
        lit = ~an;
        if ($countones(lit) != 1) begin failures++; $display("FAIL one digit lit"); end
        else begin
          int d;
          d = $clog2(int'(lit));
          seen |= 1 << d;
          checks++;
          if (~seg !== font[want[d*4 +: 4]]) begin
            failures++; $display("FAIL digit %0d seg %b", d, seg);
          end
        end
      end
      checks++;
      if (seen != 255) begin failures++; $display("FAIL not all digits scanned"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
