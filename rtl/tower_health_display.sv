// tower_health_display: shows the hitpoints of the four towers on the board's
// eight-digit 7-segment display.
//
// Each tower's hitpoints (255 at the start) fill two hex digits. From left to
// right: tower sprite 0, tower sprite 1 (the top player, left four digits),
// then the bottom player's two towers (right four digits), as in the report.
// Only the low 8 bits of the 13-bit attribute are shown.
// The digits are multiplexed: one digit is lit at a time for DIGIT_CYCLES
// clocks (about 1 ms at 74.25 MHz), digit 0 being the rightmost. an and seg
// are active low, as on common-anode boards; seg is {g,f,e,d,c,b,a}. The
// board wiring is not in the report and is this design's choice.
module tower_health_display #(
  parameter int unsigned DIGIT_CYCLES = 74_250
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [12:0] tower_hp [4],
  output logic [7:0]  an,
  output logic [6:0]  seg
);
  logic [$clog2(DIGIT_CYCLES)-1:0] cnt;
  logic [2:0]  digit;
  logic [31:0] hex;
  logic [3:0]  nib;

  assign hex = {tower_hp[0][7:0], tower_hp[1][7:0], tower_hp[2][7:0], tower_hp[3][7:0]};
  assign nib = hex[digit*4 +: 4];

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; digit <= '0;
    end else if (cnt == ($bits(cnt))'(DIGIT_CYCLES - 1)) begin
      cnt   <= '0;
      digit <= digit + 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  always_comb begin
    an = ~(8'b1 << digit);
    unique case (nib)
      4'h0: seg = ~7'b0111111;
      4'h1: seg = ~7'b0000110;
      4'h2: seg = ~7'b1011011;
      4'h3: seg = ~7'b1001111;
      4'h4: seg = ~7'b1100110;
      4'h5: seg = ~7'b1101101;
      4'h6: seg = ~7'b1111101;
      4'h7: seg = ~7'b0000111;
      4'h8: seg = ~7'b1111111;
      4'h9: seg = ~7'b1101111;
      4'hA: seg = ~7'b1110111;
      4'hB: seg = ~7'b1111100;
      4'hC: seg = ~7'b0111001;
      4'hD: seg = ~7'b1011110;
      4'hE: seg = ~7'b1111001;
      default: seg = ~7'b1110001;
    endcase
  end
endmodule
