// video_timing: raster counters for the 1280x720 @ 60 Hz output.
//
// hcount runs 0..H_TOTAL-1 and vcount 0..V_TOTAL-1, one pixel per clock, so
// one frame is 1650 x 750 cycles at 74.25 MHz, as in the report. The porch
// and sync widths are the standard CEA-861 720p numbers (the report gives only
// the totals): sync pulses are active high. new_frame pulses for one cycle on
// the first pixel of vertical blanking (hcount 0, vcount V_ACTIVE): that is
// where the graphics module swaps its two frame memories and where the
// processor starts sending the sprites of the next frame.
module video_timing #(
  parameter int unsigned H_ACTIVE = 1280,
  parameter int unsigned H_FP     = 110,
  parameter int unsigned H_SYNC   = 40,
  parameter int unsigned H_TOTAL  = 1650,
  parameter int unsigned V_ACTIVE = 720,
  parameter int unsigned V_FP     = 5,
  parameter int unsigned V_SYNC   = 5,
  parameter int unsigned V_TOTAL  = 750
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        active,
  output logic        new_frame
);
  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == 11'(H_TOTAL - 1)) begin
      hcount <= '0;
      vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  assign active    = (hcount < 11'(H_ACTIVE)) && (vcount < 10'(V_ACTIVE));
  assign hsync     = (hcount >= 11'(H_ACTIVE + H_FP)) && (hcount < 11'(H_ACTIVE + H_FP + H_SYNC));
  assign vsync     = (vcount >= 10'(V_ACTIVE + V_FP)) && (vcount < 10'(V_ACTIVE + V_FP + V_SYNC));
  assign new_frame = !rst && (hcount == '0) && (vcount == 10'(V_ACTIVE));
endmodule
