// mouse_interface: one PS/2 mouse, turned into a clamped cursor position and
// a button state for the game processor.
//
// After reset it sends the mouse the "enable data reporting" command (0xF4)
// through ps2_tx and ignores received bytes until the mouse's acknowledge
// (0xFA). From then on every three received bytes form a movement packet:
// status byte (bit 0 left button, bit 1 right button, bit 3 always 1,
// bits 4/5 X/Y sign, bits 6/7 X/Y overflow), then the low 8 bits of the X
// and Y movement. A byte that should start a packet but has bit 3 clear is
// dropped, which resynchronises the packet boundary. A byte received with a
// framing or parity error throws away the whole packet it belongs to (the
// bytes of that packet still to come are skipped).
// Position update per packet: x += dx and y -= dy (mouse Y counts upwards,
// screen y downwards), each clamped to 0..CANVAS_WIDTH and 0..CANVAS_HEIGHT
// as in the report. Movement on an axis with its overflow bit set is ignored.
// The cursor starts in the middle of the canvas and `clicked` follows the
// left button.
// The start-up sequence, the overflow rule and the start position are this
// design's choices; the report says only that initialisation is sent, that
// packets are decoded by a state machine and that the position is clamped.
// Timing: mouse_x/mouse_y/clicked change the cycle after packet_valid.
module mouse_interface #(
  parameter int unsigned CLK_HZ        = 74_250_000,
  parameter int unsigned CANVAS_WIDTH  = 360,
  parameter int unsigned CANVAS_HEIGHT = 720,
  parameter logic [7:0]  INIT_CMD      = 8'hF4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ps2_clk,
  input  logic        ps2_data,
  output logic        ps2_clk_drive_low,
  output logic        ps2_data_drive_low,
  output logic [12:0] mouse_x,
  output logic [12:0] mouse_y,
  output logic        clicked,
  output logic        streaming,
  output logic        packet_valid
);
  localparam int unsigned INHIBIT = (CLK_HZ / 10_000 > 4) ? CLK_HZ / 10_000 : 4;  // 100 us
  localparam int unsigned TIMEOUT = (CLK_HZ / 1_000 > 8) ? CLK_HZ / 1_000 : 8;    // 1 ms

  logic [7:0] rx_data;
  logic       rx_valid, rx_err;
  logic       tx_start, tx_busy, tx_done, tx_ack_err;
  logic       sent;

  ps2_rx #(.TIMEOUT_CYCLES(TIMEOUT)) u_rx (
    .clk, .rst, .inhibit(tx_busy), .ps2_clk, .ps2_data, .data(rx_data), .valid(rx_valid), .err(rx_err)
  );

  ps2_tx #(.INHIBIT_CYCLES(INHIBIT)) u_tx (
    .clk, .rst, .start(tx_start), .byte_in(INIT_CMD), .ps2_clk, .ps2_data,
    .clk_drive_low(ps2_clk_drive_low), .data_drive_low(ps2_data_drive_low),
    .busy(tx_busy), .done(tx_done), .ack_err(tx_ack_err)
  );

  assign tx_start = !sent && !tx_busy;

  logic [1:0] nbyte, skip;
  logic [7:0] status, xbyte;

  function automatic logic [12:0] clamp(int v, int unsigned hi);
    if (v < 0) return '0;
    if (v > int'(hi)) return 13'(hi);
    return 13'(v);
  endfunction

  always_ff @(posedge clk) begin
    packet_valid <= 1'b0;
    if (rst) begin
      sent <= 1'b0; streaming <= 1'b0; nbyte <= '0; skip <= '0;
      status <= '0; xbyte <= '0;
      mouse_x <= 13'(CANVAS_WIDTH / 2);
      mouse_y <= 13'(CANVAS_HEIGHT / 2);
      clicked <= 1'b0;
    end else begin
      if (tx_start) sent <= 1'b1;
      if (tx_done && tx_ack_err) sent <= 1'b0;        // no acknowledge: try again
      if (rx_err) begin
        if (streaming) skip <= 2'd2 - nbyte;
        nbyte <= '0;
      end else if (rx_valid) begin
        if (!streaming) begin
          if (rx_data == 8'hFA) streaming <= 1'b1;
        end else if (skip != '0) begin
          skip <= skip - 1'b1;
        end else begin
          unique case (nbyte)
            2'd0: if (rx_data[3]) begin status <= rx_data; nbyte <= 2'd1; end
            2'd1: begin xbyte <= rx_data; nbyte <= 2'd2; end
            default: begin
              int dx, dy;
              dx = status[6] ? 0 : int'($signed({status[4], xbyte}));
              dy = status[7] ? 0 : int'($signed({status[5], rx_data}));
              mouse_x      <= clamp(int'(mouse_x) + dx, CANVAS_WIDTH);
              mouse_y      <= clamp(int'(mouse_y) - dy, CANVAS_HEIGHT);
              clicked      <= status[0];
              packet_valid <= 1'b1;
              nbyte        <= 2'd0;
            end
          endcase
        end
      end
    end
  end
endmodule
