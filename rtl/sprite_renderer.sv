// sprite_renderer: the part of the game processor that feeds the graphics
// module, running alongside instruction execution on its own sprite-file
// read port.
//
// On each new_frame pulse it walks the sprite file from sprite 0 to 63. For
// every sprite that is alive it loads attributes 1, 2 and 3 (x, y, animation
// frame) into its output registers and raises sprite_valid until the graphics
// module takes them (sprite_valid && sprite_ready on a rising edge). After
// the sprite file it draws each player's elixir, read from registers 30 and
// 31, as a row of elixir sprites.
// The report says only that alive sprites are sent and that the elixir is
// "rendered accordingly". Here a sprite is alive when its type attribute (0)
// is non-zero, and elixir is drawn as min(elixir, MAX_ELIXIR) copies of
// spritesheet frame ELIXIR_FRAME spaced ELIXIR_DX pixels apart, on row
// ELIXIR_Y_TOP for register 30 and ELIXIR_Y_BOT for register 31. These
// placement numbers are this design's choice.
// A new_frame pulse in the middle of a walk restarts it.
// Timing: a dead sprite costs one cycle; an alive one costs one cycle plus
// the time the graphics module keeps sprite_ready low.
module sprite_renderer
  import royale_pkg::*;
#(
  parameter int unsigned MAX_ELIXIR   = 10,
  parameter int unsigned ELIXIR_FRAME = 23,
  parameter int unsigned ELIXIR_X0    = 0,
  parameter int unsigned ELIXIR_DX    = 36,
  parameter int unsigned ELIXIR_Y_TOP = 0,
  parameter int unsigned ELIXIR_Y_BOT = 672
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    new_frame,
  output sidx_t   rd_sprite,
  input  sprite_t rd_data,
  input  word_t   elixir0,
  input  word_t   elixir1,
  output logic    sprite_valid,
  input  logic    sprite_ready,
  output sval_t   sprite_x,
  output sval_t   sprite_y,
  output sval_t   sprite_frame,
  output logic    busy
);
  typedef enum logic [2:0] {R_IDLE, R_SCAN, R_SEND, R_ELIX, R_ESEND} rstate_e;
  rstate_e    st;
  sidx_t      idx;
  logic       player;
  logic [4:0] k;
  word_t      elix, cnt;

  assign rd_sprite = idx;
  assign elix      = player ? elixir1 : elixir0;
  assign cnt       = (elix > MAX_ELIXIR) ? word_t'(MAX_ELIXIR) : elix;
  assign busy      = (st != R_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= R_IDLE; idx <= '0; player <= 1'b0; k <= '0;
      sprite_valid <= 1'b0; sprite_x <= '0; sprite_y <= '0; sprite_frame <= '0;
    end else if (new_frame) begin
      st <= R_SCAN; idx <= '0; player <= 1'b0; k <= '0;
      sprite_valid <= 1'b0;
    end else begin
      unique case (st)
        R_IDLE: ;
        R_SCAN: begin
          if (rd_data[ATTR_TYPE] != '0) begin
            sprite_x     <= rd_data[ATTR_X];
            sprite_y     <= rd_data[ATTR_Y];
            sprite_frame <= rd_data[ATTR_FRAME];
            sprite_valid <= 1'b1;
            st           <= R_SEND;
          end else if (idx == sidx_t'(NSPRITES - 1)) begin
            st <= R_ELIX;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        R_SEND: if (sprite_ready) begin
          sprite_valid <= 1'b0;
          if (idx == sidx_t'(NSPRITES - 1)) st <= R_ELIX;
          else begin
            idx <= idx + 1'b1;
            st  <= R_SCAN;
          end
        end
        R_ELIX: begin
          if (word_t'(k) < cnt) begin
            sprite_x     <= sval_t'(ELIXIR_X0 + k * ELIXIR_DX);
            sprite_y     <= player ? sval_t'(ELIXIR_Y_BOT) : sval_t'(ELIXIR_Y_TOP);
            sprite_frame <= sval_t'(ELIXIR_FRAME);
            sprite_valid <= 1'b1;
            st           <= R_ESEND;
          end else if (!player) begin
            player <= 1'b1;
            k      <= '0;
          end else begin
            st <= R_IDLE;
          end
        end
        R_ESEND: if (sprite_ready) begin
          sprite_valid <= 1'b0;
          k  <= k + 1'b1;
          st <= R_ELIX;
        end
        default: st <= R_IDLE;
      endcase
    end
  end

  // Handshake rule: once raised, sprite_valid and its data hold until taken.
  property p_hold;
    @(posedge clk) disable iff (rst || new_frame)
      (sprite_valid && !sprite_ready) |=> (sprite_valid && $stable(sprite_x) && $stable(sprite_y));
  endproperty
  assert property (p_hold);
endmodule
