// ps2_rx: receives the 11-bit frames a PS/2 device sends to the host.
//
// A frame is a start bit (0), eight data bits LSB first, an odd parity bit
// and a stop bit (1); the device changes the data line while its clock is
// high and the host samples it on the clock's falling edge. Both lines are
// first brought into the clk domain through two flip-flops. A frame with a
// bad start, stop or parity bit raises err instead of valid. If no falling
// edge arrives for TIMEOUT_CYCLES the bit counter restarts, so one lost edge
// cannot shift every following frame.
// While `inhibit` is high (the host is sending on the same lines) the
// receiver ignores the clock and restarts at the next frame.
// Outputs: data with a one-cycle valid pulse, three cycles after the falling
// edge of the stop bit at the pins.
// The report takes this logic from a board vendor's example; this is a
// separate implementation of the same protocol (frame layout as in the
// report's packet figure).
module ps2_rx #(
  parameter int unsigned TIMEOUT_CYCLES = 74_250   // 1 ms at 74.25 MHz
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       inhibit,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic [7:0] data,
  output logic       valid,
  output logic       err
);
  logic [2:0]  clk_sync;
  logic [1:0]  dat_sync;
  logic [10:0] sr;
  logic [3:0]  nbits;
  logic [$clog2(TIMEOUT_CYCLES+1)-1:0] idle;
  logic        fall;

  assign fall = clk_sync[2] && !clk_sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_sync <= '1; dat_sync <= '1;
      sr <= '0; nbits <= '0; idle <= '0;
      data <= '0; valid <= 1'b0; err <= 1'b0;
    end else begin
      clk_sync <= {clk_sync[1:0], ps2_clk};
      dat_sync <= {dat_sync[0], ps2_data};
      valid    <= 1'b0;
      err      <= 1'b0;
      if (inhibit) begin
        nbits <= '0;
        idle  <= '0;
      end else if (fall) begin
        idle <= '0;
        sr   <= {dat_sync[1], sr[10:1]};
        if (nbits == 4'd10) begin
          nbits <= '0;
          // sr[1] is the start bit once the stop bit has shifted in
          if (!sr[1] && dat_sync[1] && ^sr[10:2]) begin
            data  <= sr[9:2];
            valid <= 1'b1;
          end else begin
            err <= 1'b1;
          end
        end else begin
          nbits <= nbits + 1'b1;
        end
      end else if (nbits != '0) begin
        if (idle == ($bits(idle))'(TIMEOUT_CYCLES)) begin
          nbits <= '0;
          idle  <= '0;
        end else begin
          idle <= idle + 1'b1;
        end
      end
    end
  end
endmodule
