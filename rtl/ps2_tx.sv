// ps2_tx: sends one byte from the host to a PS/2 device (used to send the
// mouse its start-up command).
//
// Host-to-device protocol: the host holds the clock line low for
// INHIBIT_CYCLES (at least 100 us), pulls data low (start bit) and releases
// the clock. The device then clocks the frame: after each falling edge the
// host presents the next bit (eight data bits LSB first, odd parity), after
// the tenth it releases data (stop bit), and on the eleventh the device pulls
// data low to acknowledge. Both lines are open-drain: the *_drive_low outputs
// say when the pin is pulled low, otherwise it floats high.
// done pulses for one cycle after the acknowledge; ack_err if the device did
// not pull data low. The report says only that the interface sends
// initialisation signals to the mouse; the waveform is the standard PS/2 one.
module ps2_tx #(
  parameter int unsigned INHIBIT_CYCLES = 7425    // 100 us at 74.25 MHz
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] byte_in,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic       clk_drive_low,
  output logic       data_drive_low,
  output logic       busy,
  output logic       done,
  output logic       ack_err
);
  typedef enum logic [1:0] {T_IDLE, T_INHIBIT, T_SEND, T_ACK} tstate_e;
  tstate_e st;
  logic [2:0] clk_sync;
  logic [1:0] dat_sync;
  logic [8:0] shreg;         // data bits then parity
  logic [3:0] nbit;
  logic [$clog2(INHIBIT_CYCLES+1)-1:0] cnt;
  logic fall;

  assign fall = clk_sync[2] && !clk_sync[1];
  assign busy = (st != T_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= T_IDLE; clk_sync <= '1; dat_sync <= '1;
      shreg <= '0; nbit <= '0; cnt <= '0;
      clk_drive_low <= 1'b0; data_drive_low <= 1'b0;
      done <= 1'b0; ack_err <= 1'b0;
    end else begin
      clk_sync <= {clk_sync[1:0], ps2_clk};
      dat_sync <= {dat_sync[0], ps2_data};
      done     <= 1'b0;
      ack_err  <= 1'b0;
      unique case (st)
        T_IDLE: if (start) begin
          shreg         <= {~^byte_in, byte_in};
          cnt           <= '0;
          nbit          <= '0;
          clk_drive_low <= 1'b1;
          st            <= T_INHIBIT;
        end
        T_INHIBIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == ($bits(cnt))'(INHIBIT_CYCLES - 1)) begin
            data_drive_low <= 1'b1;          // start bit
          end else if (cnt == ($bits(cnt))'(INHIBIT_CYCLES)) begin
            clk_drive_low  <= 1'b0;
            st             <= T_SEND;
          end
        end
        T_SEND: if (fall) begin
          if (nbit == 4'd9) begin
            data_drive_low <= 1'b0;          // stop bit: release
            st             <= T_ACK;
          end else begin
            data_drive_low <= !shreg[0];
            shreg          <= {1'b0, shreg[8:1]};
            nbit           <= nbit + 1'b1;
          end
        end
        T_ACK: if (fall) begin
          done    <= 1'b1;
          ack_err <= dat_sync[1];
          st      <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
