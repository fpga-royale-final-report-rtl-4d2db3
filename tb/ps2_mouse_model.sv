// ps2_mouse_model: behavioural model of a PS/2 mouse for simulation only
// (not synthesizable: it uses delays).
//
// The two lines are open-drain: line_clk / line_data are low when either the
// host (host_*_low) or the device pulls them low. When the host inhibits the
// clock and then requests to send, the model clocks in the host's byte,
// acknowledges it, counts it in `cmds`, keeps it in `last_cmd` and answers
// with 0xFA. When `send` is raised it transmits the three bytes b0, b1, b2
// as a movement packet (busy while sending); with bad_parity set the first
// byte goes out with a wrong parity bit. HALF_NS is half a PS/2 clock period.
module ps2_mouse_model #(
  parameter int HALF_NS = 200
) (
  input  logic       host_clk_low,
  input  logic       host_data_low,
  output logic       line_clk,
  output logic       line_data,
  input  logic       send,
  input  logic       bad_parity,
  input  logic [7:0] b0,
  input  logic [7:0] b1,
  input  logic [7:0] b2,
  output logic       busy,
  output logic [7:0] last_cmd,
  output int         cmds
);
  logic dev_clk = 1'b1, dev_data = 1'b1;
  assign line_clk  = dev_clk && !host_clk_low;
  assign line_data = dev_data && !host_data_low;

  task automatic send_byte(input logic [7:0] b, input bit corrupt);
    logic [10:0] fr;
    fr = {1'b1, (~^b) ^ corrupt, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      dev_data = fr[i];
      #(HALF_NS / 2);
      dev_clk = 1'b0;
      #(HALF_NS);
      dev_clk = 1'b1;
      #(HALF_NS / 2);
    end
    dev_data = 1'b1;
    #(2 * HALF_NS);
  endtask

  task automatic receive_byte();
    logic [9:0] bits;
    wait (!host_clk_low);
    #(HALF_NS);
    for (int i = 0; i < 10; i++) begin
      dev_clk = 1'b0;
      #(HALF_NS);
      dev_clk = 1'b1;
      bits[i] = line_data;
      #(HALF_NS);
    end
    dev_data = 1'b0;                     // acknowledge
    #(HALF_NS / 2);
    dev_clk = 1'b0;
    #(HALF_NS);
    dev_clk = 1'b1;
    #(HALF_NS / 2);
    dev_data = 1'b1;
    last_cmd = bits[7:0];
    cmds++;
    #(4 * HALF_NS);
    send_byte(8'hFA, 1'b0);
  endtask

  initial begin
    busy = 1'b0;
    cmds = 0;
    last_cmd = '0;
    forever begin
      #10;
      if (host_clk_low) begin
        wait (host_data_low);
        receive_byte();
      end else if (send && !busy) begin
        busy = 1'b1;
        send_byte(b0, bad_parity);
        send_byte(b1, 1'b0);
        send_byte(b2, 1'b0);
        busy = 1'b0;
        wait (!send);
      end
    end
  end
endmodule
