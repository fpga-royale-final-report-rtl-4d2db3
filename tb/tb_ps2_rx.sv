// Self-checking testbench for ps2_rx: random bytes sent as PS/2 frames must
// come out with valid; frames with a wrong parity bit must raise err; a
// frame cut short must be discarded by the timeout without corrupting the
// next one.
module tb_ps2_rx;
  localparam int HALF = 200;
  logic clk = 0, rst = 1;
  logic pclk = 1, pdat = 1;
  logic [7:0] data;
  logic valid, err;
  int checks = 0, failures = 0;
  int nvalid = 0, nerr = 0;
  logic [7:0] got;

  ps2_rx #(.TIMEOUT_CYCLES(200)) dut (.clk, .rst, .inhibit(1'b0), .ps2_clk(pclk), .ps2_data(pdat), .data, .valid, .err);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (valid) begin nvalid++; got = data; end
    if (err) nerr++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic frame(input logic [7:0] b, input bit corrupt, input int nbits);
    logic [10:0] fr;
    fr = {1'b1, (~^b) ^ corrupt, b, 1'b0};
    for (int i = 0; i < nbits; i++) begin
      pdat = fr[i]; #(HALF / 2); pclk = 0; #(HALF); pclk = 1; #(HALF / 2);
    end
    pdat = 1; #(2 * HALF);
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20 rst = 0;
    #200;
    for (int n = 0; n < 60; n++) begin
      logic [7:0] b;
      int v0, e0;
      bit bad;
      b = 8'($urandom); bad = (n % 5 == 3);
      v0 = nvalid; e0 = nerr;
      if (n % 11 == 7) begin
        frame(8'h55, 0, 6);          // truncated frame
        #(3000);                     // longer than the timeout
      end
      frame(b, bad, 11);
      #100;
      if (bad) check(nerr == e0 + 1 && nvalid == v0, "parity error flagged");
      else     check(nvalid == v0 + 1 && got == b && nerr == e0, "byte received");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
