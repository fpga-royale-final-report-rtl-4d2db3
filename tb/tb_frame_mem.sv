// Self-checking testbench for frame_mem: read-first behaviour (a write cycle
// returns the old contents) and random traffic against a reference model.
module tb_frame_mem;
  localparam int D = 4096;
  logic clk = 0;
  logic [11:0] addr;
  logic we;
  logic [3:0] din, dout;
  logic [3:0] model [D];
  int checks = 0, failures = 0;

  frame_mem #(.DEPTH(D)) dut (.clk, .addr, .we, .din, .dout);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; din = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); addr = 12'(i); we = 1; din = 4'(i * 7); model[i] = 4'(i * 7);
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      addr = 12'($urandom); we = 1'($urandom); din = 4'($urandom);
      @(posedge clk); #1;
      checks++;
      if (dout !== model[addr]) begin failures++; $display("FAIL addr %0d", addr); end
      if (we) model[addr] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
