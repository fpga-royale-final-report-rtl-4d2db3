// Self-checking testbench for data_mem: random writes and reads against a
// reference array, one-cycle read latency.
module tb_data_mem;
  import royale_pkg::*;
  logic clk = 0;
  logic [9:0] addr;
  logic we;
  word_t wdata, rdata;
  word_t model [1024];
  int checks = 0, failures = 0;

  data_mem dut (.clk, .addr, .we, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) model[i] = 0;
    we = 0; addr = 0; wdata = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      addr = 10'($urandom_range(0, 63));
      we = ($urandom % 2) == 1; wdata = $urandom;
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[addr]) begin failures++; $display("FAIL addr %0d", addr); end
      if (we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
