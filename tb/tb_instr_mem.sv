// Self-checking testbench for instr_mem: load words through the write port,
// read them back with one cycle of latency; unwritten words read as NOP (0).
module tb_instr_mem;
  import royale_pkg::*;
  logic clk = 0;
  logic [9:0] raddr, waddr;
  logic we;
  instr_t rdata, wdata;
  instr_t model [1024];
  int checks = 0, failures = 0;

  instr_mem dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) model[i] = '0;
    we = 0; raddr = 0; waddr = 0; wdata = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = 1; waddr = 10'($urandom_range(0, 511)); wdata = {4'($urandom), 32'($urandom)};
      model[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 1024; n++) begin
      @(negedge clk); raddr = 10'(n);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[n]) begin failures++; $display("FAIL addr %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
