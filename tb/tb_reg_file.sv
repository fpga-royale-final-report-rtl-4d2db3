// Self-checking testbench for reg_file: random writes against a reference
// array, reads on all three ports, register 0 stays zero, elixir outputs
// follow registers 30 and 31, reset clears.
module tb_reg_file;
  import royale_pkg::*;
  logic clk = 0, rst = 1;
  ridx_t ra1, ra2, ra3, wa;
  word_t rd1, rd2, rd3, wd, e0, e1;
  logic we;
  int checks = 0, failures = 0;
  word_t model [32];

  reg_file dut (.clk, .rst, .ra1, .ra2, .ra3, .rd1, .rd2, .rd3, .we, .wa, .wd,
                .elixir0(e0), .elixir1(e1));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    @(posedge clk); @(posedge clk); rst = 0;
    for (int i = 0; i < 32; i++) begin
      ra1 = ridx_t'(i); #1; check(rd1 == 0, "reset value");
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1; wa = ridx_t'($urandom); wd = $urandom;
      if (wa != 0) model[wa] = wd;
      @(negedge clk);
      we = 0;
      ra1 = ridx_t'($urandom); ra2 = ridx_t'($urandom); ra3 = ridx_t'($urandom);
      #1;
      check(rd1 == model[ra1], "port1");
      check(rd2 == model[ra2], "port2");
      check(rd3 == model[ra3], "port3");
      check(e0 == model[30] && e1 == model[31], "elixir regs");
    end
    ra1 = 0; #1; check(rd1 == 0, "r0 is zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
