// tb_awe_regfile -- self-checking test of the 16x32 register file:
// reset to zero, random writes, and both read ports compared every cycle
// with a shadow copy kept by the testbench.
module tb_awe_regfile;
  timeunit 1ns; timeprecision 10ps;
  logic        clk = 0, rst_n = 0;
  logic [3:0]  ra_addr, rb_addr, wa_addr;
  logic [31:0] ra_data, rb_data, wa_data;
  logic        we;
  logic [31:0] shadow [16];
  int checks = 0, failures = 0;

  awe_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    we = 0; ra_addr = 0; rb_addr = 0; wa_addr = 0; wa_data = 0;
    foreach (shadow[i]) shadow[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ra_addr = 4'($urandom);
      rb_addr = 4'($urandom);
      #1;
      checks += 2;
      if (ra_data !== shadow[ra_addr]) failures++;
      if (rb_data !== shadow[rb_addr]) failures++;
      we      = $urandom_range(0, 2) != 0;
      wa_addr = 4'($urandom);
      wa_data = $urandom;
      @(posedge clk);
      if (we) shadow[wa_addr] = wa_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
