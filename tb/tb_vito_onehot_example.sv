// tb_vito_onehot_example -- checks the two-state one-hot example: reset
// state (s4 hot, a cleared), exactly one state bit hot in every cycle,
// and register a loading data1 and data2 on alternate clocks.
module tb_vito_onehot_example;
  timeunit 1ns; timeprecision 10ps;
  logic        clk = 0, rst_n = 0;
  logic [31:0] data1, data2, a;
  logic        s4, s6;
  int checks = 0, failures = 0;

  vito_onehot_example dut (.*);

  always #5 clk = ~clk;

  initial begin
    logic [31:0] expect_a;
    bit          in_s4;
    data1 = 0; data2 = 0;
    #12;
    checks++;
    if (!(s4 && !s6 && a == 0)) failures++;
    @(posedge clk);
    #1 rst_n = 1;
    in_s4 = 1;
    for (int n = 0; n < 200; n++) begin
      data1 = $urandom; data2 = $urandom;
      expect_a = in_s4 ? data1 : data2;
      checks++;
      if (s4 != in_s4 || s6 == in_s4) failures++;
      @(posedge clk); #1;
      checks++;
      if (a !== expect_a) begin
        failures++;
        $display("FAIL cycle %0d a=%h want %h", n, a, expect_a);
      end
      in_s4 = !in_s4;
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
