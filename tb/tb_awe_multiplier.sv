// tb_awe_multiplier -- self-checking test of the sequential multiplier.
// Random operands with 32 steps (MUL) must give the low 32 bits of the
// product; with 14 steps (the LNS slope times z_L) the product of the
// multiplicand and the low 14 multiplier bits. The step count is checked:
// `last` must rise exactly `steps` cycles after load_a.
module tb_awe_multiplier;
  timeunit 1ns; timeprecision 10ps;
  logic        clk = 0, rst_n = 0;
  logic        load_a, load_b, busy, last;
  logic [31:0] a_in, b_in, product;
  logic [5:0]  steps;
  int checks = 0, failures = 0;

  awe_multiplier dut (.*);

  always #5 clk = ~clk;

  task automatic run(input logic [31:0] a, input logic [31:0] b, input int n);
    int cyc;
    logic [63:0] full;
    logic [31:0] bm;
    @(negedge clk);
    load_b = 1; b_in = b;
    @(negedge clk);
    load_b = 0; load_a = 1; a_in = a; steps = 6'(n);
    @(negedge clk);
    load_a = 0;
    cyc = 1;
    while (!last && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != n) begin
      failures++;
      $display("FAIL steps=%0d: last after %0d cycles", n, cyc);
    end
    @(negedge clk);
    bm   = (n >= 32) ? b : (b & ((32'd1 << n) - 1));
    full = 64'(a) * 64'(bm);
    checks++;
    if (product !== full[31:0] || busy) begin
      failures++;
      $display("FAIL %h*%h (%0d steps) got %h want %h", a, b, n, product, full[31:0]);
    end
  endtask

  initial begin
    load_a = 0; load_b = 0; a_in = 0; b_in = 0; steps = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(32'd3, 32'd5, 32);
    run(32'hFFFF_FFFF, 32'hFFFF_FFFF, 32);
    for (int i = 0; i < 150; i++) run($urandom, $urandom, 32);
    for (int i = 0; i < 150; i++) run($urandom_range(0, 20000), $urandom, 14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
