// tb_vito_regfile_example -- checks the register-file example: in the
// first state only r[addr1] takes data1, in the second only r[addr2]
// takes data2, and every entry is read back and compared with a shadow
// copy after each clock.
module tb_vito_regfile_example;
  timeunit 1ns; timeprecision 10ps;
  logic        clk = 0, rst_n = 0;
  logic [3:0]  addr1, addr2, raddr;
  logic [31:0] data1, data2, rdata;
  logic        s4, s6;
  logic [31:0] shadow [16];
  int checks = 0, failures = 0;

  vito_regfile_example dut (.*);

  always #5 clk = ~clk;

  initial begin
    bit in_s4;
    addr1 = 0; addr2 = 0; raddr = 0; data1 = 0; data2 = 0;
    foreach (shadow[i]) shadow[i] = 0;
    @(posedge clk);
    #1 rst_n = 1;
    in_s4 = 1;
    for (int n = 0; n < 300; n++) begin
      addr1 = 4'($urandom); addr2 = 4'($urandom);
      data1 = $urandom;     data2 = $urandom;
      checks++;
      if (s4 != in_s4 || s6 == in_s4) failures++;
      @(posedge clk);
      if (in_s4) shadow[addr1] = data1;
      else       shadow[addr2] = data2;
      in_s4 = !in_s4;
      #1;
      for (int i = 0; i < 16; i++) begin
        raddr = 4'(i);
        #0.01;
        checks++;
        if (rdata !== shadow[i]) begin
          failures++;
          if (failures < 10) $display("FAIL r[%0d]=%h want %h", i, rdata, shadow[i]);
        end
      end
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
