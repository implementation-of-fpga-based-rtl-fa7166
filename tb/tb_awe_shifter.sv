// tb_awe_shifter -- self-checking test of the second-operand shifter.
// Drives random operands through every immediate rotation and every
// constant shift (including the #0 encodings of LSR/ASR #32 and RRX) and
// compares result and carry with a reference computed bit by bit.
module tb_awe_shifter;
  timeunit 1ns; timeprecision 10ps;
  import awe_pkg::*;

  logic        imm, carry_in, carry_out;
  logic [11:0] operand2;
  logic [31:0] rm_value, result;
  int checks = 0, failures = 0;

  awe_shifter dut (.*);

  // Reference: builds the result one bit at a time.
  task automatic ref_shift(output logic [31:0] r, output logic c);
    int amt, typ;
    logic [31:0] v;
    c = carry_in;
    if (imm) begin
      amt = 2 * int'(operand2[11:8]);
      v = {24'd0, operand2[7:0]};
      for (int i = 0; i < 32; i++) r[i] = v[(i + amt) % 32];
      if (amt != 0) c = r[31];
      return;
    end
    amt = int'(operand2[11:7]);
    typ = int'(operand2[6:5]);
    v = rm_value;
    case (typ)
      0: begin
        for (int i = 0; i < 32; i++) r[i] = (i - amt >= 0) ? v[i - amt] : 1'b0;
        if (amt != 0) c = v[32 - amt];
      end
      1: begin
        if (amt == 0) amt = 32;
        for (int i = 0; i < 32; i++) r[i] = (i + amt < 32) ? v[i + amt] : 1'b0;
        c = v[amt - 1];
      end
      2: begin
        if (amt == 0) amt = 32;
        for (int i = 0; i < 32; i++) r[i] = (i + amt < 32) ? v[i + amt] : v[31];
        c = v[amt - 1];
      end
      default: begin
        if (amt == 0) begin
          for (int i = 0; i < 31; i++) r[i] = v[i + 1];
          r[31] = carry_in;
          c = v[0];
        end else begin
          for (int i = 0; i < 32; i++) r[i] = v[(i + amt) % 32];
          c = v[amt - 1];
        end
      end
    endcase
  endtask

  initial begin
    logic [31:0] er;
    logic        ec;
    for (int n = 0; n < 4000; n++) begin
      imm      = n[0];
      operand2 = 12'($urandom);
      if (n < 64) operand2[11:4] = 8'(n);       // sweep amounts and types
      rm_value = (n % 7 == 0) ? 32'h8000_0001 : $urandom;
      carry_in = $urandom_range(0, 1) == 1;
      #1;
      ref_shift(er, ec);
      checks++;
      if (result !== er || carry_out !== ec) begin
        failures++;
        if (failures < 10)
          $display("FAIL imm=%0b op2=%h rm=%h cin=%0b: got %h/%0b want %h/%0b",
                   imm, operand2, rm_value, carry_in, result, carry_out, er, ec);
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
