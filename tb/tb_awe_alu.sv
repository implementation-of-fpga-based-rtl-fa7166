// tb_awe_alu -- self-checking test of the data-processing ALU.
// Every opcode is applied to random and corner-case operands; result and
// N, Z, C, V are compared with a reference using wide integer arithmetic.
module tb_awe_alu;
  timeunit 1ns; timeprecision 10ps;
  import awe_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, result;
  flags_t      flags_in, flags_out;
  logic        shift_carry;
  int checks = 0, failures = 0;

  awe_alu dut (.*);

  task automatic reference(output logic [31:0] r, output flags_t f);
    longint ua, ub, uc, s, sa, sb, ss;
    bit arith;
    ua = longint'(a); ub = longint'(b); uc = longint'(flags_in.c);
    sa = longint'($signed(a)); sb = longint'($signed(b));
    arith = 1;
    case (op)
      OP_ADD, OP_CMN: begin s = ua + ub;            ss = sa + sb;            end
      OP_ADC:         begin s = ua + ub + uc;       ss = sa + sb + uc;       end
      OP_SUB, OP_CMP: begin s = ua + (longint'(32'hFFFF_FFFF) - ub) + 1; ss = sa - sb;   end
      OP_SBC:         begin s = ua + (longint'(32'hFFFF_FFFF) - ub) + uc; ss = sa - sb - 1 + uc; end
      OP_RSB:         begin s = ub + (longint'(32'hFFFF_FFFF) - ua) + 1;  ss = sb - sa;   end
      OP_RSC:         begin s = ub + (longint'(32'hFFFF_FFFF) - ua) + uc; ss = sb - sa - 1 + uc; end
      default: arith = 0;
    endcase
    case (op)
      OP_AND, OP_TST: r = a & b;
      OP_EOR, OP_TEQ: r = a ^ b;
      OP_ORR: r = a | b;
      OP_MOV: r = b;
      OP_BIC: r = a & ~b;
      OP_MVN: r = ~b;
      default: r = s[31:0];
    endcase
    f.n = r[31];
    f.z = (r == 0);
    if (arith) begin
      f.c = s[32];
      f.v = (ss != longint'($signed(r)));
    end else begin
      f.c = shift_carry;
      f.v = flags_in.v;
    end
  endtask

  initial begin
    logic [31:0] er;
    flags_t      ef;
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000,
                                32'hFFFF_FFFF, 32'h8000_0001};
    for (int n = 0; n < 6000; n++) begin
      op          = alu_op_e'(n % 16);
      a           = (n % 5 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      b           = (n % 3 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      flags_in    = flags_t'(4'($urandom));
      shift_carry = $urandom_range(0, 1) == 1;
      #1;
      reference(er, ef);
      checks++;
      if (result !== er || flags_out !== ef) begin
        failures++;
        if (failures < 10)
          $display("FAIL op=%s a=%h b=%h fin=%b: got %h %b want %h %b",
                   op.name(), a, b, flags_in, result, flags_out, er, ef);
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
