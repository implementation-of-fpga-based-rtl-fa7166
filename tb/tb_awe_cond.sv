// tb_awe_cond -- exhaustive test of the condition check: all 16
// conditions against all 16 combinations of N, Z, C, V. The reference
// derives each condition from the meaning of the flags after a compare
// (equal, unsigned higher-or-same, signed greater-or-equal, ...).
module tb_awe_cond;
  timeunit 1ns; timeprecision 10ps;
  import awe_pkg::*;

  cond_e  cond;
  flags_t flags;
  logic   pass;
  int checks = 0, failures = 0;

  awe_cond dut (.*);

  function automatic bit expect_pass(int c, flags_t f);
    bit eq, hs, hi, ge, gt;
    eq = f.z;
    hs = f.c;
    hi = f.c & ~f.z;
    ge = ~(f.n ^ f.v);
    gt = ge & ~f.z;
    case (c)
      0: return eq;       1: return !eq;
      2: return hs;       3: return !hs;
      4: return f.n;      5: return !f.n;
      6: return f.v;      7: return !f.v;
      8: return hi;       9: return !hi;
      10: return ge;      11: return !ge;
      12: return gt;      13: return !gt;
      14: return 1;       default: return 0;
    endcase
  endfunction

  initial begin
    for (int c = 0; c < 16; c++)
      for (int f = 0; f < 16; f++) begin
        cond  = cond_e'(c);
        flags = flags_t'(f);
        #1;
        checks++;
        if (pass !== expect_pass(c, flags)) begin
          failures++;
          $display("FAIL cond=%0d flags=%b got %0b", c, flags, pass);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
