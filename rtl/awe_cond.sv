// awe_cond -- condition-field check for conditional execution.
//
// Every AWE instruction carries the ARM 4-bit condition in bits [31:28];
// it executes only when the condition holds for the current N, Z, C, V
// bits. The sixteen conditions include signed and unsigned inequalities.
// Condition 1111 (NV) never holds: the logarithmic-add sequence relies on
// this to run the ALU for its side results without writing anything.
//
// Purely combinational.
module awe_cond
  import awe_pkg::*;
(
  input  cond_e  cond,
  input  flags_t flags,
  output logic   pass
);

  always_comb begin
    unique case (cond)
      CC_EQ: pass =  flags.z;
      CC_NE: pass = !flags.z;
      CC_CS: pass =  flags.c;
      CC_CC: pass = !flags.c;
      CC_MI: pass =  flags.n;
      CC_PL: pass = !flags.n;
      CC_VS: pass =  flags.v;
      CC_VC: pass = !flags.v;
      CC_HI: pass =  flags.c && !flags.z;
      CC_LS: pass = !flags.c ||  flags.z;
      CC_GE: pass = (flags.n == flags.v);
      CC_LT: pass = (flags.n != flags.v);
      CC_GT: pass = !flags.z && (flags.n == flags.v);
      CC_LE: pass =  flags.z || (flags.n != flags.v);
      CC_AL: pass = 1'b1;
      CC_NV: pass = 1'b0;
    endcase
  end

endmodule
