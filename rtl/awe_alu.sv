// awe_alu -- the AWE's ARM-compatible data-processing ALU.
//
// Performs the sixteen ARM data-processing operations on a (the first
// register operand, Rn) and b (the shifted second operand): the add and
// subtract family (ADD, ADC, SUB, SBC, RSB, RSC, CMP, CMN) and the Boolean
// family (AND, EOR, ORR, BIC, MOV, MVN, TST, TEQ). It returns the result
// and the N, Z, C, V values the operation would set; for Boolean operations
// C comes from the shifter and V is left as it was. Whether the flags are
// actually written, and whether the result reaches a register, is decided
// by the controller (S bit, test operations, condition). The same unit also
// serves the multi-cycle sequences of the logarithmic add, which drive it
// with SUB, RSB and ADD.
//
// Purely combinational.
module awe_alu
  import awe_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  flags_t      flags_in,
  input  logic        shift_carry,
  output logic [31:0] result,
  output flags_t      flags_out
);

  logic [32:0] sum;
  logic [31:0] x, y;
  logic        cin;
  logic        arith;

  always_comb begin
    // Every arithmetic operation is x + y + cin on 33 bits.
    x     = a;
    y     = b;
    cin   = 1'b0;
    arith = 1'b1;
    unique case (op)
      OP_ADD, OP_CMN: begin x = a;  y = b;  cin = 1'b0;        end
      OP_ADC:         begin x = a;  y = b;  cin = flags_in.c;  end
      OP_SUB, OP_CMP: begin x = a;  y = ~b; cin = 1'b1;        end
      OP_SBC:         begin x = a;  y = ~b; cin = flags_in.c;  end
      OP_RSB:         begin x = b;  y = ~a; cin = 1'b1;        end
      OP_RSC:         begin x = b;  y = ~a; cin = flags_in.c;  end
      default:        arith = 1'b0;
    endcase
    sum = {1'b0, x} + {1'b0, y} + {32'd0, cin};

    unique case (op)
      OP_AND, OP_TST: result = a & b;
      OP_EOR, OP_TEQ: result = a ^ b;
      OP_ORR:         result = a | b;
      OP_MOV:         result = b;
      OP_BIC:         result = a & ~b;
      OP_MVN:         result = ~b;
      default:        result = sum[31:0];
    endcase

    flags_out.n = result[31];
    flags_out.z = (result == 32'd0);
    if (arith) begin
      flags_out.c = sum[32];
      flags_out.v = (x[31] == y[31]) && (sum[31] != x[31]);
    end else begin
      flags_out.c = shift_carry;
      flags_out.v = flags_in.v;
    end
  end

endmodule
