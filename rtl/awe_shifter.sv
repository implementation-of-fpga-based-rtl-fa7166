// awe_shifter -- second-operand barrel shifter of the AWE data path.
//
// The last operand of a data-processing instruction is either an 8-bit
// immediate rotated right by twice a 4-bit amount, or a register shifted
// or rotated by a constant distance taken from the instruction (LSL, LSR,
// ASR, ROR). As on the ARM, LSR #0 and ASR #0 encode a shift by 32 and
// ROR #0 encodes RRX (rotate right through carry). Shifting by the value
// of another register is not part of the AWE; the decoder traps such
// instructions, and this block ignores bit 4.
//
// Purely combinational. operand2 is instruction bits [11:0]; imm selects
// the immediate form (instruction bit 25). carry_out is the shifter carry
// that logical operations copy into C.
module awe_shifter
  import awe_pkg::*;
(
  input  logic        imm,
  input  logic [11:0] operand2,
  input  logic [31:0] rm_value,
  input  logic        carry_in,
  output logic [31:0] result,
  output logic        carry_out
);

  logic [4:0]  amount;
  shift_e      kind;
  logic [4:0]  rot2;
  logic [63:0] wide;

  always_comb begin
    amount    = operand2[11:7];
    kind      = shift_e'(operand2[6:5]);
    rot2      = {operand2[11:8], 1'b0};
    wide      = '0;
    result    = rm_value;
    carry_out = carry_in;
    if (imm) begin
      wide   = {32'd0, 24'd0, operand2[7:0]} << (6'd32 - {1'b0, rot2});
      result = (rot2 == 5'd0) ? {24'd0, operand2[7:0]}
                              : (wide[63:32] | wide[31:0]);
      if (rot2 != 5'd0) carry_out = result[31];
    end else begin
      unique case (kind)
        SH_LSL: if (amount != 5'd0) begin
          result    = rm_value << amount;
          carry_out = rm_value[5'd0 - amount];
        end
        SH_LSR: if (amount == 5'd0) begin
          result    = 32'd0;
          carry_out = rm_value[31];
        end else begin
          result    = rm_value >> amount;
          carry_out = rm_value[amount - 5'd1];
        end
        SH_ASR: if (amount == 5'd0) begin
          result    = {32{rm_value[31]}};
          carry_out = rm_value[31];
        end else begin
          result    = 32'($signed(rm_value) >>> amount);
          carry_out = rm_value[amount - 5'd1];
        end
        SH_ROR: if (amount == 5'd0) begin
          result    = {carry_in, rm_value[31:1]};
          carry_out = rm_value[0];
        end else begin
          result    = (rm_value >> amount) | (rm_value << (6'd32 - {1'b0, amount}));
          carry_out = rm_value[amount - 5'd1];
        end
      endcase
    end
  end

endmodule
