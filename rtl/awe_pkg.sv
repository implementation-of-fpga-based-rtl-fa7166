// awe_pkg -- types and constants shared by the AWE processor blocks.
//
// The AWE executes a subset of the 32-bit ARM instruction set, so the
// encodings below are the ARM ones: the 4-bit data-processing opcode in
// instruction bits [24:21], the 2-bit shift type in bits [6:5], and the
// 4-bit condition field in bits [31:28]. The halt instruction is a branch
// to itself (0xEAFFFFFE). The status bits are the usual N, Z, C, V.
package awe_pkg;

  // Data-processing operations, ARM encoding of instr[24:21].
  typedef enum logic [3:0] {
    OP_AND = 4'h0, OP_EOR = 4'h1, OP_SUB = 4'h2, OP_RSB = 4'h3,
    OP_ADD = 4'h4, OP_ADC = 4'h5, OP_SBC = 4'h6, OP_RSC = 4'h7,
    OP_TST = 4'h8, OP_TEQ = 4'h9, OP_CMP = 4'hA, OP_CMN = 4'hB,
    OP_ORR = 4'hC, OP_MOV = 4'hD, OP_BIC = 4'hE, OP_MVN = 4'hF
  } alu_op_e;

  // Shift types, ARM encoding of instr[6:5].
  typedef enum logic [1:0] {
    SH_LSL = 2'd0, SH_LSR = 2'd1, SH_ASR = 2'd2, SH_ROR = 2'd3
  } shift_e;

  // Condition codes, ARM encoding of instr[31:28].
  typedef enum logic [3:0] {
    CC_EQ = 4'h0, CC_NE = 4'h1, CC_CS = 4'h2, CC_CC = 4'h3,
    CC_MI = 4'h4, CC_PL = 4'h5, CC_VS = 4'h6, CC_VC = 4'h7,
    CC_HI = 4'h8, CC_LS = 4'h9, CC_GE = 4'hA, CC_LT = 4'hB,
    CC_GT = 4'hC, CC_LE = 4'hD, CC_AL = 4'hE, CC_NV = 4'hF
  } cond_e;

  // Program-status bits.
  typedef struct packed {
    logic n;
    logic z;
    logic c;
    logic v;
  } flags_t;

  localparam logic [31:0] HALT_INSTR = 32'hEAFF_FFFE;

  // True for the four test/compare operations, which write no register.
  function automatic logic op_is_test(alu_op_e op);
    return op inside {OP_TST, OP_TEQ, OP_CMP, OP_CMN};
  endfunction

endpackage
