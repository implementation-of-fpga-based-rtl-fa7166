// awe_asm_pkg -- instruction encoders and an LNS reference for the AWE
// testbenches.
//
// Functions return 32-bit ARM encodings of the instructions the processor
// executes, so testbench programs read like assembly. sb_entry() gives the
// interpolation-table word for index zh: round(log2(1 + 2^(zh/512)) * 2^23),
// i.e. s(z) = log2(1 + 2^z) sampled every 2^-9 with 23 fraction bits.
// lns_add_ref() is an independent model of the logarithmic add that the
// hardware instruction and the software routine compute.
package awe_asm_pkg;

  localparam logic [3:0] AL = 4'hE, EQ = 4'h0, NE = 4'h1, CS = 4'h2,
                         MI = 4'h4, PL = 4'h5, GE = 4'hA, LT = 4'hB,
                         GT = 4'hC, NV = 4'hF;
  localparam logic [3:0] AND = 4'h0, EOR = 4'h1, SUB = 4'h2, RSB = 4'h3,
                         ADD = 4'h4, ADC = 4'h5, SBC = 4'h6, RSC = 4'h7,
                         TST = 4'h8, TEQ = 4'h9, CMP = 4'hA, CMN = 4'hB,
                         ORR = 4'hC, MOV = 4'hD, BIC = 4'hE, MVN = 4'hF;
  localparam logic [1:0] LSL = 2'd0, LSR = 2'd1, ASR = 2'd2, ROR = 2'd3;

  localparam int          FRAC      = 23;
  localparam int          ZL_BITS   = 14;
  localparam logic [31:0] Z_LIMIT   = 32'h0CF0_0000;
  localparam int          SB_ENTRIES = (32'h0CF0_0000 >> 14) + 1;

  // Data processing, immediate operand: imm8 rotated right by 2*rot.
  function automatic logic [31:0] dpi(logic [3:0] cond, logic [3:0] op, bit s,
                                      logic [3:0] rd, logic [3:0] rn,
                                      logic [7:0] imm8, logic [3:0] rot = 4'd0);
    return {cond, 3'b001, op, s, rn, rd, rot, imm8};
  endfunction

  // Data processing, register operand shifted by a constant.
  function automatic logic [31:0] dpr(logic [3:0] cond, logic [3:0] op, bit s,
                                      logic [3:0] rd, logic [3:0] rn, logic [3:0] rm,
                                      logic [1:0] sh = LSL, logic [4:0] amt = 5'd0);
    return {cond, 3'b000, op, s, rn, rd, amt, sh, 1'b0, rm};
  endfunction

  // LDR/STR with a 12-bit offset. pre: pre-index; wb: write the base back.
  function automatic logic [31:0] ldst(bit load, logic [3:0] rd, logic [3:0] rn,
                                       int off, bit pre = 1, bit wb = 0,
                                       logic [3:0] cond = 4'hE);
    logic [11:0] mag;
    mag = (off < 0) ? 12'(-off) : 12'(off);
    return {cond, 2'b01, 1'b0, pre, (off >= 0), 1'b0, wb, load, rn, rd, mag};
  endfunction

  // B / BL from address `from` to address `to`.
  function automatic logic [31:0] br(logic [3:0] cond, bit link, int from, int to);
    int off;
    off = (to - from - 8) / 4;
    return {cond, 3'b101, link, 24'(off)};
  endfunction

  function automatic logic [31:0] mul(logic [3:0] rd, logic [3:0] rm, logic [3:0] rs,
                                      bit s = 0);
    return {AL, 6'b000000, 1'b0, s, rd, 4'd0, rs, 4'b1001, rm};
  endfunction

  function automatic logic [31:0] mla(logic [3:0] rd, logic [3:0] rm, logic [3:0] rs,
                                      logic [3:0] rn, bit s = 0);
    return {AL, 6'b000000, 1'b1, s, rd, rn, rs, 4'b1001, rm};
  endfunction

  // LADD Rd, Rx, Ry in the coprocessor data-operation group.
  function automatic logic [31:0] ladd(logic [3:0] rd, logic [3:0] rx, logic [3:0] ry,
                                       logic [3:0] cond = 4'hE);
    return {cond, 4'b1110, 4'd0, rx, rd, 8'h00, ry};
  endfunction

  localparam logic [31:0] HALT = 32'hEAFF_FFFE;
  localparam logic [31:0] LDM  = 32'hE891_0006;   // LDMIA R1,{R1,R2}: traps

  function automatic logic [31:0] sb_entry(int zh);
    real zr, v;
    zr = real'(zh) / 512.0;
    v  = $ln(1.0 + $pow(2.0, zr)) / $ln(2.0);
    return 32'($rtoi(v * 8388608.0 + 0.5));
  endfunction

  // Reference logarithmic add on the table: same algorithm, written
  // directly from the interpolation formula.
  function automatic logic [31:0] lns_add_ref(logic [31:0] x, logic [31:0] y);
    longint      zl, zh, mn, mx, zz;
    longint      s0, s1;
    mx = ($signed(x) > $signed(y)) ? longint'($signed(x)) : longint'($signed(y));
    mn = ($signed(x) > $signed(y)) ? longint'($signed(y)) : longint'($signed(x));
    zz = mx - mn;
    if (zz >= longint'(Z_LIMIT)) return 32'(mx);
    zh = zz >> ZL_BITS;
    zl = zz % (64'sd1 << ZL_BITS);
    s0 = longint'(sb_entry(int'(zh)));
    s1 = longint'(sb_entry(int'(zh) + 1));
    return 32'(mn + s0 + (((s1 - s0) * zl) >> ZL_BITS));
  endfunction

  // Exact log2(2^x + 2^y) in the same fixed-point format, for accuracy.
  function automatic real lns_add_exact(logic [31:0] x, logic [31:0] y);
    real xr, yr, mx, mn;
    xr = real'($signed(x)) / 8388608.0;
    yr = real'($signed(y)) / 8388608.0;
    mx = (xr > yr) ? xr : yr;
    mn = (xr > yr) ? yr : xr;
    return (mx + $ln(1.0 + $pow(2.0, mn - mx)) / $ln(2.0)) * 8388608.0;
  endfunction

endpackage
