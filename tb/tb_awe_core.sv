// tb_awe_core -- self-checking test of the AWE processor core.
//
// Small programs, assembled with awe_asm_pkg, are placed in the RAM model
// and run from reset to the halt instruction. After each run the register
// file and memory are compared with values worked out here, and the
// cycles each instruction spent in the execute stage are compared with
// the counts the design is built to (1 for data processing, 3 for LDR/STR
// and taken B, 4 for BL, 36 for MUL/MLA, 21/22 for LADD, 53 for the
// software logarithmic add). Covered: all data-processing forms and
// flags, conditional execution, back-to-back dependent instructions,
// pre/post-indexed loads and stores with writeback, PC-relative loads,
// B/BL/return through R15, MUL/MLA/MULS, LADD (with and without operand
// swap, and with z beyond the table), the same addition done in software,
// interrupts with the PDP-8 style return sequence, and traps on
// unimplemented instructions.
module tb_awe_core;
  timeunit 1ns; timeprecision 10ps;
  import awe_asm_pkg::*;

  localparam logic [31:0] TABLE  = 32'h0001_0000;
  localparam int          LITBASE = 32'h400;

  logic        clk = 0, rst_n = 0, irq = 0;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic        mem_we, supervisor, halted;
  int checks = 0, failures = 0;
  int cyc = 0;
  int fs [int];                 // first cycle each address was in execute
  int irq_at = -1;

  awe_core dut (.*);
  awe_ram_model #(.WORDS_LOG2(19)) ram (
    .clk, .addr(mem_addr), .wdata(mem_wdata), .we(mem_we), .rdata(mem_rdata));

  // The integer-only configuration, where LADD must trap.
  logic        rst0_n = 0;
  logic [31:0] m0_addr, m0_wdata, m0_rdata;
  logic        m0_we, sup0, halt0;
  awe_core #(.LNS_EN(1'b0)) dut0 (
    .clk, .rst_n(rst0_n), .irq(1'b0), .mem_addr(m0_addr), .mem_wdata(m0_wdata),
    .mem_we(m0_we), .mem_rdata(m0_rdata), .supervisor(sup0), .halted(halt0));
  awe_ram_model #(.WORDS_LOG2(12)) ram0 (
    .clk, .addr(m0_addr), .wdata(m0_wdata), .we(m0_we), .rdata(m0_rdata));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && int'(dut.state) == 0 && dut.v2 && !fs.exists(int'(dut.pc2)))
      fs[int'(dut.pc2)] = cyc;
    if (irq_at >= 0 && cyc == irq_at) irq <= 1;
    if (supervisor) irq <= 0;
  end

  // ---------------------------------------------------------------- assembly
  logic [31:0] prog [$];
  logic [31:0] lits [$];

  function automatic int here();
    return 4 * prog.size();
  endfunction
  function automatic void emit(logic [31:0] w);
    prog.push_back(w);
  endfunction
  // LDR rd, =value  (PC-relative load from the literal pool)
  function automatic void ldlit(logic [3:0] rd, logic [31:0] value);
    int a;
    a = LITBASE + 4 * lits.size();
    lits.push_back(value);
    emit(ldst(1, rd, 4'd15, a - (here() + 8)));
  endfunction
  function automatic void new_prog();
    prog.delete();
    lits.delete();
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  function automatic logic [31:0] R(int i);
    return dut.u_rf.r[i];
  endfunction

  function automatic int cost(int a, int b);
    if (!fs.exists(a) || !fs.exists(b)) return -1;
    return fs[b] - fs[a];
  endfunction

  task automatic run(int max_cycles = 5000);
    int n;
    rst_n = 0;
    for (int i = 0; i < prog.size(); i++) ram.mem[i] = prog[i];
    for (int i = 0; i < lits.size(); i++) ram.mem[LITBASE / 4 + i] = lits[i];
    fs.delete();
    @(negedge clk);
    @(negedge clk);
    rst_n = 1;
    n = 0;
    while (!halted && n < max_cycles) begin @(negedge clk); n++; end
    checks++;
    if (!halted) begin
      failures++;
      $display("FAIL program did not halt");
    end
  endtask

  // ------------------------------------------------------------------ tests
  task automatic test_alu();
    new_prog();
    emit(dpi(AL, MOV, 0, 1, 0, 8'd5));                 // 0  R1 = 5
    emit(dpi(AL, MOV, 0, 2, 0, 8'd7));                 // 4  R2 = 7
    emit(dpr(AL, ADD, 0, 3, 1, 2));                    // 8  R3 = 12
    emit(dpi(AL, SUB, 1, 4, 3, 8'd20));                // c  R4 = -8, N
    emit(dpi(MI, MOV, 0, 5, 0, 8'd1));                 // 10 R5 = 1
    emit(dpi(PL, MOV, 0, 6, 0, 8'd1));                 // 14 skipped
    emit(dpr(AL, RSB, 0, 7, 1, 2, LSL, 5'd2));         // 18 R7 = 28-5
    emit(dpi(AL, AND, 0, 8, 2, 8'd3));                 // 1c R8 = 3
    emit(dpr(AL, ORR, 0, 9, 1, 2, LSL, 5'd4));         // 20 R9 = 117
    emit(dpr(AL, EOR, 0, 10, 1, 2));                   // 24 R10 = 2
    emit(dpr(AL, BIC, 0, 11, 2, 1));                   // 28 R11 = 2
    emit(dpi(AL, MVN, 0, 12, 0, 8'd0));                // 2c R12 = ~0
    emit(dpr(AL, CMP, 1, 0, 1, 1));                    // 30 Z
    emit(dpi(EQ, ADD, 0, 13, 1, 8'd100));              // 34 R13 = 105
    emit(dpr(AL, MOV, 0, 0, 0, 12, LSR, 5'd28));       // 38 R0 = 15
    emit(dpi(AL, ADD, 1, 6, 12, 8'd1));                // 3c R6 = 0, C, Z
    emit(dpi(CS, ADC, 0, 14, 0, 8'd0, 4'd0));          // 40 R14 = 15+0+1
    emit(dpi(AL, MOV, 0, 4, 0, 8'hCF, 4'd6));          // 44 R4 = 0x0CF00000
    emit(dpr(AL, MOV, 0, 2, 0, 4, ASR, 5'd0));         // 48 R2 = 0 (ASR #32)
    emit(HALT);                                        // 4c
    run();
    check("alu R0", R(0), 15);
    check("alu R1", R(1), 5);
    check("alu R2", R(2), 0);
    check("alu R3", R(3), 12);
    check("alu R4", R(4), 32'h0CF0_0000);
    check("alu R5", R(5), 1);
    check("alu R6", R(6), 0);
    check("alu R7", R(7), 23);
    check("alu R8", R(8), 3);
    check("alu R9", R(9), 117);
    check("alu R10", R(10), 2);
    check("alu R11", R(11), 2);
    check("alu R12", R(12), 32'hFFFF_FFFF);
    check("alu R13", R(13), 105);
    check("alu R14", R(14), 16);
    check("alu cycles (19 single-cycle)", cost(0, 32'h4c), 19);
  endtask

  task automatic test_ldst();
    new_prog();
    emit(dpi(AL, MOV, 0, 1, 0, 8'h80, 4'd15));         // 0  R1 = 0x200
    emit(dpi(AL, MOV, 0, 2, 0, 8'h55));                // 4
    emit(ldst(0, 2, 1, 4));                            // 8  STR R2,[R1,#4]
    emit(ldst(1, 3, 1, 4));                            // c  LDR R3,[R1,#4]
    emit(ldst(0, 3, 1, 8, 0, 0));                      // 10 STR R3,[R1],#8
    emit(dpi(AL, ADD, 0, 6, 1, 8'd0));                 // 14 R6 = R1 (0x208)
    emit(ldst(1, 4, 1, -8, 1, 1));                     // 18 LDR R4,[R1,#-8]!
    ldlit(5, 32'hDEAD_BEEF);                           // 1c
    emit(dpr(AL, ADD, 0, 7, 5, 4));                    // 20 uses R5 at once
    emit(HALT);                                        // 24
    run();
    check("ldst mem[0x204]", ram.mem[32'h204 / 4], 32'h55);
    check("ldst mem[0x200]", ram.mem[32'h200 / 4], 32'h55);
    check("ldst R3", R(3), 32'h55);
    check("ldst R6 post-index writeback", R(6), 32'h208);
    check("ldst R1 pre-index writeback", R(1), 32'h200);
    check("ldst R4", R(4), 32'h55);
    check("ldst R5 literal", R(5), 32'hDEAD_BEEF);
    check("ldst R7", R(7), 32'hDEAD_BEEF + 32'h55);
    check("STR cycles", cost(8, 32'hc), 3);
    check("LDR cycles", cost(32'hc, 32'h10), 3);
    check("LDR writeback cycles", cost(32'h18, 32'h1c), 3);
  endtask

  task automatic test_branch();
    new_prog();
    emit(dpi(AL, MOV, 0, 1, 0, 8'd10));                // 0
    emit(dpi(AL, MOV, 0, 2, 0, 8'd0));                 // 4
    emit(dpi(AL, ADD, 0, 2, 2, 8'd3));                 // 8  loop
    emit(dpi(AL, SUB, 1, 1, 1, 8'd1));                 // c
    emit(br(NE, 0, 32'h10, 32'h8));                    // 10
    emit(br(AL, 0, 32'h14, 32'h1c));                   // 14 B over
    emit(dpi(AL, MOV, 0, 3, 0, 8'd99));                // 18 skipped
    emit(br(AL, 1, 32'h1c, 32'h30));                   // 1c BL sub
    emit(dpi(AL, ADD, 0, 4, 4, 8'd1));                 // 20 after return
    emit(HALT);                                        // 24
    emit(HALT); emit(HALT);                            // 28 2c
    emit(dpi(AL, MOV, 0, 4, 0, 8'd40));                // 30 sub
    emit(dpr(AL, MOV, 0, 15, 0, 14));                  // 34 MOV PC,LR
    run();
    check("loop R2", R(2), 30);
    check("loop R1", R(1), 0);
    check("B skipped", R(3), 0);
    check("BL link R14", R(14), 32'h20);
    check("after return R4", R(4), 41);
    // 9 iterations of (1 + 1 + 3) and a last one of (1 + 1 + 1)
    check("loop cycles", cost(8, 32'h14), 9 * 5 + 3);
    check("B cycles", cost(32'h14, 32'h1c), 3);
    check("BL cycles", cost(32'h1c, 32'h30), 4);
    check("MOV PC cycles", cost(32'h34, 32'h20), 4);
  endtask

  task automatic test_mul();
    logic [31:0] a, b, c;
    for (int k = 0; k < 4; k++) begin
      a = (k == 0) ? 32'hFFFF_FFFF : $urandom;
      b = (k == 0) ? 32'h0000_0003 : $urandom;
      c = $urandom;
      new_prog();
      ldlit(1, a);                                     // 0
      ldlit(2, b);                                     // 4
      ldlit(5, c);                                     // 8
      emit(mul(3, 1, 2));                              // c
      emit(mla(4, 1, 2, 5));                           // 10
      emit(dpr(AL, ADD, 0, 6, 4, 3));                  // 14
      emit(dpi(AL, MOV, 0, 7, 0, 8'd0));               // 18
      emit(mul(8, 7, 1, 1));                           // 1c MULS -> Z
      emit(dpi(EQ, MOV, 0, 9, 0, 8'd1));               // 20
      ldlit(10, c);                                    // 24
      emit(mla(10, 1, 2, 10));                         // 28 Rn == Rd
      emit(HALT);                                      // 2c
      run();
      check("MLA with Rn == Rd", R(10), a * b + c);
      check("MUL", R(3), a * b);
      check("MLA", R(4), a * b + c);
      check("after MLA", R(6), 2 * (a * b) + c);
      check("MULS zero flag", R(9), 1);
      check("MUL cycles", cost(32'hc, 32'h10), 36);
      check("MLA cycles", cost(32'h10, 32'h14), 36);
    end
  endtask

  task automatic ladd_case(logic [31:0] x, logic [31:0] y);
    int want_cyc;
    real err;
    logic [31:0] lo;
    new_prog();
    ldlit(1, x);                                       // 0
    ldlit(2, y);                                       // 4
    emit(ladd(0, 1, 2));                               // 8
    emit(HALT);                                        // c
    run();
    check($sformatf("LADD %h %h", x, y), R(0), lns_add_ref(x, y));
    err = $signed(R(0)) - lns_add_exact(x, y);
    checks++;
    if (err > 4.0 || err < -4.0) begin
      failures++;
      $display("FAIL LADD accuracy %h %h: error %f", x, y, err);
    end
    lo = ($signed(x) >= $signed(y)) ? y : x;
    check("LADD keeps min operand", ($signed(x) >= $signed(y)) ? R(2) : R(1), lo);
    if ((($signed(x) >= $signed(y)) ? x - y : y - x) >= Z_LIMIT)
      want_cyc = ($signed(x) >= $signed(y)) ? 3 : 4;
    else
      want_cyc = ($signed(x) >= $signed(y)) ? 21 : 22;
    check($sformatf("LADD cycles %h %h", x, y), cost(8, 32'hc), want_cyc);
  endtask

  task automatic test_ladd();
    ladd_case(32'h0000_0000, 32'h0000_0000);           // 1 + 1 = 2
    ladd_case(32'h0080_0000, 32'h0000_0000);           // 2 + 1 = 3
    ladd_case(32'h0000_0000, 32'h0100_0000);           // swap: 1 + 4
    ladd_case(32'hFF00_0000, 32'h0123_4567);
    ladd_case(32'h1000_0000, 32'h0000_0000);           // z beyond table
    ladd_case(32'h0000_0000, 32'h1000_0000);
    for (int k = 0; k < 24; k++) begin
      logic [31:0] x, y;
      x = 32'($signed($urandom_range(0, 32'h1FFF_FFFF)) - 32'sh1000_0000);
      y = x + 32'($signed($urandom_range(0, 32'h0E00_0000)) - 32'sh0700_0000);
      ladd_case(x, y);
    end
  endtask

  // The software logarithmic add from the design's benchmark: R1 = x,
  // R2 = y, R3 = table base; result in R0.
  task automatic sw_case(logic [31:0] x, logic [31:0] y);
    new_prog();
    ldlit(1, x);                                       // 0
    ldlit(2, y);                                       // 4
    ldlit(3, TABLE);                                   // 8
    emit(dpr(AL, SUB, 1, 2, 2, 1));                    // c  SUBS R2,R2,R1
    emit(dpr(MI, ADD, 0, 1, 1, 2));                    // 10 ADDMI R1,R1,R2
    emit(dpi(MI, RSB, 0, 2, 2, 8'd0));                 // 14 RSBMI R2,R2,#0
    emit(dpi(AL, CMP, 1, 0, 2, 8'hCF, 4'd6));          // 18 CMP R2,#0xCF ROR 12
    emit(br(CS, 0, 32'h1c, 32'h48));                   // 1c BCS L
    emit(dpr(AL, MOV, 0, 4, 0, 2, LSR, 5'd14));        // 20 zH
    emit(dpr(AL, SUB, 0, 2, 2, 4, LSL, 5'd14));        // 24 zL
    emit(dpr(AL, ADD, 0, 6, 3, 4, LSL, 5'd2));         // 28 address
    emit(ldst(1, 5, 6, 4, 0, 0));                      // 2c LDR R5,[R6],#4
    emit(ldst(1, 4, 6, 0));                            // 30 LDR R4,[R6]
    emit(dpr(AL, SUB, 0, 4, 4, 5));                    // 34 c
    emit(mul(6, 4, 2));                                // 38 c*zL
    emit(dpr(AL, ADD, 0, 2, 5, 6, LSR, 5'd14));        // 3c s(z)
    emit(HALT);                                        // 40 (not reached)
    emit(HALT);                                        // 44
    // L:
    prog[32'h40 / 4] = br(AL, 0, 32'h40, 32'h48);
    emit(dpr(AL, ADD, 0, 0, 1, 2));                    // 48 ADD R0,R1,R2
    emit(HALT);                                        // 4c
    run();
    check($sformatf("software LNS add %h %h", x, y), R(0), lns_add_ref(x, y));
    if ((($signed(x) >= $signed(y)) ? x - y : y - x) >= Z_LIMIT)
      check("software LNS add cycles (big z)", cost(32'hc, 32'h4c), 8);
    else
      // 53 for the routine, plus the B that skips the padding word here
      check("software LNS add cycles", cost(32'hc, 32'h40) + cost(32'h48, 32'h4c), 53);
  endtask

  task automatic test_software();
    sw_case(32'h0080_0000, 32'h0000_0000);
    sw_case(32'h0000_0000, 32'h0100_0000);
    sw_case(32'h1000_0000, 32'h0000_0000);
    for (int k = 0; k < 6; k++) begin
      logic [31:0] x, y;
      x = $urandom_range(0, 32'h0FFF_FFFF);
      y = x + 32'($signed($urandom_range(0, 32'h0E00_0000)) - 32'sh0700_0000);
      sw_case(x, y);
    end
  endtask

  // ISR at 0x104 (UR14 = 0xFC, UR15 = 0x100), following the return
  // sequence of the design: save R14, fetch the saved R15, correct it for
  // the pipeline (ret_adjust), do the work, restore R14, LDR R15.
  function automatic void emit_isr(int ret_adjust);
    while (here() < 32'h104) emit(32'h0);
    emit(ldst(0, 14, 15, -16));                        // 104 STR R14,[R15,#-16]
    emit(ldst(1, 14, 15, -16));                        // 108 LDR R14,[R15,#-16]
    emit(dpi(AL, SUB, 0, 14, 14, 8'(ret_adjust)));     // 10c
    emit(ldst(0, 14, 15, -24));                        // 110 STR R14,[R15,#-24]
    emit(dpi(AL, ADD, 1, 9, 9, 8'd1));                 // 114 count (ADDS: changes flags)
    emit(ldst(1, 14, 15, -36));                        // 118 LDR R14,[R15,#-36]
    emit(ldst(1, 15, 15, -36));                        // 11c LDR R15,[R15,#-36]
  endfunction

  task automatic test_interrupt();
    new_prog();
    emit(dpi(AL, MOV, 0, 8, 0, 8'd0));                 // 0
    emit(dpi(AL, MOV, 0, 9, 0, 8'd0));                 // 4
    emit(dpi(AL, MOV, 0, 14, 0, 8'd77));               // 8
    emit(dpi(AL, MOV, 0, 1, 0, 8'd40));                // c
    emit(dpi(AL, ADD, 0, 8, 8, 8'd2));                 // 10 loop
    emit(dpi(AL, SUB, 1, 1, 1, 8'd1));                 // 14
    emit(br(NE, 0, 32'h18, 32'h10));                   // 18
    emit(HALT);                                        // 1c
    emit_isr(12);
    irq_at = cyc + 40;
    run();
    irq_at = -1;
    check("interrupted loop R8", R(8), 80);
    check("interrupt count R9", R(9), 1);
    check("user R14 restored", R(14), 77);
    check("supervisor off after LDR R15", 32'(supervisor), 0);
    checks++;
    if (!fs.exists(32'h104)) begin failures++; $display("FAIL ISR never ran"); end
  endtask

  // User code relies on Z across an interrupt whose routine changes the
  // flags; the flags must come back with the return to user mode.
  task automatic test_irq_flags();
    new_prog();
    emit(dpi(AL, MOV, 0, 9, 0, 8'd0));                 // 0
    emit(dpi(AL, MOV, 0, 5, 0, 8'd0));                 // 4
    emit(dpr(AL, CMP, 1, 0, 0, 0));                    // 8  Z = 1
    for (int i = 0; i < 30; i++) emit(dpi(EQ, ADD, 0, 5, 5, 8'd1));
    emit(HALT);
    emit_isr(12);
    irq_at = cyc + 20;
    run();
    irq_at = -1;
    check("flags kept across interrupt R5", R(5), 30);
    check("interrupt count R9", R(9), 1);
  endtask

  task automatic test_trap();
    new_prog();
    emit(dpi(AL, MOV, 0, 9, 0, 8'd0));                 // 0
    emit(dpi(AL, MOV, 0, 1, 0, 8'd1));                 // 4
    emit(LDM);                                         // 8 traps
    emit(dpi(AL, ADD, 0, 1, 1, 8'd1));                 // c
    emit({AL, 3'b000, MOV, 1'b0, 4'd0, 4'd2, 4'd1, 1'b0, LSL, 1'b1, 4'd1}); // 10 MOV R2,R1,LSL R1: traps
    emit(dpi(AL, ADD, 0, 1, 1, 8'd1));                 // 14
    emit(HALT);                                        // 18
    emit_isr(8);                                       // return past it
    run();
    check("trap count R9", R(9), 2);
    check("code after traps R1", R(1), 3);
    check("trapped instruction had no effect R2", R(2), 0);
    check("saved R15 after ISR fix-up (last trap at 0x10)", ram.mem[32'h100 / 4], 32'h10 + 12 - 8);
  endtask

  task automatic test_no_lns();
    int n;
    new_prog();
    emit(dpi(AL, MOV, 0, 9, 0, 8'd0));
    emit(dpi(AL, MOV, 0, 0, 0, 8'd0));
    ldlit(1, 32'h0080_0000);
    ldlit(2, 32'h0000_0000);
    emit(ladd(0, 1, 2));                               // traps here
    emit(dpi(AL, ADD, 0, 0, 0, 8'd7));
    emit(HALT);
    emit_isr(8);
    for (int i = 0; i < prog.size(); i++) ram0.mem[i] = prog[i];
    for (int i = 0; i < lits.size(); i++) ram0.mem[LITBASE / 4 + i] = lits[i];
    @(negedge clk);
    rst0_n = 1;
    n = 0;
    while (!halt0 && n < 2000) begin @(negedge clk); n++; end
    check("integer-only core halts", 32'(halt0), 1);
    check("integer-only core: LADD trapped", dut0.u_rf.r[9], 1);
    check("integer-only core: LADD had no effect", dut0.u_rf.r[0], 7);
  endtask

  initial begin
    for (int i = 0; i < SB_ENTRIES; i++) ram.mem[TABLE / 4 + i] = sb_entry(i);
    test_alu();
    test_ldst();
    test_branch();
    test_mul();
    test_ladd();
    test_software();
    test_interrupt();
    test_irq_flags();
    test_trap();
    test_no_lns();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end
endmodule
