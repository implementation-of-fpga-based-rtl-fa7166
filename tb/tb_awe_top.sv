// tb_awe_top -- end-to-end test of the whole design at its default
// parameters.
//
// The processor runs an LNS dot product of two 8-element vectors held in
// memory: each product is an ordinary integer ADD of logarithms, and the
// sum is accumulated twice, once with the LADD instruction and once with
// the software logarithmic-add routine called as a subroutine (BL, return
// by MOV PC,LR). An MLA keeps a sum of squares of the loop index. Two
// interrupts arrive during the loop and an LDM after it traps; a single
// service routine at 0x104 tells the two apart by inspecting the
// abandoned instruction, counts them, and returns with LDR R15, which
// leaves supervisor mode. Meanwhile the two example machines beside the
// processor are driven and checked every cycle.
//
// Checked: both accumulators equal the reference fold of lns_add_ref(),
// and lie within 0.5e-5 of the exact log2 of the dot product; the sum of
// squares; interrupt and trap counts; stored results; every LADD's
// execute-stage length (3/4 cycles beyond the table, 21/22 otherwise);
// and that each mechanism (LDR, STR, taken B, BL, R15 write, MUL/MLA,
// inserted ADD, LADD with and without swap and beyond the table,
// interrupt, trap, return to user mode, false condition, halt, example
// machine writes) happened at least once.
module tb_awe_top;
  timeunit 1ns; timeprecision 10ps;
  import awe_asm_pkg::*;

  localparam logic [31:0] TABLE   = 32'h0001_0000;
  localparam int          LITBASE = 32'h600;
  localparam int          VEC_A   = 32'h800;
  localparam int          VEC_B   = 32'h820;
  localparam int          RES     = 32'h900;
  localparam int          TRAPCNT = 32'hF4, UR13 = 32'hF8, UR14 = 32'hFC, UR15 = 32'h100;
  localparam int          N       = 8;

  logic        clk = 0, rst_n = 0, irq = 0;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic        mem_we, supervisor, halted;
  logic [31:0] ex1_data1, ex1_data2, ex1_a, ex2_data1, ex2_data2, ex2_rdata;
  logic        ex1_s4, ex1_s6, ex2_s4, ex2_s6;
  logic [3:0]  ex2_addr1, ex2_addr2, ex2_raddr;
  int checks = 0, failures = 0, cyc = 0;

  awe_top dut (.*);
  awe_ram_model #(.WORDS_LOG2(19)) ram (
    .clk, .addr(mem_addr), .wdata(mem_wdata), .we(mem_we), .rdata(mem_rdata));

  always #5 clk = ~clk;

  // ------------------------------------------------------ mechanism counts
  typedef enum int {
    M_LDR, M_STR, M_B, M_BL, M_PCWRITE, M_MUL, M_MLA_ADD, M_LADD_NOSWAP,
    M_LADD_SWAP, M_LADD_BEYOND, M_IRQ, M_TRAP, M_USER_RETURN, M_COND_FALSE,
    M_HALT, M_EX1_D1, M_EX1_D2, M_EX2_W1, M_EX2_W2, M_COUNT
  } mech_e;
  int mcount [M_COUNT];
  string mname [M_COUNT] = '{"LDR", "STR", "B taken", "BL", "R15 write",
    "MUL/MLA", "MLA inserted ADD", "LADD no swap", "LADD swap",
    "LADD beyond table", "interrupt", "trap", "return to user mode",
    "condition false", "halt", "ex1 data1 load", "ex1 data2 load",
    "ex2 addr1 write", "ex2 addr2 write"};

  int ladd_start = -1;
  bit ladd_swap_seen;
  bit prev_sup = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      automatic int st = int'(dut.u_core.state);
      automatic logic [31:0] i2 = dut.u_core.ir2;
      if (st == 1) mcount[i2[20] ? M_LDR : M_STR]++;                // S_MEM
      if (st == 3) mcount[M_BL]++;                                  // S_BRANCH
      if (st == 4) mcount[M_PCWRITE]++;                             // S_PCLOAD
      if (st == 8 && dut.u_core.mul_last) mcount[M_MUL]++;          // S_MUL_RUN
      if (st == 9 && i2[21]) mcount[M_MLA_ADD]++;                   // S_MUL_WB
      if (st == 6 && !halted) ;
      if (st == 0 && dut.u_core.v2) begin
        if (dut.u_core.go && dut.u_core.is_branch && !i2[24]) mcount[M_B]++;
        if (!dut.u_core.cond_pass && i2 != HALT && !dut.u_core.take_int)
          mcount[M_COND_FALSE]++;
        if (dut.u_core.take_int) mcount[dut.u_core.is_unimpl && !irq ? M_TRAP : M_IRQ]++;
        if (dut.u_core.go && dut.u_core.is_ladd) begin
          ladd_start = cyc;
          ladd_swap_seen = 0;
        end
      end
      if (st == 11) ladd_swap_seen = 1;                             // S_L_SWAP
      if (st == 12 && dut.u_core.z_big) mcount[M_LADD_BEYOND]++;    // S_L_ADDR
      if (st == 10 && ladd_start >= 0) begin                        // S_RESUME
        automatic int len = cyc - ladd_start + 1;
        automatic int want = dut.u_core.z_big ? (ladd_swap_seen ? 4 : 3)
                                              : (ladd_swap_seen ? 22 : 21);
        mcount[ladd_swap_seen ? M_LADD_SWAP : M_LADD_NOSWAP]++;
        checks++;
        if (len != want) begin
          failures++;
          $display("FAIL LADD took %0d cycles, want %0d", len, want);
        end
        ladd_start = -1;
      end
      if (prev_sup && !supervisor) mcount[M_USER_RETURN]++;
      prev_sup <= supervisor;
    end
  end

  // ------------------------------------------------------------- assembly
  logic [31:0] prog [$];
  logic [31:0] lits [$];
  function automatic int here();
    return 4 * prog.size();
  endfunction
  function automatic void emit(logic [31:0] w);
    prog.push_back(w);
  endfunction
  function automatic void ldlit(logic [3:0] rd, logic [31:0] value);
    int a;
    a = LITBASE + 4 * lits.size();
    lits.push_back(value);
    emit(ldst(1, rd, 4'd15, a - (here() + 8)));
  endfunction
  // LDR/STR of an absolute address through R15
  function automatic void ldabs(bit load, logic [3:0] rd, int addr, logic [3:0] cond = AL);
    emit(ldst(load, rd, 4'd15, addr - (here() + 8), 1, 0, cond));
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  // ---------------------------------------------------- example machines
  logic [31:0] ex2_shadow [16];
  bit          ex_run = 0;
  always @(negedge clk) if (ex_run) begin
    logic [31:0] e1;
    e1 = ex1_s4 ? ex1_data1 : ex1_data2;
    ex1_data1 <= ex1_data1;
    @(posedge clk);
    if (ex1_s4) mcount[M_EX1_D1]++; else mcount[M_EX1_D2]++;
    if (ex2_s4) begin ex2_shadow[ex2_addr1] = ex2_data1; mcount[M_EX2_W1]++; end
    else        begin ex2_shadow[ex2_addr2] = ex2_data2; mcount[M_EX2_W2]++; end
    #1;
    checks += 2;
    if (ex1_a !== e1) begin failures++; $display("FAIL ex1 a=%h want %h", ex1_a, e1); end
    if (ex2_rdata !== ex2_shadow[ex2_raddr]) begin
      failures++;
      $display("FAIL ex2 r[%0d]=%h want %h", ex2_raddr, ex2_rdata, ex2_shadow[ex2_raddr]);
    end
    ex1_data1 = $urandom; ex1_data2 = $urandom;
    ex2_addr1 = 4'($urandom); ex2_addr2 = 4'($urandom);
    ex2_data1 = $urandom; ex2_data2 = $urandom; ex2_raddr = 4'($urandom);
  end

  // ----------------------------------------------------------------- test
  initial begin
    logic [31:0] a [N], b [N];
    logic [31:0] acc;
    real         exact;
    int          loop, swadd, after, n;

    ex1_data1 = 0; ex1_data2 = 0; ex2_addr1 = 0; ex2_addr2 = 0;
    ex2_data1 = 0; ex2_data2 = 0; ex2_raddr = 0;
    foreach (ex2_shadow[i]) ex2_shadow[i] = 0;
    foreach (mcount[i]) mcount[i] = 0;

    for (int i = 0; i < N; i++) begin
      a[i] = 32'($signed($urandom_range(0, 32'h0400_0000)) - 32'sh0200_0000);
      b[i] = 32'($signed($urandom_range(0, 32'h0400_0000)) - 32'sh0200_0000);
    end
    a[N-2] = a[N-2] + 32'h0600_0000;       // a late, large product

    // main program
    emit(dpi(AL, MOV, 0, 9, 0, 8'd0));
    emit(dpi(AL, MOV, 0, 13, 0, 8'd0));
    emit(dpi(AL, MOV, 0, 7, 0, 8'(N)));
    ldlit(8, VEC_A);
    ldlit(10, 32'hC000_0000);               // "zero": 2^-256
    emit(dpr(AL, MOV, 0, 12, 0, 10));
    loop = here();
    emit(ldst(1, 2, 8, VEC_B - VEC_A));     // b[i]
    emit(ldst(1, 1, 8, 4, 0, 0));           // a[i], post-increment
    emit(dpr(AL, ADD, 0, 1, 1, 2));         // LNS multiply
    emit(dpr(AL, MOV, 0, 11, 0, 1));
    emit(dpr(AL, MOV, 0, 2, 0, 12));
    emit(32'h0);                            // BL swadd, patched below
    emit(dpr(AL, MOV, 0, 12, 0, 0));
    emit(ladd(0, 10, 11));                  // hardware accumulate
    emit(dpr(AL, MOV, 0, 10, 0, 0));
    emit(mla(13, 7, 7, 13));
    emit(dpi(AL, SUB, 1, 7, 7, 8'd1));
    emit(br(NE, 0, here(), loop));
    emit(LDM);                              // traps, skipped by the ISR
    ldabs(0, 10, RES);
    ldabs(0, 12, RES + 4);
    ldabs(0, 13, RES + 8);
    emit(mul(5, 9, 13, 1));
    ldabs(0, 5, RES + 12);
    emit(HALT);
    // software logarithmic add: R0 = lns(R1) + lns(R2), R3 = table
    swadd = here();
    prog[(loop + 20) / 4] = br(AL, 1, loop + 20, swadd);
    ldlit(3, TABLE);
    emit(dpr(AL, SUB, 1, 2, 2, 1));
    emit(dpr(MI, ADD, 0, 1, 1, 2));
    emit(dpi(MI, RSB, 0, 2, 2, 8'd0));
    emit(dpi(AL, CMP, 1, 0, 2, 8'hCF, 4'd6));
    after = here();
    emit(32'h0);                            // BCS L, patched below
    emit(dpr(AL, MOV, 0, 4, 0, 2, LSR, 5'd14));
    emit(dpr(AL, SUB, 0, 2, 2, 4, LSL, 5'd14));
    emit(dpr(AL, ADD, 0, 6, 3, 4, LSL, 5'd2));
    emit(ldst(1, 5, 6, 4, 0, 0));
    emit(ldst(1, 4, 6, 0));
    emit(dpr(AL, SUB, 0, 4, 4, 5));
    emit(mul(6, 4, 2));
    emit(dpr(AL, ADD, 0, 2, 5, 6, LSR, 5'd14));
    prog[after / 4] = br(CS, 0, after, here());
    emit(dpr(AL, ADD, 0, 0, 1, 2));
    emit(dpr(AL, MOV, 0, 15, 0, 14));       // return
    if (here() > TRAPCNT) $fatal(1, "program overlaps the ISR area");

    // interrupt / trap service routine at UR15 + 4
    while (here() < UR15 + 4) emit(32'h0);
    ldabs(0, 14, UR14);
    ldabs(0, 13, UR13);
    ldabs(1, 14, UR15);
    emit(dpi(AL, SUB, 0, 14, 14, 8'd12));   // address of abandoned instr
    emit(ldst(1, 13, 14, 0));
    emit(dpr(AL, MOV, 0, 13, 0, 13, LSR, 5'd25));
    emit(dpi(AL, AND, 0, 13, 13, 8'd7));
    emit(dpi(AL, CMP, 1, 0, 13, 8'd4));     // LDM/STM class?
    emit(dpi(EQ, ADD, 0, 14, 14, 8'd4));    // trap: skip it
    ldabs(1, 13, TRAPCNT, EQ);
    emit(dpi(EQ, ADD, 0, 13, 13, 8'd1));
    ldabs(0, 13, TRAPCNT, EQ);
    emit(dpi(NE, ADD, 0, 9, 9, 8'd1));      // interrupt count
    ldabs(0, 14, UR15);
    ldabs(1, 13, UR13);
    ldabs(1, 14, UR14);
    ldabs(1, 15, UR15);

    for (int i = 0; i < prog.size(); i++) ram.mem[i] = prog[i];
    for (int i = 0; i < lits.size(); i++) ram.mem[LITBASE / 4 + i] = lits[i];
    for (int i = 0; i < N; i++) begin
      ram.mem[VEC_A / 4 + i] = a[i];
      ram.mem[VEC_B / 4 + i] = b[i];
    end
    ram.mem[TRAPCNT / 4] = 0;
    for (int i = 0; i < SB_ENTRIES; i++) ram.mem[TABLE / 4 + i] = sb_entry(i);

    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ex_run = 1;
    n = 0;
    while (!halted && n < 20000) begin
      @(negedge clk);
      n++;
      if (n == 250 || n == 700) irq = 1;
      if (supervisor) irq = 0;
    end
    ex_run = 0;
    checks++;
    if (!halted) begin failures++; $display("FAIL processor did not halt"); end
    else mcount[M_HALT]++;

    // reference
    acc = 32'hC000_0000;
    exact = 0.0;
    for (int i = 0; i < N; i++) begin
      acc = lns_add_ref(a[i] + b[i], acc);
      exact += $pow(2.0, real'($signed(a[i] + b[i])) / 8388608.0);
    end
    exact = $ln(exact) / $ln(2.0) * 8388608.0;
    check("LADD dot product", ram.mem[RES / 4], acc);
    check("software dot product", ram.mem[RES / 4 + 1], acc);
    checks++;
    if ($signed(acc) - exact > 40.0 || $signed(acc) - exact < -40.0) begin
      failures++;
      $display("FAIL dot product accuracy: %0d vs %f", $signed(acc), exact);
    end
    check("MLA sum of squares", ram.mem[RES / 4 + 2], 32'd204);
    check("interrupts serviced", dut.u_core.u_rf.r[9], 2);
    check("traps serviced", ram.mem[TRAPCNT / 4], 1);
    check("MULS result", ram.mem[RES / 4 + 3], 32'd408);
    check("user mode at the end", 32'(supervisor), 0);

    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-22s %0d", mname[m], mcount[m]);
      checks++;
      if (mcount[m] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", mname[m]);
      end
    end
    $display("cycles to halt: %0d", n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end
endmodule
