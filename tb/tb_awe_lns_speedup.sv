// tb_awe_lns_speedup -- the logarithmic-add benchmark: software routine
// against the LADD instruction, on the whole design at default parameters.
//
// A program walks a list of 48 operand pairs in memory. For each pair it
// computes the LNS sum twice: with LADD, and with the 14-instruction
// software interpolation routine (called with BL, returning by MOV PC,LR),
// and stores both results. The testbench times every LADD and every pass
// through the routine (from its first instruction to the instruction after
// its final ADD), checks both results against the reference and against
// the exact log2(2^x + 2^y), and reports the average cycle counts, the
// speedup and the additions per second at 25 MHz. Expected: 53 cycles in
// software and 21 or 22 for LADD when z lies inside the table, so a
// speedup near 2.5.
module tb_awe_lns_speedup;
  timeunit 1ns; timeprecision 10ps;
  import awe_asm_pkg::*;

  localparam logic [31:0] TABLE   = 32'h0001_0000;
  localparam int          LITBASE = 32'h600;
  localparam int          PAIRS   = 32'h1000;
  localparam int          RES     = 32'h2000;
  localparam int          NP      = 48;

  logic        clk = 0, rst_n = 0, irq = 0;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic        mem_we, supervisor, halted;
  logic [31:0] ex1_a, ex2_rdata;
  logic        ex1_s4, ex1_s6, ex2_s4, ex2_s6;
  int checks = 0, failures = 0, cyc = 0;

  awe_top dut (
    .clk, .rst_n, .irq, .mem_addr, .mem_wdata, .mem_we, .mem_rdata,
    .supervisor, .halted,
    .ex1_data1(32'd0), .ex1_data2(32'd0), .ex1_a, .ex1_s4, .ex1_s6,
    .ex2_addr1(4'd0), .ex2_addr2(4'd0), .ex2_data1(32'd0), .ex2_data2(32'd0),
    .ex2_raddr(4'd0), .ex2_rdata, .ex2_s4, .ex2_s6);
  awe_ram_model #(.WORDS_LOG2(19)) ram (
    .clk, .addr(mem_addr), .wdata(mem_wdata), .we(mem_we), .rdata(mem_rdata));

  always #5 clk = ~clk;

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

  // timing monitors
  int sw_start_addr, sw_end_addr, ladd_addr;
  int t_sw = -1, t_ladd = -1;
  int hw_in_sum = 0, hw_in_n = 0, sw_in_sum = 0, sw_in_n = 0;
  int hw_len [$], sw_len [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && int'(dut.u_core.state) == 0 && dut.u_core.v2) begin
      automatic int a = int'(dut.u_core.pc2);
      if (a == ladd_addr)     t_ladd = cyc;
      if (a == ladd_addr + 4 && t_ladd >= 0) begin hw_len.push_back(cyc - t_ladd); t_ladd = -1; end
      if (a == sw_start_addr) t_sw = cyc;
      if (a == sw_end_addr && t_sw >= 0) begin sw_len.push_back(cyc - t_sw); t_sw = -1; end
    end
  end

  initial begin
    logic [31:0] x [NP], y [NP];
    bit          in_table [NP];
    int          loop, swadd, after, n;
    real         err;

    for (int i = 0; i < NP; i++) begin
      x[i] = 32'($signed($urandom_range(0, 32'h2000_0000)) - 32'sh1000_0000);
      if (i % 8 == 7) y[i] = x[i] + 32'h1000_0000;               // beyond the table
      else y[i] = x[i] + 32'($signed($urandom_range(0, 32'h1800_0000)) - 32'sh0C00_0000);
      in_table[i] = ((($signed(x[i]) >= $signed(y[i])) ? x[i] - y[i] : y[i] - x[i]) < Z_LIMIT);
    end

    ldlit(8, PAIRS);
    ldlit(9, RES);
    emit(dpi(AL, MOV, 0, 7, 0, 8'(NP)));
    loop = here();
    emit(ldst(1, 1, 8, 4, 0, 0));             // x
    emit(ldst(1, 2, 8, 4, 0, 0));             // y
    emit(dpr(AL, MOV, 0, 10, 0, 1));
    emit(dpr(AL, MOV, 0, 11, 0, 2));
    ladd_addr = here();
    emit(ladd(12, 10, 11));
    emit(ldst(0, 12, 9, 4, 0, 0));            // store LADD result
    emit(32'h0);                              // BL swadd (patched)
    emit(ldst(0, 0, 9, 4, 0, 0));             // store software result
    emit(dpi(AL, SUB, 1, 7, 7, 8'd1));
    emit(br(NE, 0, here(), loop));
    emit(HALT);
    swadd = here();
    prog[(ladd_addr + 8) / 4] = br(AL, 1, ladd_addr + 8, swadd);
    ldlit(3, TABLE);
    sw_start_addr = here();
    emit(dpr(AL, SUB, 1, 2, 2, 1));
    emit(dpr(MI, ADD, 0, 1, 1, 2));
    emit(dpi(MI, RSB, 0, 2, 2, 8'd0));
    emit(dpi(AL, CMP, 1, 0, 2, 8'hCF, 4'd6));
    after = here();
    emit(32'h0);                              // BCS L (patched)
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
    sw_end_addr = here();
    emit(dpr(AL, MOV, 0, 15, 0, 14));

    for (int i = 0; i < prog.size(); i++) ram.mem[i] = prog[i];
    for (int i = 0; i < lits.size(); i++) ram.mem[LITBASE / 4 + i] = lits[i];
    for (int i = 0; i < NP; i++) begin
      ram.mem[PAIRS / 4 + 2 * i]     = x[i];
      ram.mem[PAIRS / 4 + 2 * i + 1] = y[i];
    end
    for (int i = 0; i < SB_ENTRIES; i++) ram.mem[TABLE / 4 + i] = sb_entry(i);

    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    n = 0;
    while (!halted && n < 100000) begin @(negedge clk); n++; end
    checks++;
    if (!halted) begin failures++; $display("FAIL did not halt"); end

    checks += 2;
    if (hw_len.size() != NP || sw_len.size() != NP) begin
      failures++;
      $display("FAIL timed %0d LADD and %0d software runs", hw_len.size(), sw_len.size());
    end else begin
      for (int i = 0; i < NP; i++) begin
        automatic bit swap = $signed(x[i]) < $signed(y[i]);
        automatic int hw_want = in_table[i] ? (swap ? 22 : 21) : (swap ? 4 : 3);
        automatic int sw_want = in_table[i] ? 53 : 8;
        check_int($sformatf("pair %0d LADD cycles", i), hw_len[i], hw_want);
        check_int($sformatf("pair %0d software cycles", i), sw_len[i], sw_want);
        if (in_table[i]) begin
          hw_in_sum += hw_len[i]; hw_in_n++;
          sw_in_sum += sw_len[i]; sw_in_n++;
        end
      end
    end
    for (int i = 0; i < NP; i++) begin
      check_int($sformatf("pair %0d LADD result", i), ram.mem[RES / 4 + 2 * i], lns_add_ref(x[i], y[i]));
      check_int($sformatf("pair %0d software result", i), ram.mem[RES / 4 + 2 * i + 1], lns_add_ref(x[i], y[i]));
      err = $signed(ram.mem[RES / 4 + 2 * i]) - lns_add_exact(x[i], y[i]);
      checks++;
      if (err > 4.0 || err < -4.0) begin
        failures++;
        $display("FAIL pair %0d accuracy error %f", i, err);
      end
    end
    if (hw_in_n > 0) begin
      real hw_avg, sw_avg;
      hw_avg = real'(hw_in_sum) / hw_in_n;
      sw_avg = real'(sw_in_sum) / sw_in_n;
      $display("inside the table: software %0.2f cycles, LADD %0.2f cycles, speedup %0.2f",
               sw_avg, hw_avg, sw_avg / hw_avg);
      $display("at 25 MHz: %0.2f million LADD additions/s", 25.0 / hw_avg);
      checks++;
      if (sw_avg / hw_avg < 2.4 || sw_avg / hw_avg > 2.53) begin
        failures++;
        $display("FAIL speedup outside 53/22 .. 53/21");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_int(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end
endmodule
