// awe_core -- the AWE processor: a 3-stage pipelined ARM-subset RISC with
// a logarithmic-number-system (LNS) add instruction.
//
// Pipeline. Fetch (instruction read at pc into ir1), decode (ir1) and
// execute (ir2). The execute stage reads its register operands and writes
// its result in the same cycle, so a result is visible to the very next
// instruction without forwarding. Reading R15 gives the address of the
// executing instruction plus 8, as on the ARM. The register file's entry
// 15 is not the program counter: an instruction that writes R15 writes
// that entry, and an extra state then copies it into pc and refills the
// pipeline.
//
// One memory port serves fetches and data (Princeton organisation), with
// asynchronous read: mem_rdata is the word at mem_addr in the same cycle;
// a write happens at the clock edge when mem_we is high. The port carries
// byte addresses of 32-bit words (bits [1:0] are ignored).
//
// Instructions executed in hardware and their execute-stage cycles:
//   data processing (16 ops, immediate or constant shift)   1
//   condition false / pipeline bubble                       1
//   B taken                                                 3 (1 + refill)
//   BL                                                      4 (link + 3)
//   LDR / STR, 12-bit offset, pre/post-index, writeback     3
//   any write to R15                                        +1 + refill
//   MUL, MLA (32 shift-add steps, MLA inserts an ADD)       36
//   LADD  Rd, Rx, Ry  (coprocessor group, LNS_EN=1)         21 or 22
// Everything else (register-specified shifts, register offsets, byte
// transfers, multi-register transfers, swap, status-register moves, SWI,
// coprocessor instructions other than LADD) traps in user mode and is a
// no-op in supervisor mode. The halt is the branch to itself, 0xEAFFFFFE.
//
// Supervisor mode (PDP-8 style). In user mode, an interrupt (irq high) or
// a trapping instruction abandons the instruction in execute, stores its
// address plus 12 at INT_SAVE_ADDR, enters supervisor mode and continues
// from INT_SAVE_ADDR + 4. Neither can happen in supervisor mode. An LDR
// into R15 leaves supervisor mode, so "LDR R15,[R15,#-x]" pointing at the
// saved word returns to user code once software has fixed the address.
// The N, Z, C, V bits are not part of the saved word: this design keeps
// the user's flags in an internal register on entry and restores them on
// that return, so a service routine may use flag-setting instructions.
//
// LADD Rd, Rx, Ry (bits [27:24] = 1110, bit 4 = 0, bits [11:5] = 0) forms
// the LNS sum log2(2^x + 2^y) of two 32-bit two's-complement logarithms
// with 23 fraction bits, by linear (Lagrange) interpolation of
// s(z) = log2(1 + 2^z) from a table of 32-bit words in memory at
// SB_TABLE_BASE, one entry per 2^-9 step of z. Its states reuse the ALU,
// the multiplier, the memory port and the register file:
//   L0  ALU runs a never-executed SUB Rx-Ry (cond 1111): z, min, max
//   L1  only if z<0: never-executed RSB gives z = Ry-Rx, roles swap
//   L2  z >= LNS_Z_LIMIT: Rd = max, done; else address of s(zH), and the
//       multiplier takes zL (the low ZL_BITS bits of z)
//   L3  read s(zH)
//   L4  read s(zH+1) while max register := min + s(zH) (scratchpad)
//   L5  slope c = s(zH+1) - s(zH) into the multiplier
//   14 multiplier steps, then Rd = scratch + (c*zL >> ZL_BITS), resume.
// As in the original design, Rd must differ from Rx and Ry, and the
// register holding the larger operand is overwritten as a scratchpad.
module awe_core
  import awe_pkg::*;
#(
  parameter bit          LNS_EN        = 1'b1,
  parameter logic [31:0] SB_TABLE_BASE = 32'h0001_0000,
  parameter logic [31:0] LNS_Z_LIMIT   = 32'h0CF0_0000,
  parameter int unsigned ZL_BITS       = 14,
  parameter logic [31:0] INT_SAVE_ADDR = 32'h0000_0100,
  parameter logic [31:0] RESET_PC      = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        irq,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic        mem_we,
  input  logic [31:0] mem_rdata,
  output logic        supervisor,
  output logic        halted
);

  typedef enum logic [4:0] {
    S_RUN, S_MEM, S_LDST_END, S_BRANCH, S_PCLOAD, S_INT, S_HALT,
    S_MUL_LOADM, S_MUL_RUN, S_MUL_WB, S_RESUME,
    S_L_SWAP, S_L_ADDR, S_L_LD0, S_L_LD1, S_L_SLOPE, S_L_MUL, S_L_FINAL
  } state_e;

  state_e      state, state_n;
  logic [31:0] pc, pc1, pc2;
  logic [31:0] ir1, ir2;
  logic        v1, v2;
  flags_t      flags;
  flags_t      uflags;      // user flags kept across a supervisor episode
  logic        sup;
  logic [31:0] mar, mdr, z, t;
  logic [3:0]  minreg, maxreg;
  logic        mla_add;     // ir2 holds the ADD inserted after an MLA

  // ---------------------------------------------------------------------
  // Decode of the execute-stage instruction
  // ---------------------------------------------------------------------
  logic is_mul, is_dp, is_ldst, is_branch, is_ladd, is_unimpl;
  logic cond_pass;
  logic [31:0] exec_ir;
  logic [31:0] br_target;
  logic ldst_wb, ldst_load;

  always_comb begin
    is_mul    = (ir2[27:22] == 6'b000000) && (ir2[7:4] == 4'b1001);
    is_dp     = (ir2[27:26] == 2'b00) && !is_mul
                && !(ir2[25] == 1'b0 && ir2[4] == 1'b1)
                && !(op_is_test(alu_op_e'(ir2[24:21])) && !ir2[20]);
    is_ldst   = (ir2[27:26] == 2'b01) && !ir2[25] && !ir2[22];
    is_branch = (ir2[27:25] == 3'b101);
    is_ladd   = LNS_EN && (ir2[27:24] == 4'b1110) && !ir2[4];
    is_unimpl = !(is_mul || is_dp || is_ldst || is_branch || is_ladd);
    ldst_load = ir2[20];
    ldst_wb   = !ir2[24] || ir2[21];
    br_target = pc2 + 32'd8 + {{6{ir2[23]}}, ir2[23:0], 2'b00};
    // In its first execute cycle LADD is presented to the data path as a
    // never-executed SUB of its two source registers.
    exec_ir   = (state == S_RUN && is_ladd)
                ? {4'hF, 8'h05, ir2[19:12], 8'h00, ir2[3:0]} : ir2;
  end

  awe_cond u_cond (.cond(cond_e'(ir2[31:28])), .flags(flags), .pass(cond_pass));

  // ---------------------------------------------------------------------
  // Register file, shifter, ALU, multiplier
  // ---------------------------------------------------------------------
  logic [3:0]  ra_addr, rb_addr, wa_addr;
  logic [31:0] ra_raw, rb_raw, ra_val, rb_val, wa_data;
  logic        rf_we;

  awe_regfile u_rf (
    .clk, .rst_n,
    .ra_addr, .ra_data(ra_raw),
    .rb_addr, .rb_data(rb_raw),
    .we(rf_we), .wa_addr, .wa_data
  );

  // R15 reads as the executing instruction's address + 8, except when the
  // staged new program counter is copied out.
  assign ra_val = (ra_addr == 4'd15 && state != S_PCLOAD) ? pc2 + 32'd8 : ra_raw;
  assign rb_val = (rb_addr == 4'd15) ? pc2 + 32'd8 : rb_raw;

  logic [31:0] sh_result;
  logic        sh_carry;
  awe_shifter u_sh (
    .imm(exec_ir[25]), .operand2(exec_ir[11:0]), .rm_value(rb_val),
    .carry_in(flags.c), .result(sh_result), .carry_out(sh_carry)
  );

  alu_op_e     alu_op;
  logic [31:0] alu_a, alu_b, alu_y;
  flags_t      alu_f;
  awe_alu u_alu (
    .op(alu_op), .a(alu_a), .b(alu_b), .flags_in(flags),
    .shift_carry(sh_carry), .result(alu_y), .flags_out(alu_f)
  );

  logic        mul_load_a, mul_load_b, mul_busy, mul_last;
  logic [31:0] mul_a, mul_b, mul_p;
  logic [5:0]  mul_steps;
  awe_multiplier #(.WIDTH(32)) u_mul (
    .clk, .rst_n,
    .load_b(mul_load_b), .b_in(mul_b),
    .load_a(mul_load_a), .a_in(mul_a), .steps(mul_steps),
    .busy(mul_busy), .last(mul_last), .product(mul_p)
  );

  // ---------------------------------------------------------------------
  // Control: next state and data-path steering
  // ---------------------------------------------------------------------
  logic take_int, go, advance, flush, set_flags, z_big;
  logic [31:0] flush_pc;
  logic [31:0] mul_inject;

  assign z_big      = (z >= LNS_Z_LIMIT);
  // ADD{S} Rd, Rn, <product>: the second operand is taken from the
  // multiplier, so Rn may be the same register as Rd.
  assign mul_inject = {4'hE, 3'b000, 4'b0100, ir2[20], ir2[15:12], ir2[19:16],
                       8'h00, 4'd0};

  always_comb begin
    state_n    = state;
    take_int   = 1'b0;
    go         = 1'b0;
    advance    = 1'b0;
    flush      = 1'b0;
    flush_pc   = pc;
    set_flags  = 1'b0;
    ra_addr    = exec_ir[19:16];
    rb_addr    = exec_ir[3:0];
    rf_we      = 1'b0;
    wa_addr    = exec_ir[15:12];
    wa_data    = alu_y;
    alu_op     = alu_op_e'(exec_ir[24:21]);
    alu_a      = ra_val;
    alu_b      = sh_result;
    mem_addr   = pc;
    mem_we     = 1'b0;
    mem_wdata  = rb_val;
    mul_load_a = 1'b0;
    mul_load_b = 1'b0;
    mul_a      = alu_y;
    mul_b      = ra_val;
    mul_steps  = 6'd32;

    unique case (state)
      S_RUN: begin
        if (!v2) begin
          advance = 1'b1;                         // bubble
        end else if (irq && !sup) begin
          take_int = 1'b1;
          state_n  = S_INT;
        end else if (ir2 == HALT_INSTR) begin
          state_n = S_HALT;
        end else if (!cond_pass) begin
          advance = 1'b1;
        end else if (is_unimpl) begin
          if (!sup) begin
            take_int = 1'b1;
            state_n  = S_INT;
          end else begin
            advance = 1'b1;
          end
        end else begin
          go = 1'b1;
          if (is_dp) begin
            if (mla_add) alu_b = mul_p;
            rf_we     = !op_is_test(alu_op_e'(ir2[24:21]));
            set_flags = ir2[20];
            if (rf_we && ir2[15:12] == 4'd15) state_n = S_PCLOAD;
            else advance = 1'b1;
          end else if (is_ldst) begin
            alu_op  = ir2[23] ? OP_ADD : OP_SUB;
            alu_b   = {20'd0, ir2[11:0]};
            rf_we   = ldst_wb;
            wa_addr = ir2[19:16];
            state_n = S_MEM;
          end else if (is_branch) begin
            if (ir2[24]) begin
              rf_we   = 1'b1;
              wa_addr = 4'd14;
              wa_data = pc2 + 32'd4;
              state_n = S_BRANCH;
            end else begin
              flush    = 1'b1;
              flush_pc = br_target;
            end
          end else if (is_mul) begin
            ra_addr    = ir2[11:8];
            mul_b      = ra_val;
            mul_load_b = 1'b1;
            state_n    = S_MUL_LOADM;
          end else begin                          // LADD, step L0
            state_n = alu_y[31] ? S_L_SWAP : S_L_ADDR;
          end
        end
      end

      S_MEM: begin
        mem_addr = mar;
        rb_addr  = ir2[15:12];
        mem_we   = !ldst_load;
        state_n  = S_LDST_END;
      end

      S_LDST_END: begin
        if (ldst_load) begin
          rf_we   = 1'b1;
          wa_addr = ir2[15:12];
          wa_data = mdr;
          if (ir2[15:12] == 4'd15) state_n = S_PCLOAD;
          else begin advance = 1'b1; state_n = S_RUN; end
        end else begin
          advance = 1'b1;
          state_n = S_RUN;
        end
      end

      S_BRANCH: begin
        flush    = 1'b1;
        flush_pc = br_target;
        state_n  = S_RUN;
      end

      S_PCLOAD: begin
        ra_addr  = 4'd15;
        flush    = 1'b1;
        flush_pc = ra_val;
        state_n  = S_RUN;
      end

      S_INT: begin
        mem_addr  = INT_SAVE_ADDR;
        mem_we    = 1'b1;
        mem_wdata = pc2 + 32'd12;
        flush     = 1'b1;
        flush_pc  = INT_SAVE_ADDR + 32'd4;
        state_n   = S_RUN;
      end

      S_HALT: ;

      S_MUL_LOADM: begin
        rb_addr    = ir2[3:0];
        mul_a      = rb_val;
        mul_steps  = 6'd32;
        mul_load_a = 1'b1;
        state_n    = S_MUL_RUN;
      end

      S_MUL_RUN: if (mul_last) state_n = S_MUL_WB;

      S_MUL_WB: begin
        rf_we   = !ir2[21];                       // MLA: the ADD writes Rd
        wa_addr = ir2[19:16];
        wa_data = mul_p;
        state_n = ir2[21] ? S_RUN : S_RESUME;     // MLA continues with ADD
      end

      S_RESUME: begin
        advance = 1'b1;
        state_n = S_RUN;
      end

      S_L_SWAP: state_n = S_L_ADDR;               // ALU runs the RSB in ir2

      S_L_ADDR: begin
        if (z_big) begin
          ra_addr = maxreg;
          rf_we   = 1'b1;
          wa_addr = ir2[15:12];
          wa_data = ra_val;
          state_n = S_RESUME;
        end else begin
          alu_op     = OP_ADD;
          alu_a      = SB_TABLE_BASE;
          alu_b      = 32'({z[31:ZL_BITS], 2'b00});
          mul_b      = 32'(z[ZL_BITS-1:0]);
          mul_load_b = 1'b1;
          state_n    = S_L_LD0;
        end
      end

      S_L_LD0: begin
        mem_addr = mar;
        state_n  = S_L_LD1;
      end

      S_L_LD1: begin
        mem_addr = mar + 32'd4;
        ra_addr  = minreg;
        alu_op   = OP_ADD;
        alu_a    = ra_val;
        alu_b    = t;
        rf_we    = 1'b1;
        wa_addr  = maxreg;
        state_n  = S_L_SLOPE;
      end

      S_L_SLOPE: begin
        alu_op     = OP_SUB;
        alu_a      = mdr;
        alu_b      = t;
        mul_a      = alu_y;
        mul_steps  = 6'(ZL_BITS);
        mul_load_a = 1'b1;
        state_n    = S_L_MUL;
      end

      S_L_MUL: if (mul_last) state_n = S_L_FINAL;

      S_L_FINAL: begin
        ra_addr = maxreg;
        alu_op  = OP_ADD;
        alu_a   = ra_val;
        alu_b   = mul_p >> ZL_BITS;
        rf_we   = 1'b1;
        wa_addr = ir2[15:12];
        state_n = S_RESUME;
      end

      default: state_n = S_RUN;
    endcase

    if (flush) state_n = S_RUN;
  end

  // ---------------------------------------------------------------------
  // Registers
  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_RUN;
      pc     <= RESET_PC;
      pc1    <= '0;
      pc2    <= '0;
      ir1    <= '0;
      ir2    <= '0;
      v1     <= 1'b0;
      v2     <= 1'b0;
      flags  <= '0;
      uflags <= '0;
      sup    <= 1'b0;
      mar    <= '0;
      mdr    <= '0;
      z      <= '0;
      t      <= '0;
      minreg <= '0;
      maxreg <= '0;
      mla_add <= 1'b0;
    end else begin
      state <= state_n;

      if (flush) begin
        pc <= flush_pc;
        v1 <= 1'b0;
        v2 <= 1'b0;
      end else if (advance) begin
        ir2 <= ir1;
        v2  <= v1;
        pc2 <= pc1;
        ir1 <= mem_rdata;
        v1  <= 1'b1;
        pc1 <= pc;
        pc  <= pc + 32'd4;
      end

      if (set_flags) flags <= alu_f;

      if (state == S_MUL_WB && ir2[21]) mla_add <= 1'b1;
      else if (state == S_RUN)           mla_add <= 1'b0;

      if (take_int) begin
        sup    <= 1'b1;
        uflags <= flags;
      end
      if (state == S_PCLOAD && ir2[27:26] == 2'b01 && sup) begin
        sup   <= 1'b0;
        flags <= uflags;
      end

      unique case (state)
        S_RUN: if (go) begin
          if (is_ldst) mar <= ir2[24] ? alu_y : ra_val;
          if (is_ladd) begin
            z      <= alu_y;
            minreg <= ir2[3:0];
            maxreg <= ir2[19:16];
            ir2    <= {4'hF, 8'h06, ir2[19:12], 8'h00, ir2[3:0]};
          end
        end
        S_MEM:    mdr <= mem_rdata;
        S_MUL_WB: begin
          if (ir2[20] && !ir2[21]) begin
            flags.n <= mul_p[31];
            flags.z <= (mul_p == 32'd0);
          end
          if (ir2[21]) ir2 <= mul_inject;
        end
        S_L_SWAP: begin
          z      <= alu_y;
          minreg <= ir2[19:16];
          maxreg <= ir2[3:0];
        end
        S_L_ADDR: mar <= alu_y;
        S_L_LD0:  t   <= mem_rdata;
        S_L_LD1:  mdr <= mem_rdata;
        default: ;
      endcase
    end
  end

  // The multiply states wait on the multiplier; it must be running.
  a_mul_running: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_MUL_RUN || state == S_L_MUL) |-> mul_busy);
  // A fetch never coincides with a data access on the single memory port.
  a_one_port: assert property (@(posedge clk) disable iff (!rst_n)
    advance |-> (mem_addr == pc && !mem_we));

  assign supervisor = sup;
  assign halted     = (state == S_HALT);

endmodule
