// awe_top -- top level: the AWE processor with the LNS add instruction,
// and beside it the two small example machines of the implicit-style
// design flow.
//
// The processor's single memory port goes out to an external RAM that
// holds program, data and the s(z) interpolation table (32-bit words,
// asynchronous read, write on the clock edge when mem_we is high). irq
// requests an interrupt; supervisor and halted report the processor's
// mode and the halt (branch to itself). The example machines share clock
// and reset and have their own ports, prefixed ex1_ and ex2_; they are
// independent of the processor.
module awe_top
  import awe_pkg::*;
#(
  parameter bit          LNS_EN        = 1'b1,
  parameter logic [31:0] SB_TABLE_BASE = 32'h0001_0000,
  parameter logic [31:0] LNS_Z_LIMIT   = 32'h0CF0_0000,
  parameter logic [31:0] INT_SAVE_ADDR = 32'h0000_0100
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor
  input  logic        irq,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic        mem_we,
  input  logic [31:0] mem_rdata,
  output logic        supervisor,
  output logic        halted,
  // two-state one-hot example
  input  logic [31:0] ex1_data1,
  input  logic [31:0] ex1_data2,
  output logic [31:0] ex1_a,
  output logic        ex1_s4,
  output logic        ex1_s6,
  // register-file example
  input  logic [3:0]  ex2_addr1,
  input  logic [3:0]  ex2_addr2,
  input  logic [31:0] ex2_data1,
  input  logic [31:0] ex2_data2,
  input  logic [3:0]  ex2_raddr,
  output logic [31:0] ex2_rdata,
  output logic        ex2_s4,
  output logic        ex2_s6
);

  awe_core #(
    .LNS_EN(LNS_EN), .SB_TABLE_BASE(SB_TABLE_BASE),
    .LNS_Z_LIMIT(LNS_Z_LIMIT), .ZL_BITS(14), .INT_SAVE_ADDR(INT_SAVE_ADDR)
  ) u_core (
    .clk, .rst_n, .irq,
    .mem_addr, .mem_wdata, .mem_we, .mem_rdata,
    .supervisor, .halted
  );

  vito_onehot_example #(.WIDTH(32)) u_ex1 (
    .clk, .rst_n, .data1(ex1_data1), .data2(ex1_data2),
    .a(ex1_a), .s4(ex1_s4), .s6(ex1_s6)
  );

  vito_regfile_example #(.WIDTH(32), .DEPTH(16)) u_ex2 (
    .clk, .rst_n, .addr1(ex2_addr1), .addr2(ex2_addr2),
    .data1(ex2_data1), .data2(ex2_data2),
    .raddr(ex2_raddr), .rdata(ex2_rdata), .s4(ex2_s4), .s6(ex2_s6)
  );

endmodule
