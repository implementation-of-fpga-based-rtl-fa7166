// vito_regfile_example -- the register-file example of the implicit-style
// design flow: a memory written at different addresses in different
// states.
//
// A two-state one-hot controller (s4, s6, asynchronous reset into s4)
// alternates between writing data1 into r[addr1] and data2 into r[addr2].
// The data path is written as one clocked block holding both guarded
// writes, r[addr1] <= s4 ? data1 : r[addr1] and
// r[addr2] <= s6 ? data2 : r[addr2]; with non-blocking semantics only the
// write of the active state changes the array. This is the form that lets
// a register file with several write addresses, such as a processor's, be
// generated from a state machine. A read port (raddr, rdata) makes the
// contents visible. The array clears on reset (this design's choice).
module vito_regfile_example #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    addr1,
  input  logic [AW-1:0]    addr2,
  input  logic [WIDTH-1:0] data1,
  input  logic [WIDTH-1:0] data2,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  output logic             s4,
  output logic             s6
);

  logic [WIDTH-1:0] r [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s4 <= 1'b1;
      s6 <= 1'b0;
    end else begin
      s4 <= s6;
      s6 <= s4;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) r[i] <= '0;
    end else begin
      if (s4) r[addr1] <= data1;
      if (s6) r[addr2] <= data2;
    end
  end

  assign rdata = r[raddr];

endmodule
