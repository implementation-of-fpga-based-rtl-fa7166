// awe_regfile -- the AWE general-purpose register file.
//
// Sixteen 32-bit registers, r[0]..r[15], with two asynchronous read ports
// and one synchronous write port. Reads and the write happen in the same
// execute cycle: an instruction reads its operands and writes its result
// at the clock edge that ends the cycle, so the next instruction sees the
// new value without forwarding. Entry 15 is only a staging register for a
// new program counter; the controller supplies the pipelined R15 value on
// reads itself. All registers clear on reset.
module awe_regfile #(
  parameter int unsigned NREGS = 16,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    ra_addr,
  output logic [WIDTH-1:0] ra_data,
  input  logic [AW-1:0]    rb_addr,
  output logic [WIDTH-1:0] rb_data,
  input  logic             we,
  input  logic [AW-1:0]    wa_addr,
  input  logic [WIDTH-1:0] wa_data
);

  logic [WIDTH-1:0] r [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) r[i] <= '0;
    end else if (we) begin
      r[wa_addr] <= wa_data;
    end
  end

  assign ra_data = r[ra_addr];
  assign rb_data = r[rb_addr];

endmodule
