// awe_ram_model -- behavioural model of the processor's external RAM.
//
// A single-port memory of 2^WORDS_LOG2 32-bit words (2^19 words = 2 MB by
// default, the capacity of the board RAM the processor was built for).
// Reads are asynchronous: rdata is the word at addr in the same cycle.
// A write takes place at the rising clock edge when we is high. Byte
// address bits [1:0] are ignored. Not synthesizable by intent: a
// testbench fills mem[] directly before releasing reset.
module awe_ram_model #(
  parameter int unsigned WORDS_LOG2 = 19
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic        we,
  output logic [31:0] rdata
);

  logic [31:0] mem [2**WORDS_LOG2];

  always_ff @(posedge clk) begin
    if (we) mem[addr[WORDS_LOG2+1:2]] <= wdata;
  end

  assign rdata = mem[addr[WORDS_LOG2+1:2]];

endmodule
