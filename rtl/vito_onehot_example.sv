// vito_onehot_example -- the two-state example machine of the
// implicit-style design flow.
//
// An algorithm that loads register a from data1 in one clock and from
// data2 in the next, forever, is turned into a one-hot controller and a
// data path. The controller has one flip-flop per state (s4 and s6, named
// after the statements they come from); asynchronous reset puts the one
// in the starting state s4 and zero in the other. Each clock passes the
// one to the other flip-flop. The data path computes the next value of a
// as a chain of two-input multiplexers, new_a = s4 ? data1 : s6 ? data2 : a,
// and loads it at every clock edge. Register a clears on reset (this
// design's choice).
//
// Timing: after reset is released, the first clock loads data1, the
// second data2, and so on alternately.
module vito_onehot_example #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] data1,
  input  logic [WIDTH-1:0] data2,
  output logic [WIDTH-1:0] a,
  output logic             s4,
  output logic             s6
);

  logic [WIDTH-1:0] new_a;

  // One-hot controller.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s4 <= 1'b1;
      s6 <= 1'b0;
    end else begin
      s4 <= s6;
      s6 <= s4;
    end
  end

  // Data path: the multiplexer chain in front of register a.
  assign new_a = s4 ? data1 : (s6 ? data2 : a);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a <= '0;
    else        a <= new_a;
  end

endmodule
