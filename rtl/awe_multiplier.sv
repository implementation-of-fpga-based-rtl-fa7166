// awe_multiplier -- sequential shift-and-add multiplier.
//
// Forms the low WIDTH bits of an unsigned product one multiplier bit per
// clock, with no early exit (a test of the remaining multiplier bits would
// lengthen the cycle). It is shared by MUL/MLA, which run all 32 steps, and
// by the logarithmic add, which multiplies the interpolation slope by the
// 14-bit low part of z and so stops after 14 steps.
//
// Interface and timing:
//   load_b  : loads the multiplier shift register from b_in and clears the
//             accumulator (may come any cycle before load_a).
//   load_a  : loads the multiplicand from a_in and starts `steps` steps.
//   The steps happen in the `steps` cycles after load_a; `last` is high
//   in the cycle of the final step and `product` is valid the cycle after.
//   busy is high while steps remain.
module awe_multiplier #(
  parameter int unsigned WIDTH = 32,
  localparam int unsigned CW   = $clog2(WIDTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_b,
  input  logic [WIDTH-1:0] b_in,
  input  logic             load_a,
  input  logic [WIDTH-1:0] a_in,
  input  logic [CW-1:0]    steps,
  output logic             busy,
  output logic             last,
  output logic [WIDTH-1:0] product
);

  logic [WIDTH-1:0] mcand, mplier, acc;
  logic [CW-1:0]    count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcand  <= '0;
      mplier <= '0;
      acc    <= '0;
      count  <= '0;
    end else begin
      if (load_b) begin
        mplier <= b_in;
        acc    <= '0;
      end
      if (load_a) begin
        mcand <= a_in;
        count <= steps;
      end else if (count != '0) begin
        if (mplier[0]) acc <= acc + mcand;
        mcand  <= mcand << 1;
        mplier <= mplier >> 1;
        count  <= count - 1'b1;
      end
    end
  end

  assign busy    = (count != '0);
  assign last    = (count == CW'(1));
  assign product = acc;

endmodule
