// addsub: two's-complement adder-subtractor of the ALU.
//
// y = a + b when sub is 0, y = a - b when sub is 1. Subtraction adds the
// inverted b with a carry-in of one, so one adder serves both; the result
// wraps to W bits. Combinational.
//
// An adder-subtractor unit is part of the processor's ALU; its width (the
// 32-bit result width) is this design's choice. No overflow flag is needed:
// in the ALU the operands are at most 2^24 in magnitude.
module addsub #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y
);

  logic [W-1:0] b_eff;

  always_comb begin
    b_eff = sub ? ~b : b;
    y     = a + b_eff + W'(sub);
  end

endmodule
