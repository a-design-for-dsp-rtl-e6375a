// mitchell_mul: iterative Mitchell logarithmic multiplier for fixed-point
// samples.
//
// Mitchell's method approximates a product from the positions of the leading
// ones: with N1 = 2^k1 + r1 and N2 = 2^k2 + r2,
//   N1*N2 = 2^(k1+k2) + r1*2^k2 + r2*2^k1 + r1*r2.
// The first three terms need only a leading-one detector, shifts and adds;
// r1*r2 is the error term. The iterative form applies the same step to the
// residues r1, r2 again, ITERATIONS times in all, and stops early once one
// residue is zero. Each iteration removes the leading one of both residues,
// so ITERATIONS = W (16) gives the exact product; fewer iterations give a
// smaller, less exact unit (ITERATIONS = 1 is plain Mitchell).
//
// The operands are signed Q10.6 numbers. The unit multiplies magnitudes,
// drops the 6 surplus fraction bits of the product (truncating the magnitude)
// and applies the sign, giving a signed 32-bit Q26.6 result.
//
// Timing: purely combinational; the iterations are unrolled in hardware so
// that the ALU completes an instruction step in one clock.
//
// The use of an iteration-based Mitchell multiplier and the 6 fraction bits
// follow the processor description; signed handling, truncation, the
// unrolled structure and the default iteration count are this design's.
module mitchell_mul #(
  parameter int W          = 16,  // operand width
  parameter int FRAC       = 6,   // fraction bits of each operand
  parameter int RW         = 32,  // result width
  parameter int ITERATIONS = 16   // correction iterations, W = exact
) (
  input  logic signed [W-1:0]  a,
  input  logic signed [W-1:0]  b,
  output logic signed [RW-1:0] p
);

  localparam int KW = $clog2(W);

  // Position of the leading one (0 when x is 0; callers check for zero).
  function automatic logic [KW-1:0] lead_one(input logic [W-1:0] x);
    lead_one = '0;
    for (int i = 0; i < W; i++)
      if (x[i]) lead_one = KW'(i);
  endfunction

  logic [W-1:0]   mag_a, mag_b;
  logic           neg;
  logic [2*W-1:0] prod;    // unsigned product of magnitudes, 2*FRAC fraction bits
  logic [2*W-1:0] scaled;  // FRAC fraction bits

  always_comb begin
    logic [W-1:0]   n1, n2, r1, r2;
    logic [KW-1:0]  k1, k2;
    logic           live;

    mag_a = a[W-1] ? W'(-a) : W'(a);
    mag_b = b[W-1] ? W'(-b) : W'(b);
    neg   = a[W-1] ^ b[W-1];

    prod = '0;
    n1   = mag_a;
    n2   = mag_b;
    live = 1'b1;
    for (int it = 0; it < ITERATIONS; it++) begin
      if (n1 == '0 || n2 == '0) live = 1'b0;
      k1 = lead_one(n1);
      k2 = lead_one(n2);
      r1 = n1 & ~(W'(1) << k1);
      r2 = n2 & ~(W'(1) << k2);
      if (live) begin
        prod = prod + ((2*W)'(1) << (int'(k1) + int'(k2)))
                    + ((2*W)'(r1) << k2)
                    + ((2*W)'(r2) << k1);
        n1 = r1;
        n2 = r2;
      end
    end

    scaled = prod >> FRAC;
    p = neg ? -RW'(scaled) : RW'(scaled);
  end

endmodule
