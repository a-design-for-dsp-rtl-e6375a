// dsp_ref_pkg: reference arithmetic for the DSP processor testbenches.
//
// Computes the expected result of one instruction step with plain integer
// arithmetic, independently of the RTL: s1 is doubled (wrapping to 16 bits)
// or halved (rounding towards minus infinity), the product of two Q10.6
// numbers is |a|*|b| / 64 rounded towards zero with the sign applied, and
// the result wraps to 32 bits. mitchell_ref gives the product an
// iterative Mitchell multiplier with a limited number of iterations yields:
// after i iterations the remaining error is the product of the two
// operands with their i highest set bits removed.
package dsp_ref_pkg;

  function automatic logic signed [15:0] shift_ref(int op, logic signed [15:0] s1);
    longint v;
    v = longint'(s1);
    if ((op & 8) != 0) begin
      if ((op & 4) != 0) begin
        v = v * 2;
        v = v & 64'hFFFF;
        if (v >= 32768) v = v - 65536;
      end else begin
        if (v < 0) v = (v - 1) / 2;
        else       v = v / 2;
      end
    end
    return 16'(v);
  endfunction

  function automatic longint strip_top(longint x, int n);
    longint v;
    int     left;
    v = x;
    left = n;
    for (int b = 16; b >= 0; b--)
      if (left > 0 && ((v >> b) & 1) == 1) begin
        v = v - (longint'(1) << b);
        left--;
      end
    return v;
  endfunction

  function automatic longint mul_ref(logic signed [15:0] a, logic signed [15:0] b, int iters);
    longint ma, mb, m;
    ma = a < 0 ? -longint'(a) : longint'(a);
    mb = b < 0 ? -longint'(b) : longint'(b);
    m  = ma * mb - strip_top(ma, iters) * strip_top(mb, iters);
    m  = m / 64;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  // Expected 32-bit result of opcode op on samples s1, s2, s3 (signed).
  function automatic logic [31:0] step_ref(int op, logic signed [15:0] s1, logic signed [15:0] s2,
                                           logic signed [15:0] s3, int iters);
    logic signed [15:0] a;
    longint r;
    a = shift_ref(op, s1);
    if ((op & 'h40) != 0) begin
      r = mul_ref(a, s2, iters);
      if ((op & 'h20) != 0) r = r + longint'(s3);
      if ((op & 'h10) != 0) r = r - longint'(s3);
    end else if ((op & 'h20) != 0) r = longint'(a) + longint'(s2);
    else if ((op & 'h10) != 0)     r = longint'(a) - longint'(s2);
    else                           r = longint'(a);
    return r[31:0];
  endfunction

  // The upper six bits of the 17 instructions.
  localparam int OPCODES [17] = '{32'h40, 32'hE0, 32'hD0, 32'h48, 32'h4C, 32'h20, 32'h28, 32'h2C,
                                  32'h10, 32'h18, 32'h1C, 32'h08, 32'h0C, 32'hE8, 32'hEC, 32'hD8, 32'hDC};

  // A random signed 16-bit sample, often small so that products stay readable.
  function automatic logic [15:0] rand_sample();
    case ($urandom_range(0, 3))
      0:       return 16'($urandom);
      1:       return 16'($signed($urandom_range(0, 2000)) - 1000);
      2:       return 16'($urandom_range(0, 255) << 6);
      default: return 16'($signed($urandom_range(0, 64)) - 32);
    endcase
  endfunction

endpackage
