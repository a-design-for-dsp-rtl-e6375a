// alu: arithmetic unit of the DSP processor.
//
// The ALU holds a shifter, an iterative Mitchell multiplier and an
// adder-subtractor and is steered directly by the opcode bits, with no
// further decoding: [6] multiply, [5] add, [4] subtract, [3] shift signal one,
// [2] shift left (1) or right (0); bit [7] marks the combined (multiply and
// add/subtract) instructions. With s1, s2, s3 the three signal samples and
// s1' = s1 after the optional one-place shift:
//   multiply only          res = s1' * s2
//   multiply and add/sub   res = s1' * s2 +/- s3
//   add/sub only           res = s1' +/- s2
//   shift only             res = s1'
// Samples are signed Q10.6; res is signed Q26.6 (32 bits), wide enough
// that no result can overflow. Combinational: one instruction step per
// clock of the control unit.
//
// The three units, the opcode bit meanings and the 17 instructions follow the
// processor's instruction set. Which signal each unit reads (s1 is the one
// shifted, s3 the one added to a product) and the number formats are this
// design's reading of the mnemonics.
module alu
  import dsp_pkg::*;
#(
  parameter int MUL_ITERATIONS = 16
) (
  input  opcode_t op,
  input  sample_t s1,
  input  sample_t s2,
  input  sample_t s3,
  output result_t res
);

  sample_t s1_sh;
  result_t prod, as_a, as_b, as_y;

  shifter #(.W(DATA_W)) u_shift (
    .x(s1), .en(op[OP_SHEN]), .left(op[OP_SHL]), .y(s1_sh)
  );

  mitchell_mul #(.W(DATA_W), .FRAC(FRAC_W), .RW(RES_W), .ITERATIONS(MUL_ITERATIONS)) u_mul (
    .a(s1_sh), .b(s2), .p(prod)
  );

  addsub #(.W(RES_W)) u_addsub (
    .a(as_a), .b(as_b), .sub(op[OP_SUB]), .y(as_y)
  );

  always_comb begin
    if (op[OP_MUL]) begin
      as_a = prod;
      as_b = RES_W'(signed'(s3));
    end else begin
      as_a = RES_W'(signed'(s1_sh));
      as_b = RES_W'(signed'(s2));
    end

    if (op[OP_ADD] || op[OP_SUB]) res = as_y;
    else if (op[OP_MUL])          res = prod;
    else                          res = RES_W'(signed'(s1_sh));
  end

endmodule
