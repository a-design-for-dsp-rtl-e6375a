// shifter: shifts signal one of an instruction by one binary place.
//
// When en is 0 the sample passes unchanged. When en is 1 it is shifted by one
// place: left (multiply by two, the top bit is lost) when left is 1, right
// (arithmetic, divide by two rounding towards minus infinity) when left is 0.
// Combinational.
//
// The one-place shift and the two opcode bits that control it (shift / no
// shift, right / left) follow the instruction set; arithmetic right shift
// and dropping the top bit on a left shift are this design's choices.
module shifter #(
  parameter int W = 16
) (
  input  logic [W-1:0] x,
  input  logic         en,
  input  logic         left,
  output logic [W-1:0] y
);

  always_comb begin
    if (!en)      y = x;
    else if (left) y = {x[W-2:0], 1'b0};
    else           y = {x[W-1], x[W-1:1]};
  end

endmodule
