// mem3_program: program memory MEM3 holding the instruction words.
//
// DEPTH words of IW bits. The host loads the program through the write port;
// the control unit fetches through a synchronous read port (rd_data valid one
// clock after rd_addr is presented with rd_en).
//
// A separate memory block MEM3 is part of the processor's block diagram; that
// it holds the program, and its size, width and ports, are this design's
// reading and choices.
module mem3_program #(
  parameter int IW    = 48,
  parameter int DEPTH = 256,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [IW-1:0] wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [IW-1:0] rd_data
);

  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
