// mem2_results: result memory MEM2, split into MEM2-1 (LSB half) and MEM2-2
// (MSB half).
//
// A 32-bit result is too wide for one 16-bit word, so each result is stored
// as two words at the same address: bits [HALF_W-1:0] in the LSB bank and
// bits [2*HALF_W-1:HALF_W] in the MSB bank. The control unit writes a whole
// result with wr_en; the host reads both halves back through a synchronous
// read port (rd_lsb / rd_msb valid one clock after rd_addr; a read in
// the clock of a write to the same address returns the old word).
//
// The LSB/MSB split follows the processor description; the depth, the host
// read port and its latency are this design's choices.
module mem2_results #(
  parameter int HALF_W = 16,
  parameter int DEPTH  = 256,
  parameter int AW     = $clog2(DEPTH)
) (
  input  logic                clk,
  // control-unit write port
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_addr,
  input  logic [2*HALF_W-1:0] wr_data,
  // host read port
  input  logic [AW-1:0]       rd_addr,
  output logic [HALF_W-1:0]   rd_lsb,
  output logic [HALF_W-1:0]   rd_msb
);

  logic [HALF_W-1:0] lsb_bank [DEPTH];  // MEM2-1
  logic [HALF_W-1:0] msb_bank [DEPTH];  // MEM2-2

  always_ff @(posedge clk) begin
    if (wr_en) begin
      lsb_bank[wr_addr] <= wr_data[HALF_W-1:0];
      msb_bank[wr_addr] <= wr_data[2*HALF_W-1:HALF_W];
    end
    rd_lsb <= lsb_bank[rd_addr];
    rd_msb <= msb_bank[rd_addr];
  end

endmodule
