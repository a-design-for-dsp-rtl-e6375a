// mem1_signals: signal memory MEM1, three banks MEM1-1, MEM1-2 and MEM1-3.
//
// Each bank holds one input signal as DEPTH samples of DATA_W bits, and the
// three banks have separate read ports so that one sample of each signal is
// read in the same clock. Reads are synchronous: rd_data[i] shows the word at
// rd_addr[i] one clock after the address is presented (when rd_en is 1).
// A single host write port loads samples: wr_en writes wr_data at wr_addr
// into bank wr_bank (0..2).
//
// Three independently readable signal banks follow the processor
// description; the depth, the read latency and the host write port are
// this design's choices.
module mem1_signals #(
  parameter int DATA_W = 16,
  parameter int DEPTH  = 256,
  parameter int AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  // host write port
  input  logic              wr_en,
  input  logic [1:0]        wr_bank,
  input  logic [AW-1:0]     wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  // control-unit read ports, one per bank
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr [3],
  output logic [DATA_W-1:0] rd_data [3]
);

  logic [DATA_W-1:0] bank0 [DEPTH];
  logic [DATA_W-1:0] bank1 [DEPTH];
  logic [DATA_W-1:0] bank2 [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && wr_bank == 2'd0) bank0[wr_addr] <= wr_data;
    if (wr_en && wr_bank == 2'd1) bank1[wr_addr] <= wr_data;
    if (wr_en && wr_bank == 2'd2) bank2[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_data[0] <= bank0[rd_addr[0]];
      rd_data[1] <= bank1[rd_addr[1]];
      rd_data[2] <= bank2[rd_addr[2]];
    end
  end

endmodule
