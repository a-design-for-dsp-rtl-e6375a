// dsp_regs: working registers of the DSP processor.
//
// Holds the data of the instruction step in progress: the three signal
// samples S1, S2, S3 read from MEM1 (loaded together by ld_sig) and the
// result RES of the ALU (loaded by ld_res), which the control unit then
// writes to MEM2. All registers clear on the active-low reset. Loads take
// effect at the rising clock edge.
//
// Registers for temporary data during execution are part of the processor
// description; which registers there are, their load controls and the reset
// are this design's choices.
module dsp_regs
  import dsp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ld_sig,
  input  sample_t sig_in [3],
  input  logic    ld_res,
  input  result_t res_in,
  output sample_t s1,
  output sample_t s2,
  output sample_t s3,
  output result_t res
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1  <= '0;
      s2  <= '0;
      s3  <= '0;
      res <= '0;
    end else begin
      if (ld_sig) begin
        s1 <= sig_in[0];
        s2 <= sig_in[1];
        s3 <= sig_in[2];
      end
      if (ld_res) res <= res_in;
    end
  end

endmodule
