// dsp_top: 16-bit RISC-style DSP processor for transform kernels.
//
// The processor applies one arithmetic operation elementwise to stored
// signals. Three input signals live in the three banks of MEM1, results in
// the LSB and MSB banks of MEM2, the program in MEM3. Each instruction names
// an opcode, a length and four start addresses; the FSM control unit (dsp_cu)
// steps through the samples, the registers (dsp_regs) hold one sample of each
// signal and the result, and the ALU (shifter, iterative Mitchell multiplier,
// adder-subtractor) computes e.g. s1*s2 + s3 in one clock per sample.
//
// Use: with start low, load signals through the sig_wr_* port and the program
// through prog_wr_*; raise start; wait for done (error tells whether the
// program stopped on an illegal opcode); drop start; read results through
// res_rd_addr (res_rd_lsb/res_rd_msb one clock later). An instruction of len
// samples takes 2 + 4*len clocks.
//
// Samples are signed Q10.6 fixed point, results signed Q26.6 in 32 bits. The
// partition into CU, registers, ALU and three memories follows the processor
// description; the host ports and the number conventions are this design's.
module dsp_top
  import dsp_pkg::*;
#(
  parameter int MUL_ITERATIONS = 16,
  parameter int MEM_DEPTH      = 2**ADDR_W
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  output logic    busy,
  output logic    done,
  output logic    error,
  // program load
  input  logic    prog_wr_en,
  input  addr_t   prog_wr_addr,
  input  instr_t  prog_wr_data,
  // signal load
  input  logic    sig_wr_en,
  input  logic [1:0] sig_wr_bank,
  input  addr_t   sig_wr_addr,
  input  sample_t sig_wr_data,
  // result read-back
  input  addr_t   res_rd_addr,
  output sample_t res_rd_lsb,
  output sample_t res_rd_msb
);

  logic    prog_rd_en, sig_rd_en, ld_sig, ld_res, res_wr_en;
  addr_t   prog_addr, res_addr;
  addr_t   sig_addr [3];
  instr_t  prog_data;
  sample_t sig_data [3];
  opcode_t alu_op;
  sample_t s1, s2, s3;
  result_t alu_res, res;

  dsp_cu u_cu (
    .clk, .rst_n, .start, .busy, .done, .error,
    .prog_rd_en, .prog_addr, .prog_data,
    .sig_rd_en, .sig_addr,
    .ld_sig, .ld_res,
    .alu_op,
    .res_wr_en, .res_addr
  );

  mem3_program #(.IW(IW), .DEPTH(MEM_DEPTH), .AW(ADDR_W)) u_mem3 (
    .clk,
    .wr_en(prog_wr_en), .wr_addr(prog_wr_addr), .wr_data(prog_wr_data),
    .rd_en(prog_rd_en), .rd_addr(prog_addr), .rd_data(prog_data)
  );

  mem1_signals #(.DATA_W(DATA_W), .DEPTH(MEM_DEPTH), .AW(ADDR_W)) u_mem1 (
    .clk,
    .wr_en(sig_wr_en), .wr_bank(sig_wr_bank), .wr_addr(sig_wr_addr), .wr_data(sig_wr_data),
    .rd_en(sig_rd_en), .rd_addr(sig_addr), .rd_data(sig_data)
  );

  dsp_regs u_regs (
    .clk, .rst_n,
    .ld_sig, .sig_in(sig_data),
    .ld_res, .res_in(alu_res),
    .s1, .s2, .s3, .res
  );

  alu #(.MUL_ITERATIONS(MUL_ITERATIONS)) u_alu (
    .op(alu_op), .s1, .s2, .s3, .res(alu_res)
  );

  mem2_results #(.HALF_W(DATA_W), .DEPTH(MEM_DEPTH), .AW(ADDR_W)) u_mem2 (
    .clk,
    .wr_en(res_wr_en), .wr_addr(res_addr), .wr_data(res),
    .rd_addr(res_rd_addr), .rd_lsb(res_rd_lsb), .rd_msb(res_rd_msb)
  );

endmodule
