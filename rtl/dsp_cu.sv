// dsp_cu: FSM control unit of the DSP processor.
//
// The control unit is the master of the ALU. It fetches an instruction from
// program memory MEM3, decodes it, and then runs the instruction over a whole
// stretch of samples: for sample i = 0 .. len-1 it reads s1_base+i,
// s2_base+i and s3_base+i from the three MEM1 banks, has the registers load
// the samples, lets the ALU compute with the opcode, has the result register
// load the ALU output, and writes it to MEM2 at res_base+i. Then it fetches
// the next instruction. An instruction with len = 0 does nothing; opcode
// 8'h00-8'h03 (HLT) ends the program; an opcode outside the instruction set
// ends it with error set.
//
// States and timing (one clock each):
//   IDLE -start-> FETCH -> DECODE -> { READ -> LOAD -> EXEC -> WRITE } x len
//   -> FETCH ... ; DECODE of HLT or an illegal opcode -> DONE.
// So an instruction of len samples takes 2 + 4*len clocks, and each sample
// spends exactly one clock in the ALU. done is high in DONE; dropping start
// there returns to IDLE. start is sampled only in IDLE and DONE.
//
// The FSM-based control unit, its duties (fetch, opcode extraction, decode,
// reading MEM1, driving the ALU, writing results to MEM2) and the vector
// operation over signals with a length and separate start positions follow
// the processor description. The state sequence, instruction layout, HLT and
// the error stop are this design's choices.
module dsp_cu
  import dsp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  output logic    busy,
  output logic    done,
  output logic    error,
  // program memory MEM3
  output logic    prog_rd_en,
  output addr_t   prog_addr,
  input  instr_t  prog_data,
  // signal memory MEM1
  output logic    sig_rd_en,
  output addr_t   sig_addr [3],
  // registers
  output logic    ld_sig,
  output logic    ld_res,
  // ALU
  output opcode_t alu_op,
  // result memory MEM2
  output logic    res_wr_en,
  output addr_t   res_addr
);

  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_DECODE, S_READ, S_LOAD, S_EXEC, S_WRITE, S_DONE
  } state_e;

  state_e state;
  instr_t ir;   // instruction register
  addr_t  pc;   // program counter
  addr_t  idx;  // sample index within the instruction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ir    <= '0;
      pc    <= '0;
      idx   <= '0;
      error <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:
          if (start) begin
            pc    <= '0;
            error <= 1'b0;
            state <= S_FETCH;
          end
        S_FETCH:
          state <= S_DECODE;
        S_DECODE: begin
          ir  <= prog_data;
          idx <= '0;
          if (prog_data.op[OPC_W-1:2] == '0) begin
            state <= S_DONE;
          end else if (!opcode_legal(prog_data.op)) begin
            error <= 1'b1;
            state <= S_DONE;
          end else if (prog_data.len == '0) begin
            pc    <= pc + 1'b1;
            state <= S_FETCH;
          end else begin
            state <= S_READ;
          end
        end
        S_READ:  state <= S_LOAD;
        S_LOAD:  state <= S_EXEC;
        S_EXEC:  state <= S_WRITE;
        S_WRITE:
          if (idx == ir.len - 1'b1) begin
            pc    <= pc + 1'b1;
            state <= S_FETCH;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_READ;
          end
        S_DONE:
          if (!start) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy        = state != S_IDLE && state != S_DONE;
    done        = state == S_DONE;
    prog_rd_en  = state == S_FETCH;
    prog_addr   = pc;
    sig_rd_en   = state == S_READ;
    sig_addr[0] = ir.s1_base + idx;
    sig_addr[1] = ir.s2_base + idx;
    sig_addr[2] = ir.s3_base + idx;
    ld_sig      = state == S_LOAD;
    ld_res      = state == S_EXEC;
    alu_op      = ir.op;
    res_wr_en   = state == S_WRITE;
    res_addr    = ir.res_base + idx;
  end

  // The ALU only ever sees opcodes of the instruction set.
  a_legal_exec: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_EXEC |-> opcode_legal(ir.op));
  // A result is written only for a sample inside the instruction's length.
  a_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    res_wr_en |-> idx < ir.len);

endmodule
