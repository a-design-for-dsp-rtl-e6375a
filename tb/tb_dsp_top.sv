// tb_dsp_top: runs the whole processor end to end at its default parameters.
//
// The testbench fills the three signal banks with random Q10.6 samples and
// loads a program that starts with a MUL over two 5-sample signals stored at
// different start positions, then runs every one of the 17 instructions
// (random lengths and start addresses, random don't-care opcode bits), an
// empty instruction (length 0) and HLT. It checks the cycle count against
// 2 + 4*len per instruction, reads every result back from the LSB and MSB
// result banks and compares it with dsp_ref_pkg's arithmetic. A second run
// stops on an illegal opcode and must raise error, leaving the results of
// the instructions before it in place. It counts how often each mechanism
// occurred (multiply, add, subtract, multiply-accumulate, left and right
// shift, empty instruction, halt, error stop) and fails any that never did.
module tb_dsp_top;
  import dsp_pkg::*;
  import dsp_ref_pkg::*;

  logic       clk = 0, rst_n = 0, start = 0;
  logic       busy, done, error;
  logic       prog_wr_en = 0, sig_wr_en = 0;
  addr_t      prog_wr_addr, sig_wr_addr, res_rd_addr;
  instr_t     prog_wr_data;
  logic [1:0] sig_wr_bank;
  sample_t    sig_wr_data, res_rd_lsb, res_rd_msb;

  sample_t    sig [3][256];
  logic [31:0] exp_res [256];
  logic       exp_valid [256];
  int         checks = 0, failures = 0;
  int         n_mul = 0, n_add = 0, n_sub = 0, n_mac = 0, n_shl = 0, n_shr = 0;
  int         n_skip = 0, n_halt = 0, n_err = 0;
  int         cycles, exp_cycles;

  dsp_top dut (.clk, .rst_n, .start, .busy, .done, .error,
               .prog_wr_en, .prog_wr_addr, .prog_wr_data,
               .sig_wr_en, .sig_wr_bank, .sig_wr_addr, .sig_wr_data,
               .res_rd_addr, .res_rd_lsb, .res_rd_msb);

  always #5 clk = ~clk;
  always @(posedge clk) if (busy) cycles++;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL %s", msg);
  endtask

  task automatic load_instr(int pc, instr_t ins);
    @(negedge clk);
    prog_wr_en = 1; prog_wr_addr = 8'(pc); prog_wr_data = ins;
    @(negedge clk);
    prog_wr_en = 0;
  endtask

  // Records the expected results of one instruction and counts mechanisms.
  task automatic expect_instr(instr_t ins);
    int op;
    op = int'(ins.op) & 'hFC;
    for (int k = 0; k < int'(ins.len); k++)
      begin
        addr_t d;
        d = ins.res_base + 8'(k);
        exp_res[d] = step_ref(op, $signed(sig[0][ins.s1_base + 8'(k)]), $signed(sig[1][ins.s2_base + 8'(k)]),
                              $signed(sig[2][ins.s3_base + 8'(k)]), 16);
        exp_valid[d] = 1'b1;
      end
    exp_cycles += 2 + 4 * int'(ins.len);
    if (ins.len == 0) begin n_skip++; return; end
    if ((op & 'h40) != 0) n_mul++;
    if ((op & 'h60) == 'h60 || (op & 'h50) == 'h50) n_mac++;
    if ((op & 'h20) != 0) n_add++;
    if ((op & 'h10) != 0) n_sub++;
    if ((op & 'h0C) == 'h0C) n_shl++;
    if ((op & 'h0C) == 'h08) n_shr++;
  endtask

  task automatic run_and_wait(bit exp_error);
    cycles = 0;
    @(negedge clk); start = 1;
    @(posedge done); @(negedge clk);
    checks += 2;
    if (cycles != exp_cycles) fail($sformatf("cycles %0d exp %0d", cycles, exp_cycles));
    if (error !== exp_error) fail("error flag");
    if (exp_error) n_err++; else n_halt++;
    start = 0;
    @(negedge clk);
  endtask

  task automatic check_results();
    for (int a = 0; a < 256; a++) if (exp_valid[a]) begin
      @(negedge clk); res_rd_addr = 8'(a);
      @(negedge clk);
      checks++;
      if ({res_rd_msb, res_rd_lsb} !== exp_res[a])
        fail($sformatf("result[%0d] = %h exp %h", a, {res_rd_msb, res_rd_lsb}, exp_res[a]));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t ins;
    int pc, rb;
    res_rd_addr = 0; prog_wr_addr = 0; prog_wr_data = '0;
    sig_wr_addr = 0; sig_wr_bank = 0; sig_wr_data = 0;
    for (int a = 0; a < 256; a++) exp_valid[a] = 1'b0;
    #22 rst_n = 1;

    // Signals.
    for (int b = 0; b < 3; b++)
      for (int a = 0; a < 256; a++) begin
        @(negedge clk);
        sig_wr_en = 1; sig_wr_bank = 2'(b); sig_wr_addr = 8'(a);
        sig_wr_data = rand_sample();
        sig[b][a] = sig_wr_data;
      end
    @(negedge clk); sig_wr_en = 0;

    // Program: MUL of two 5-sample signals at different start positions,
    // then all 17 instructions, an empty one and HLT.
    exp_cycles = 2;
    pc = 0; rb = 0;
    ins = '{op: MUL, len: 8'd5, s1_base: 8'd3, s2_base: 8'd40, s3_base: 8'd0, res_base: 8'd0};
    load_instr(pc++, ins); expect_instr(ins); rb = 5;
    for (int k = 0; k < 17; k++) begin
      ins.op = 8'(OPCODES[k]) | 8'($urandom_range(0, 3));
      ins.len = 8'($urandom_range(3, 12));
      ins.s1_base = 8'($urandom); ins.s2_base = 8'($urandom); ins.s3_base = 8'($urandom);
      ins.res_base = 8'(rb);
      rb += int'(ins.len);
      load_instr(pc++, ins); expect_instr(ins);
      if (k == 8) begin
        ins.op = ADD; ins.len = 0; ins.res_base = 8'd250;
        load_instr(pc++, ins); expect_instr(ins);
      end
    end
    ins = '0; ins.op = 8'h02; ins.len = 8'd9;   // HLT
    load_instr(pc++, ins);
    run_and_wait(1'b0);
    check_results();

    // Second run: two instructions, then an illegal opcode.
    for (int a = 0; a < 256; a++) exp_valid[a] = 1'b0;
    exp_cycles = 2;
    ins = '{op: MLS, len: 8'd7, s1_base: 8'd100, s2_base: 8'd7, s3_base: 8'd9, res_base: 8'd200};
    load_instr(0, ins); expect_instr(ins);
    ins = '{op: MSR, len: 8'd4, s1_base: 8'd250, s2_base: 8'd30, s3_base: 8'd31, res_base: 8'd210};
    load_instr(1, ins); expect_instr(ins);
    ins = '{op: 8'h70, len: 8'd4, s1_base: 8'd0, s2_base: 8'd0, s3_base: 8'd0, res_base: 8'd0};
    load_instr(2, ins);
    run_and_wait(1'b1);
    check_results();

    $display("mechanisms: mul %0d add %0d sub %0d mac %0d shl %0d shr %0d empty %0d halt %0d error %0d",
             n_mul, n_add, n_sub, n_mac, n_shl, n_shr, n_skip, n_halt, n_err);
    checks++;
    if (n_mul == 0 || n_add == 0 || n_sub == 0 || n_mac == 0 || n_shl == 0 || n_shr == 0 ||
        n_skip == 0 || n_halt == 0 || n_err == 0) fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
