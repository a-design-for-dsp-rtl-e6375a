// tb_dsp_cu: checks the control unit alone, with program memory modelled in
// the testbench (one-clock read latency, as MEM3).
//
// Random programs of legal instructions (lengths 0..6, random start
// addresses, don't-care opcode bits set at random) end in HLT. For each
// program the testbench checks, against lists built from the program:
// every MEM1 read address triple, that the registers load the samples the
// clock after the read and the result the clock after that, the opcode the
// ALU sees, every MEM2 write address, and that the program takes exactly
// sum(2 + 4*len) + 2 busy clocks. A last program stops on an illegal opcode
// and must raise error without writing anything after it.
module tb_dsp_cu;
  import dsp_pkg::*;
  import dsp_ref_pkg::*;

  logic    clk = 0, rst_n = 0, start = 0;
  logic    busy, done, error;
  logic    prog_rd_en, sig_rd_en, ld_sig, ld_res, res_wr_en;
  addr_t   prog_addr, res_addr;
  addr_t   sig_addr [3];
  instr_t  prog_data;
  opcode_t alu_op;

  instr_t  prog [256];
  addr_t   exp_rd [$][3];
  addr_t   exp_wr [$];
  opcode_t exp_op [$];
  int      exp_cycles, busy_cycles;
  int      checks = 0, failures = 0;
  int      n_skip = 0, n_halt = 0, n_err = 0;
  logic    ld_sig_due, ld_res_due;

  dsp_cu dut (.clk, .rst_n, .start, .busy, .done, .error,
              .prog_rd_en, .prog_addr, .prog_data,
              .sig_rd_en, .sig_addr, .ld_sig, .ld_res, .alu_op,
              .res_wr_en, .res_addr);

  always #5 clk = ~clk;

  always_ff @(posedge clk) if (prog_rd_en) prog_data <= prog[prog_addr];

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL %s", msg);
  endtask

  // Compare the CU's outputs with the expected lists clock by clock.
  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (ld_sig !== ld_sig_due) begin checks++; fail("ld_sig timing"); end
    if (ld_res !== ld_res_due) begin checks++; fail("ld_res timing"); end
    ld_res_due <= ld_sig;
    ld_sig_due <= sig_rd_en;
    if (sig_rd_en) begin
      checks++;
      if (exp_rd.size() == 0) fail("unexpected read");
      else begin
        if (sig_addr != exp_rd[0]) fail($sformatf("read addr %0d,%0d,%0d exp %0d,%0d,%0d",
              sig_addr[0], sig_addr[1], sig_addr[2], exp_rd[0][0], exp_rd[0][1], exp_rd[0][2]));
        void'(exp_rd.pop_front());
      end
    end
    if (res_wr_en) begin
      checks++;
      if (exp_wr.size() == 0) fail("unexpected write");
      else begin
        if (res_addr !== exp_wr[0] || alu_op !== exp_op[0])
          fail($sformatf("write addr %0d op %h exp %0d %h", res_addr, alu_op, exp_wr[0], exp_op[0]));
        void'(exp_wr.pop_front());
        void'(exp_op.pop_front());
      end
    end
  end

  task automatic run_program(int n, bit bad);
    addr_t a [3];
    exp_cycles = 0;
    for (int i = 0; i < n; i++) begin
      instr_t ins;
      ins.op       = 8'(OPCODES[$urandom_range(0, 16)]) | 8'($urandom_range(0, 3));
      ins.len      = (i % 4 == 1) ? 8'd0 : 8'($urandom_range(1, 6));
      ins.s1_base  = 8'($urandom);
      ins.s2_base  = 8'($urandom);
      ins.s3_base  = 8'($urandom);
      ins.res_base = 8'($urandom);
      prog[i] = ins;
      if (ins.len == 0) n_skip++;
      for (int k = 0; k < int'(ins.len); k++) begin
        a[0] = ins.s1_base + 8'(k); a[1] = ins.s2_base + 8'(k); a[2] = ins.s3_base + 8'(k);
        exp_rd.push_back(a);
        exp_wr.push_back(ins.res_base + 8'(k));
        exp_op.push_back(ins.op);
      end
      exp_cycles += 2 + 4 * int'(ins.len);
    end
    prog[n] = '0;
    prog[n].op = bad ? 8'h60 : 8'($urandom_range(0, 3));  // 8'h60 is not an instruction
    prog[n].len = 8'd5;
    exp_cycles += 2;
    busy_cycles = 0;
    @(negedge clk); start = 1;
    @(posedge done); @(negedge clk);
    checks += 4;
    if (busy_cycles != exp_cycles) fail($sformatf("cycles %0d exp %0d", busy_cycles, exp_cycles));
    if (error !== bad) fail("error flag");
    if (exp_rd.size() != 0 || exp_wr.size() != 0) fail("missing reads or writes");
    if (busy) fail("busy while done");
    if (bad) n_err++; else n_halt++;
    start = 0;
    @(negedge clk);
    checks++;
    if (done) fail("done stays after start drops");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_sig_due = 0; ld_res_due = 0;
    #22 rst_n = 1;
    checks++;
    if (busy || done || error) fail("not idle after reset");
    for (int p = 0; p < 40; p++) run_program($urandom_range(1, 12), 1'b0);
    run_program(3, 1'b1);
    run_program(2, 1'b0);
    checks++;
    if (n_skip == 0 || n_halt == 0 || n_err == 0) fail("a mechanism never happened");
    $display("programs: halt %0d, error stop %0d, empty instructions %0d", n_halt, n_err, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
