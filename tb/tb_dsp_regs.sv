// tb_dsp_regs: checks that the working registers clear on reset, load the
// three samples only on ld_sig and the result only on ld_res, and hold
// their values otherwise. A scoreboard in the testbench tracks the expected
// contents over random load patterns.
module tb_dsp_regs;
  import dsp_pkg::*;
  logic    clk = 0, rst_n = 0, ld_sig = 0, ld_res = 0;
  sample_t sig_in [3];
  result_t res_in;
  sample_t s1, s2, s3;
  result_t res;
  sample_t e1, e2, e3;
  result_t eres;
  int checks = 0, failures = 0;

  dsp_regs dut (.clk, .rst_n, .ld_sig, .sig_in, .ld_res, .res_in, .s1, .s2, .s3, .res);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sig_in = '{16'h1, 16'h2, 16'h3};
    res_in = 32'h5;
    #12;
    checks++;
    if (s1 !== 0 || s2 !== 0 || s3 !== 0 || res !== 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    {e1, e2, e3, eres} = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ld_sig = 1'($urandom); ld_res = 1'($urandom);
      sig_in = '{16'($urandom), 16'($urandom), 16'($urandom)};
      res_in = $urandom;
      if (ld_sig) begin e1 = sig_in[0]; e2 = sig_in[1]; e3 = sig_in[2]; end
      if (ld_res) eres = res_in;
      @(posedge clk); #1;
      checks++;
      if (s1 !== e1 || s2 !== e2 || s3 !== e3 || res !== eres) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: %h %h %h %h exp %h %h %h %h", i, s1, s2, s3, res, e1, e2, e3, eres);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
