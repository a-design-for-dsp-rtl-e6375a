// tb_alu: checks the ALU on all 17 opcodes, each with both settings of the
// two don't-care low opcode bits, on random signed Q10.6 samples. The
// expected results come from dsp_ref_pkg (exact products, as the default
// multiplier is exact); the overflow flag is checked against the 32-bit
// range of the add/subtract result.
module tb_alu;
  import dsp_pkg::*;
  import dsp_ref_pkg::*;
  opcode_t op;
  sample_t s1, s2, s3;
  result_t res;
  int checks = 0, failures = 0;

  alu dut (.op, .s1, .s2, .s3, .res);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: MAD 13.75 * 2.0 + 0.5 = 28.0 (1792/64).
    op = MAD; s1 = 16'd880; s2 = 16'd128; s3 = 16'd32;
    #1;
    checks++;
    if (res !== 32'd1792) begin failures++; $display("FAIL MAD example %0d", res); end
    for (int k = 0; k < 17; k++) begin
      for (int i = 0; i < 400; i++) begin
        logic [31:0] e;
        op = 8'(OPCODES[k]) | 8'($urandom_range(0, 3));
        s1 = rand_sample(); s2 = rand_sample(); s3 = rand_sample();
        #1;
        e = step_ref(OPCODES[k], $signed(s1), $signed(s2), $signed(s3), 16);
        checks++;
        if (res !== e) begin
          failures++;
          if (failures < 10) $display("FAIL op=%h s=%0d,%0d,%0d got %0d exp %0d ", op,
                                      $signed(s1), $signed(s2), $signed(s3), $signed(res), $signed(e));
        end
      end
    end
    // Largest magnitudes: (-512.0)*(-512.0) - 511.98 is 2^24 - 32767 in Q26.6.
    op = MAS; s1 = 16'h8000; s2 = 16'h8000; s3 = 16'h7FFF;
    #1;
    checks++;
    if (res !== 32'h00FF_8001) begin failures++; $display("FAIL MAS big %h", res); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
