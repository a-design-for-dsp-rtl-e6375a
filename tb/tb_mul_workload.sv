// tb_mul_workload: the MUL workload of the processor description: two
// 5-sample signals stored at different start positions are multiplied
// sample by sample. Runs two processors side by side: one with the default
// exact multiplier (16 iterations) and one with plain Mitchell (1
// iteration). Checks each product against dsp_ref_pkg (exact product, and
// the Mitchell approximation with its residual error removed), that the
// one-iteration result never exceeds the exact product in magnitude and
// falls short of it by at most 1/4 (the bound of the first-iteration
// approximation 2^(k1+k2) + r1*2^k2 + r2*2^k1), and that the instruction takes 2 + 4*5 clocks.
module tb_mul_workload;
  import dsp_pkg::*;
  import dsp_ref_pkg::*;

  logic       clk = 0, rst_n = 0, start = 0;
  logic       busy [2], done [2], error [2];
  logic       prog_wr_en = 0, sig_wr_en = 0;
  addr_t      prog_wr_addr = 0, sig_wr_addr = 0, res_rd_addr = 0;
  instr_t     prog_wr_data = '0;
  logic [1:0] sig_wr_bank = 0;
  sample_t    sig_wr_data = 0;
  sample_t    lsb [2], msb [2];
  // Signal one: 1.5, 2.25, 13.75, -3.0, 0.5 at addresses 10..14;
  // signal two: 2.0, 3.0, 2.0, 7.75, -6.5 at addresses 61..65.
  sample_t    x1 [5] = '{16'd96, 16'd144, 16'd880, -16'sd192, 16'd32};
  sample_t    x2 [5] = '{16'd128, 16'd192, 16'd128, 16'd496, -16'sd416};
  int         checks = 0, failures = 0, cycles = 0;

  dsp_top                       exact  (.clk, .rst_n, .start, .busy(busy[0]), .done(done[0]), .error(error[0]),
                                        .prog_wr_en, .prog_wr_addr, .prog_wr_data,
                                        .sig_wr_en, .sig_wr_bank, .sig_wr_addr, .sig_wr_data,
                                        .res_rd_addr, .res_rd_lsb(lsb[0]), .res_rd_msb(msb[0]));
  dsp_top #(.MUL_ITERATIONS(1)) approx (.clk, .rst_n, .start, .busy(busy[1]), .done(done[1]), .error(error[1]),
                                        .prog_wr_en, .prog_wr_addr, .prog_wr_data,
                                        .sig_wr_en, .sig_wr_bank, .sig_wr_addr, .sig_wr_data,
                                        .res_rd_addr, .res_rd_lsb(lsb[1]), .res_rd_msb(msb[1]));

  always #5 clk = ~clk;
  always @(posedge clk) if (busy[0]) cycles++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #22 rst_n = 1;
    for (int k = 0; k < 5; k++) begin
      @(negedge clk); sig_wr_en = 1; sig_wr_bank = 0; sig_wr_addr = 8'(10 + k); sig_wr_data = x1[k];
      @(negedge clk); sig_wr_en = 1; sig_wr_bank = 1; sig_wr_addr = 8'(61 + k); sig_wr_data = x2[k];
    end
    @(negedge clk); sig_wr_en = 0;
    prog_wr_en = 1; prog_wr_addr = 0;
    prog_wr_data = '{op: MUL, len: 8'd5, s1_base: 8'd10, s2_base: 8'd61, s3_base: 8'd0, res_base: 8'd100};
    @(negedge clk); prog_wr_addr = 1; prog_wr_data = '0;   // HLT
    @(negedge clk); prog_wr_en = 0; start = 1; cycles = 0;
    @(posedge done[0]); @(negedge clk);
    checks += 2;
    // MUL of 5 samples (22 clocks) plus the fetch and decode of HLT.
    if (cycles != 2 + 4 * 5 + 2) begin failures++; $display("FAIL cycles %0d", cycles); end
    if (!done[1] || error[0] || error[1]) begin failures++; $display("FAIL done/error"); end
    start = 0;
    for (int k = 0; k < 5; k++) begin
      longint e, m, got_e, got_m;
      @(negedge clk); res_rd_addr = 8'(100 + k);
      @(negedge clk);
      e = mul_ref($signed(x1[k]), $signed(x2[k]), 16);
      m = mul_ref($signed(x1[k]), $signed(x2[k]), 1);
      got_e = longint'($signed({msb[0], lsb[0]}));
      got_m = longint'($signed({msb[1], lsb[1]}));
      $display("x1=%0d/64 x2=%0d/64: exact %0d/64, Mitchell %0d/64", $signed(x1[k]), $signed(x2[k]), got_e, got_m);
      checks += 3;
      if (got_e != e) begin failures++; $display("FAIL exact %0d exp %0d", got_e, e); end
      if (got_m != m) begin failures++; $display("FAIL Mitchell %0d exp %0d", got_m, m); end
      if ((e >= 0 && (got_m > e || 4 * (e - got_m) > e)) || (e < 0 && (got_m < e || 4 * (got_m - e) > -e))) begin
        failures++; $display("FAIL Mitchell error out of bound");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
