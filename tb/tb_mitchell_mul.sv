// tb_mitchell_mul: checks the iterative Mitchell multiplier.
//
// Three instances: the default (16 iterations, exact), 1 iteration (plain
// Mitchell) and 3 iterations. Each is fed the worked example 13.75 * 2, corner
// values and random signed Q10.6 operands, and compared with dsp_ref_pkg's
// mul_ref, which computes the expected product from the exact product minus
// the residual error term.
module tb_mitchell_mul;
  import dsp_ref_pkg::*;

  logic signed [15:0] a, b;
  logic signed [31:0] p16, p1, p3;
  int checks = 0, failures = 0;

  mitchell_mul                    dut16 (.a, .b, .p(p16));
  mitchell_mul #(.ITERATIONS(1))  dut1  (.a, .b, .p(p1));
  mitchell_mul #(.ITERATIONS(3))  dut3  (.a, .b, .p(p3));

  task automatic check(logic signed [15:0] x, logic signed [15:0] y);
    a = x; b = y;
    #1;
    checks += 3;
    if (p16 !== 32'(mul_ref(x, y, 16))) begin
      failures++; $display("FAIL exact %0d*%0d: got %0d exp %0d", x, y, p16, mul_ref(x, y, 16));
    end
    if (p1 !== 32'(mul_ref(x, y, 1))) begin
      failures++; $display("FAIL it1 %0d*%0d: got %0d exp %0d", x, y, p1, mul_ref(x, y, 1));
    end
    if (p3 !== 32'(mul_ref(x, y, 3))) begin
      failures++; $display("FAIL it3 %0d*%0d: got %0d exp %0d", x, y, p3, mul_ref(x, y, 3));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 13.75 (0000001101.110000) times 2.0 is 27.5 = 1760/64.
    check(16'b0000001101110000, 16'd128);
    checks++;
    if (p16 !== 32'sd1760) begin failures++; $display("FAIL 13.75*2 = %0d", p16); end
    // 3.0 * 3.0: Mitchell alone gives 8.0, one more iteration makes it exact.
    check(16'd192, 16'd192);
    checks++;
    if (p1 !== 32'sd512 || p3 !== 32'sd576) begin failures++; $display("FAIL 3*3 %0d %0d", p1, p3); end
    check(0, 16'd100);
    check(16'sh8000, 16'sh8000);
    check(16'sh8000, 16'sh7FFF);
    check(16'sh7FFF, 16'sh7FFF);
    check(-16'sd1, 16'sd64);
    for (int i = 0; i < 3000; i++) check(rand_sample(), rand_sample());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
