// tb_addsub: checks the adder-subtractor against integer addition and
// subtraction (wrapping to 32 bits) on corner and random 32-bit operands.
module tb_addsub;
  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  addsub dut (.a, .b, .sub, .y);

  task automatic check(logic [31:0] x, logic [31:0] z, logic s);
    longint e;
    a = x; b = z; sub = s;
    #1;
    e  = s ? longint'($signed(x)) - longint'($signed(z)) : longint'($signed(x)) + longint'($signed(z));
    checks++;
    if (y !== e[31:0]) begin
      failures++;
      $display("FAIL %h %s %h: got %h exp %h", x, s ? "-" : "+", z, y, e[31:0]);
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
    check(32'd5, 32'd7, 1'b0);
    check(32'd5, 32'd7, 1'b1);
    check(32'h7FFFFFFF, 32'd1, 1'b0);
    check(32'h80000000, 32'd1, 1'b1);
    check(32'h0, 32'h80000000, 1'b1);
    check(32'hFFFFFFFF, 32'hFFFFFFFF, 1'b0);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, 1'($urandom));
    for (int i = 0; i < 2000; i++) check(32'($signed($urandom_range(0, 200)) - 100), 32'($signed($urandom_range(0, 200)) - 100), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
