// tb_mem3_program: loads random 48-bit instruction words and checks the
// fetch port: data one clock after the address with rd_en high, held with
// rd_en low.
module tb_mem3_program;
  logic        clk = 0, wr_en = 0, rd_en = 0;
  logic [7:0]  wr_addr, rd_addr;
  logic [47:0] wr_data, rd_data, held;
  logic [47:0] model [256];
  int checks = 0, failures = 0;

  mem3_program dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_addr = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 8'(a); wr_data = {16'($urandom), 32'($urandom)};
      model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = 8'($urandom);
      @(negedge clk);
      checks++;
      if (rd_data !== model[rd_addr]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d: %h exp %h", rd_addr, rd_data, model[rd_addr]);
      end
      held = rd_data;
      rd_en = 0; rd_addr = 8'($urandom);
      @(negedge clk);
      checks++;
      if (rd_data !== held) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
