// tb_mem2_results: writes random 32-bit results at random addresses and
// checks that the LSB bank returns bits 15:0 and the MSB bank bits 31:16 of
// the last result written at each address, one clock after the read address
// (a read in the same clock as a write to that address returns the old word).
module tb_mem2_results;
  logic        clk = 0, wr_en = 0;
  logic [7:0]  wr_addr, rd_addr;
  logic [31:0] wr_data;
  logic [15:0] rd_lsb, rd_msb;
  logic [31:0] model [256];
  logic [31:0] exp;
  int checks = 0, failures = 0;

  mem2_results dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_lsb, .rd_msb);

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
      wr_en = 1; wr_addr = 8'(a); wr_data = $urandom;
      model[a] = wr_data;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr_en = 1'($urandom);
      wr_addr = 8'($urandom); wr_data = $urandom;
      rd_addr = 8'($urandom);
      // A read in the clock of a write to the same address sees the old word.
      exp = model[rd_addr];
      if (wr_en) model[wr_addr] = wr_data;
      @(negedge clk);
      wr_en = 0;
      checks++;
      if ({rd_msb, rd_lsb} !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d: %h_%h exp %h", rd_addr, rd_msb, rd_lsb, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
