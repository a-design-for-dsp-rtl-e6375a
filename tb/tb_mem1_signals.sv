// tb_mem1_signals: fills the three signal banks with different random data
// through the host port, then reads all three banks at once at independent
// addresses and checks the data one clock later, and that the outputs hold
// while rd_en is low.
module tb_mem1_signals;
  logic        clk = 0, wr_en = 0, rd_en = 0;
  logic [1:0]  wr_bank;
  logic [7:0]  wr_addr;
  logic [15:0] wr_data;
  logic [7:0]  rd_addr [3];
  logic [15:0] rd_data [3];
  logic [15:0] model [3][256];
  logic [15:0] held [3];
  int checks = 0, failures = 0;

  mem1_signals dut (.clk, .wr_en, .wr_bank, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_addr = '{8'd0, 8'd0, 8'd0};
    for (int b = 0; b < 3; b++)
      for (int a = 0; a < 256; a++) begin
        @(negedge clk);
        wr_en = 1; wr_bank = 2'(b); wr_addr = 8'(a); wr_data = 16'($urandom);
        model[b][a] = wr_data;
      end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rd_en = 1;
      rd_addr = '{8'($urandom), 8'($urandom), 8'($urandom)};
      @(negedge clk);
      for (int b = 0; b < 3; b++) begin
        checks++;
        if (rd_data[b] !== model[b][rd_addr[b]]) begin
          failures++;
          if (failures < 10) $display("FAIL bank %0d addr %0d: %h exp %h", b, rd_addr[b], rd_data[b], model[b][rd_addr[b]]);
        end
      end
      // With rd_en low the outputs keep the last words read.
      held = rd_data;
      rd_en = 0;
      rd_addr = '{8'($urandom), 8'($urandom), 8'($urandom)};
      @(negedge clk);
      checks++;
      if (rd_data != held) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
