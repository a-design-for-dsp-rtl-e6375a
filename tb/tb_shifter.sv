// tb_shifter: checks pass-through, one-place left shift (times two, 16-bit
// wrap) and one-place arithmetic right shift (floor of half) of the shifter
// on every 16-bit input value.
module tb_shifter;
  import dsp_ref_pkg::*;
  logic [15:0] x, y;
  logic        en, left;
  int checks = 0, failures = 0;

  shifter dut (.x, .en, .left, .y);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      for (int m = 0; m < 3; m++) begin
        logic [15:0] e;
        x = 16'(v); en = (m != 0); left = (m == 2);
        #1;
        e = shift_ref(m == 0 ? 0 : (m == 1 ? 8 : 12), $signed(16'(v)));
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h en=%b left=%b got %h exp %h", x, en, left, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
