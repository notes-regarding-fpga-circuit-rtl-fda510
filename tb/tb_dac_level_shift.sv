// tb_dac_level_shift: all 4096 signed inputs; the DAC code must be
// (value + 2047) modulo 4096.
module tb_dac_level_shift;
  int checks = 0, failures = 0;
  logic signed [11:0] subset;
  logic [11:0] dac_word;

  dac_level_shift dut (.subset, .dac_word);

  initial begin
    for (int v = -2048; v < 2048; v++) begin
      subset = 12'(v);
      #1;
      checks++;
      if (int'(dac_word) != (v + 2047 + 4096) % 4096) begin
        failures++;
        $display("FAIL: %0d gave %0d", v, dac_word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
