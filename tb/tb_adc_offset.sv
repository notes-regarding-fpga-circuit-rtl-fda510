// tb_adc_offset: all 4096 ADC codes; the sample must equal code - 2048.
module tb_adc_offset;
  int checks = 0, failures = 0;
  logic [11:0] adc_raw;
  logic signed [11:0] sample;

  adc_offset dut (.adc_raw, .sample);

  initial begin
    for (int c = 0; c < 4096; c++) begin
      adc_raw = 12'(c);
      #1;
      checks++;
      if (int'(sample) != c - 2048) begin
        failures++;
        $display("FAIL: code %0d gave %0d", c, sample);
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
