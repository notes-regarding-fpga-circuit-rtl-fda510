// tb_debug_port: checks the pin map (clock, three control signals, 12 data
// bits from DIO4 up) and the data select for random inputs.
module tb_debug_port;
  import fir_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  dbg_sel_e sel;
  logic [11:0] rom_data, mem_data, adc_data, dac_data;
  logic fir_calc, load_fir_shiftR, fir_shift_en;
  logic [15:0] tek;

  debug_port dut (.clk, .sel, .rom_data, .mem_data, .adc_data, .dac_data,
                  .fir_calc, .load_fir_shiftR, .fir_shift_en, .tek);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [11:0] w;
      clk = 1'($urandom); sel = dbg_sel_e'(i % 4);
      rom_data = 12'($urandom); mem_data = 12'($urandom);
      adc_data = 12'($urandom); dac_data = 12'($urandom);
      fir_calc = 1'($urandom); load_fir_shiftR = 1'($urandom); fir_shift_en = 1'($urandom);
      w = (i % 4 == 0) ? rom_data : (i % 4 == 1) ? mem_data : (i % 4 == 2) ? adc_data : dac_data;
      #1;
      checks++;
      if (tek[0] !== clk || tek[1] !== fir_calc || tek[2] !== load_fir_shiftR ||
          tek[3] !== fir_shift_en || tek[15:4] !== w) begin
        failures++;
        $display("FAIL: sel %0d tek %h", i % 4, tek);
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
