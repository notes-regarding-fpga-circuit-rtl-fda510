// tb_fir_ramp_debug: the logic-analyzer check of the ROM timing. With the
// ROM filled with 0, 1, ..., 31 (RAMP_TEST=1) and the debug port showing the
// ROM output, the 12 data pins must read k in the k-th clock of fir_calc
// (coefficient 0 in the first clock), DIO1..DIO3 must carry fir_calc,
// load_fir_shiftR and fir_shift_en, and load_fir_shiftR must come in the
// clock just before fir_calc. The DAC words are also checked against
// y[n] = sum k * x[n-k] taken through range 15..5. A short sample divider
// keeps the run brief.
module tb_fir_ramp_debug;
  import fir_pkg::*;
  localparam int N = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst = 1'b1;
  logic adc_start, adc_valid = 1'b0, dac_valid;
  logic [11:0] adc_data = '0, dac_data;
  logic [15:0] tek;

  fir_top #(.SAMPLE_DIV(200), .RAMP_TEST(1'b1)) dut (
    .clk, .rst, .sw_page(2'd2), .sw_range(RNG_15_5), .dbg_sel(DBG_ROM),
    .adc_start, .adc_valid, .adc_data, .dac_valid, .dac_data, .tek);

  function automatic bit ok(input bit cond);
    checks++;
    if (!cond) failures++;
    return cond;
  endfunction

  int hist [N];
  int k = 0, windows = 0, outputs = 0;
  logic prev_load = 1'b0;

  // ADC model: a sample in the clock after each adc_start.
  always @(negedge clk) begin
    adc_valid <= adc_start;
    if (adc_start) adc_data <= 12'($urandom);
  end

  always @(posedge clk) begin
    if (!rst && adc_valid && !dut.busy) begin
      for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = int'(adc_data) - 2048;
    end
    if (!rst && dac_valid) begin
      longint acc;
      int sh, want;
      acc = 0;
      for (int j = 0; j < N; j++) acc += longint'(j) * hist[j];
      sh = int'((acc >>> 5) & 'h7FF);
      want = ((acc < 0 ? sh - 2048 : sh) + 2047 + 4096) % 4096;
      if (!ok(int'(dac_data) == want)) $display("FAIL: dac %0d want %0d", dac_data, want);
      outputs++;
    end
  end

  always @(negedge clk) begin
    if (!rst) begin
      if (tek[1]) begin
        if (!ok(tek[15:4] == 12'(k))) $display("FAIL: fir_calc clock %0d shows ROM %h", k, tek[15:4]);
        if (k == 0 && !ok(prev_load)) $display("FAIL: load_fir_shiftR did not precede fir_calc");
        if (!ok(tek[3])) $display("FAIL: fir_shift_en low during fir_calc");
        k++;
      end else begin
        if (k != 0) begin
          if (!ok(k == N)) $display("FAIL: fir_calc lasted %0d clocks", k);
          windows++;
        end
        k = 0;
      end
      if (!ok(tek[0] == clk)) $display("FAIL: DIO0 is not the clock");
      prev_load = tek[2];
    end
  end

  initial begin
    for (int i = 0; i < N; i++) hist[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (200 * 50) @(posedge clk);
    if (!ok(windows >= 40 && outputs >= 40)) $display("FAIL: only %0d windows", windows);
    $display("windows=%0d outputs=%0d", windows, outputs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * 60) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
