// tb_fir_50hz: the output-range experiment, at the top's default parameters.
//
// Input: a 50 Hz, 1 Vp-p sine riding on 1.92 V, sampled at 20 kHz by a 12-bit
// ADC with 3.3 V full scale (about 620 codes of amplitude around code 2383).
// Coefficients: page 1, 32 x 0x001 (moving sum). One full 50 Hz period (400
// samples) is run with the output taken from accumulator bits 10..0 and one
// with bits 15..5 (both with the sign bit on top).
//   bits 10..0: the sums (up to about 30,000) do not fit, the output wraps,
//               and consecutive DAC codes jump by large amounts;
//   bits 15..5: the output is a smooth sine: no wrap, small steps, and its
//               peak-to-peak swing is about 2 * 32 * 620 / 32 codes.
// Every DAC word is also compared with a reference computed here.
module tb_fir_50hz;
  import fir_pkg::*;
  localparam int N = 32;
  localparam int PERIOD = 400;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst = 1'b1;
  range_sel_e sw_range = RNG_10_0;
  logic adc_start, adc_valid = 1'b0, dac_valid;
  logic [11:0] adc_data = '0, dac_data;
  logic [15:0] tek;

  fir_top dut (.clk, .rst, .sw_page(2'd1), .sw_range, .dbg_sel(DBG_DAC),
               .adc_start, .adc_valid, .adc_data, .dac_valid, .dac_data, .tek);

  function automatic bit ok(input bit cond);
    checks++;
    if (!cond) failures++;
    return cond;
  endfunction

  int n_in = 0;
  int hist [N];

  // 1.92 V + 0.5 V * sin, in codes of a 3.3 V, 12-bit converter.
  function automatic int code_at(int n);
    real v = 1.92 + 0.5 * $sin(2.0 * 3.14159265358979 * n / PERIOD);
    return int'($floor(v / 3.3 * 4096.0 + 0.5));
  endfunction

  always @(negedge clk) begin
    adc_valid <= adc_start;
    if (adc_start) begin
      adc_data <= 12'(code_at(n_in));
      n_in++;
    end
  end

  int outputs = 0, wraps = 0, big_steps = 0, prev = -1, lo_code = 4096, hi_code = -1;

  always @(posedge clk) begin
    if (!rst && adc_valid && !dut.busy) begin
      for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = int'(adc_data) - 2048;
    end
    if (!rst && dac_valid) begin
      longint acc;
      int lo, sh, want;
      acc = 0;
      for (int k = 0; k < N; k++) acc += hist[k];
      lo = (sw_range == RNG_10_0) ? 0 : 5;
      sh = int'((acc >>> lo) & 'h7FF);
      want = ((acc < 0 ? sh - 2048 : sh) + 2047 + 4096) % 4096;
      if (!ok(int'(dac_data) == want)) $display("FAIL: dac %0d want %0d", dac_data, want);
      if ((acc >>> lo) >= 2048 || (acc >>> lo) < -2048) wraps++;
      if (prev >= 0 && (int'(dac_data) - prev > 256 || prev - int'(dac_data) > 256)) big_steps++;
      prev = int'(dac_data);
      if (int'(dac_data) < lo_code) lo_code = int'(dac_data);
      if (int'(dac_data) > hi_code) hi_code = int'(dac_data);
      outputs++;
    end
  end

  task automatic run_period(input range_sel_e r);
    sw_range = r;
    outputs = 0; wraps = 0; big_steps = 0; prev = -1; lo_code = 4096; hi_code = -1;
    while (outputs < PERIOD) @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < N; i++) hist[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // Fill the 32-sample window first.
    while (n_in < N + 2) @(posedge clk);

    run_period(RNG_10_0);
    $display("bits 10..0: wraps=%0d big_steps=%0d dac range %0d..%0d", wraps, big_steps, lo_code, hi_code);
    if (!ok(wraps > 0 && big_steps > 10)) $display("FAIL: range 10..0 did not wrap");

    run_period(RNG_15_5);
    $display("bits 15..5: wraps=%0d big_steps=%0d dac range %0d..%0d", wraps, big_steps, lo_code, hi_code);
    if (!ok(wraps == 0 && big_steps == 0)) $display("FAIL: range 15..5 is not a clean sine");
    // Swing: 2 * 620 * 32 / 32 = about 1240 codes, centred on 2047 + 335.
    if (!ok(hi_code - lo_code > 1100 && hi_code - lo_code < 1300))
      $display("FAIL: swing %0d codes", hi_code - lo_code);
    if (!ok((hi_code + lo_code) / 2 > 2047 + 250 && (hi_code + lo_code) / 2 < 2047 + 420))
      $display("FAIL: centre %0d", (hi_code + lo_code) / 2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000 * (2 * PERIOD + 60)) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
