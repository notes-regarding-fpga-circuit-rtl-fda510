// tb_fir_top: end-to-end test of the FIR filter at its default parameters
// (32 taps, 20 kHz sample strobe from a 5000-clock divider).
//
// An ADC model answers each adc_start with a sample ten clocks later. A
// reference model keeps the last 32 samples, forms the filter sum with its
// own copy of the four coefficient pages, picks the switch-selected bit
// range and adds 2047; every DAC word is compared with it, and so is the
// latency from adc_valid to dac_valid (NTAPS+5 clocks). The test walks
// through the pages and ranges:
//   phase 0  page 0 (single 1: output = input)          range 0
//   phase 1  page 1 (32-sample average), 625 Hz sine     range 1
//            (32 samples per period: the output must settle at mid-scale)
//   phase 2  page 2 (low-pass), random input              ranges 0..3 in turn
//   phase 3  page 3 (single -1: output = -input)          range 0
// In phase 2 an extra adc_valid pulse is sent while the filter is busy; it
// must be ignored. The debug pins are checked in every clock against the
// word dbg_sel selects. Each mechanism (page, range, debug select, sine
// null, range wrap-around, dropped sample) must occur at least once.
module tb_fir_top;
  import fir_pkg::*;
  localparam int N = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst = 1'b1;
  logic [1:0] sw_page = '0;
  range_sel_e sw_range = RNG_10_0;
  dbg_sel_e dbg_sel = DBG_ROM;
  logic adc_start, adc_valid = 1'b0, dac_valid;
  logic [11:0] adc_data = 12'd2048, dac_data;
  logic [15:0] tek;

  fir_top dut (.clk, .rst, .sw_page, .sw_range, .dbg_sel, .adc_start, .adc_valid, .adc_data,
               .dac_valid, .dac_data, .tek);

  // Counts one check; the caller prints its message only when it fails.
  function automatic bit ok(input bit cond);
    checks++;
    if (!cond) failures++;
    return cond;
  endfunction

  // Reference coefficients.
  function automatic int coef(int page, int k);
    case (page)
      0: return (k == 0) ? 1 : 0;
      1: return 1;
      2: return 8 * ((k < N / 2) ? k + 1 : N - k);
      default: return (k == 0) ? -1 : 0;
    endcase
  endfunction

  // Input generator per phase.
  int phase = 0;
  int n_in = 0;
  function automatic int next_code(int ph, int n);
    if (ph == 1) begin
      // 625 Hz at 20 kHz: 32 samples per period, amplitude 620 codes; the
      // rounding is odd-symmetric so one period sums to exactly zero.
      real s = 620.0 * $sin(2.0 * 3.14159265358979 * n / 32.0);
      int r = (s >= 0.0) ? int'($floor(s + 0.5)) : -int'($floor(-s + 0.5));
      return 2048 + r;
    end
    return int'($urandom_range(0, 4095));
  endfunction

  // History of accepted samples, newest at index 0.
  int hist [N];
  int cyc = 0;
  int t_accept;
  logic pending = 1'b0;
  int exp_dac;
  longint exp_acc;

  // Mechanism counters.
  int page_used [4], range_used [4], dbg_used [4];
  int sine_null = 0, range_wrap = 0, dropped = 0, outputs = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // ADC model: answer adc_start after ten clocks.
  int adc_wait = -1;
  bit inject = 1'b0;
  always @(negedge clk) begin
    adc_valid <= 1'b0;
    if (adc_wait == 0) begin
      adc_data  <= 12'(next_code(phase, n_in));
      adc_valid <= 1'b1;
      n_in++;
      adc_wait  = -1;
    end else if (adc_wait > 0) adc_wait--;
    if (adc_start) adc_wait = 9;
    if (inject && dut.busy && dut.fir_calc) begin
      adc_data  <= 12'd4095;
      adc_valid <= 1'b1;
      inject    = 1'b0;
      dropped++;
    end
  end

  // Reference model, updated on the clock that accepts a sample.
  always @(posedge clk) begin
    if (!rst && adc_valid && !dut.busy && !pending) begin
      for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = int'(adc_data) - 2048;
      t_accept = cyc;
      pending = 1'b1;
    end
    if (!rst && dac_valid) begin
      int lo, sub, sh;
      if (!ok(pending)) $display("FAIL @%0t: %s", $time, "DAC word without a sample");
      if (!ok(cyc - t_accept == N + 5)) $display("FAIL @%0t: %s", $time, $sformatf("latency %0d clocks", cyc - t_accept));
      exp_acc = 0;
      for (int k = 0; k < N; k++) exp_acc += longint'(coef(sw_page, k)) * hist[k];
      lo = (sw_range == RNG_10_0) ? 0 : (sw_range == RNG_15_5) ? 5 : (sw_range == RNG_20_10) ? 10 : 15;
      sh = int'((exp_acc >>> lo) & 'h7FF);
      sub = (exp_acc < 0) ? sh - 2048 : sh;
      exp_dac = (sub + 2047 + 4096) % 4096;
      if (!ok(int'(dac_data) == exp_dac)) $display("FAIL @%0t: %s", $time, $sformatf("page %0d range %0d: dac %0d want %0d (acc %0d)", sw_page, sw_range, dac_data, exp_dac, exp_acc));
      if (!ok(longint'(dut.acc) == exp_acc)) $display("FAIL @%0t: %s", $time, $sformatf("acc %0d want %0d", dut.acc, exp_acc));
      if ((exp_acc >>> lo) >= 2048 || (exp_acc >>> lo) < -2048) range_wrap++;
      if (phase == 1 && n_in > N + 1) begin
        if (!ok(exp_acc == 0 && dac_data == 12'd2047)) $display("FAIL @%0t: %s", $time, "625 Hz sine not removed");
        sine_null++;
      end
      page_used[sw_page]++;
      range_used[sw_range]++;
      outputs++;
      pending = 1'b0;
    end
  end

  // Debug pins, checked in the middle of every clock.
  int calc_k = 0;
  always @(negedge clk) begin
    if (!rst) begin
      logic [11:0] w;
      unique case (dbg_sel)
        DBG_ROM: w = 12'(coef(sw_page, calc_k));
        DBG_MEM: w = 12'(hist[calc_k]);
        DBG_ADC: w = adc_data ^ 12'h800;
        default: w = dac_data;
      endcase
      if (!ok(tek[0] == clk && tek[1] == dut.fir_calc && tek[2] == dut.load_fir_shiftR &&
            tek[3] == dut.fir_shift_en)) $display("FAIL @%0t: %s", $time, "debug control pins");
      if (dbg_sel == DBG_DAC || dbg_sel == DBG_ADC || dut.fir_calc) begin
        if (!ok(tek[15:4] == w)) $display("FAIL @%0t: %s", $time, $sformatf("debug word sel %0d k %0d: %h want %h", dbg_sel, calc_k, tek[15:4], w));
        dbg_used[dbg_sel]++;
      end
      calc_k = dut.fir_calc ? calc_k + 1 : 0;
    end
  end

  task automatic run_outputs(input int n);
    repeat (n) begin
      @(posedge clk iff dac_valid);
      #1;
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) hist[i] = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    phase = 0; sw_page = 2'd0; sw_range = RNG_10_0; dbg_sel = DBG_ROM;
    run_outputs(40);

    phase = 1; n_in = 0; sw_page = 2'd1; sw_range = RNG_15_5; dbg_sel = DBG_MEM;
    run_outputs(70);

    phase = 2; sw_page = 2'd2; dbg_sel = DBG_ADC;
    for (int i = 0; i < 40; i++) begin
      sw_range = range_sel_e'(i % 4);
      if (i == 20) inject = 1'b1;
      run_outputs(1);
    end

    phase = 3; sw_page = 2'd3; sw_range = RNG_10_0; dbg_sel = DBG_DAC;
    run_outputs(40);

    for (int i = 0; i < 4; i++) begin
      if (!ok(page_used[i] > 0)) $display("FAIL @%0t: %s", $time, $sformatf("page %0d never used", i));
      if (!ok(range_used[i] > 0)) $display("FAIL @%0t: %s", $time, $sformatf("range %0d never used", i));
      if (!ok(dbg_used[i] > 0)) $display("FAIL @%0t: %s", $time, $sformatf("debug select %0d never used", i));
    end
    if (!ok(sine_null > 0)) $display("FAIL @%0t: %s", $time, "sine null never observed");
    if (!ok(range_wrap > 0)) $display("FAIL @%0t: %s", $time, "range wrap-around never happened");
    if (!ok(dropped > 0)) $display("FAIL @%0t: %s", $time, "no sample arrived while busy");
    $display("outputs=%0d sine_null=%0d range_wrap=%0d dropped=%0d", outputs, sine_null, range_wrap, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000 * 200) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
