// tb_fir_ctrl: cycle-by-cycle check of the control sequence for one sample
// (load, NTAPS calc cycles with the address one ahead, drain, output), that
// a sample arriving while busy is ignored, and the NTAPS+3 clock duration.
module tb_fir_ctrl;
  localparam int N = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst = 1'b1, sample_valid = 1'b0;
  logic fir_shift_en, load_fir_shiftR, fir_calc, mac_valid, acc_clr, out_load, busy;
  logic [4:0] coef_addr;

  fir_ctrl dut (.clk, .rst, .sample_valid, .fir_shift_en, .load_fir_shiftR, .fir_calc,
                .coef_addr, .mac_valid, .acc_clr, .out_load, .busy);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Expected outputs in clock c after the clock that sampled sample_valid.
  task automatic expect_cycle(input int c);
    bit ld = (c == 0), calc = (c >= 1 && c <= N), outl = (c == N + 2);
    check(load_fir_shiftR == ld && acc_clr == ld, $sformatf("c%0d load/clr", c));
    check(fir_calc == calc && mac_valid == calc, $sformatf("c%0d fir_calc", c));
    check(fir_shift_en == (ld || calc), $sformatf("c%0d shift_en", c));
    check(out_load == outl, $sformatf("c%0d out_load", c));
    check(busy == (c <= N + 2), $sformatf("c%0d busy", c));
    check(coef_addr == (calc ? 5'(c) : 5'd0), $sformatf("c%0d addr %0d", c, coef_addr));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    @(negedge clk);
    check(!busy && coef_addr == 0 && !fir_shift_en, "idle outputs");
    for (int s = 0; s < 5; s++) begin
      int dur;
      dur = 0;
      @(negedge clk) sample_valid = 1'b1;
      @(negedge clk) sample_valid = 1'b0;
      for (int c = 0; c < N + 4; c++) begin
        expect_cycle(c);
        if (busy) dur++;
        // A sample pulse in the middle of the computation must be ignored.
        if (c == 5 + s) sample_valid = 1'b1;
        @(negedge clk) sample_valid = 1'b0;
      end
      check(dur == N + 3, $sformatf("computation took %0d clocks", dur));
      check(!busy, "controller restarted on a sample that came while busy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
