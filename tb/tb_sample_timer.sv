// tb_sample_timer: the default divider (5000) and a short one (7); each must
// tick for one clock every DIV clocks, the first DIV clocks after reset.
module tb_sample_timer;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst = 1'b1, tick, tick7;

  sample_timer dut (.clk, .rst, .tick);
  sample_timer #(.DIV(7)) dut7 (.clk, .rst, .tick(tick7));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int cyc = 0, last = 0, last7 = 0, n = 0, n7 = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    while (cyc < 5000 * 4 + 10) begin
      @(posedge clk) #1;
      cyc++;
      if (tick) begin
        check(cyc - last == 5000, $sformatf("tick spacing %0d", cyc - last));
        last = cyc; n++;
      end
      if (tick7) begin
        check(cyc - last7 == 7, $sformatf("DIV=7 tick spacing %0d", cyc - last7));
        last7 = cyc; n7++;
      end
    end
    check(n == 4, $sformatf("%0d ticks of DIV=5000", n));
    check(n7 == (5000 * 4 + 10) / 7, $sformatf("%0d ticks of DIV=7", n7));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
