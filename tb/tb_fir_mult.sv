// tb_fir_mult: corner and random operands; the product and valid bit must
// appear exactly one clock after the operands.
module tb_fir_mult;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic in_valid = 1'b0, out_valid;
  logic signed [11:0] a = '0, b = '0;
  logic signed [23:0] p;

  fir_mult dut (.clk, .in_valid, .a, .b, .out_valid, .p);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic apply(input int x, input int y, input bit v);
    int want;
    @(negedge clk);
    a = 12'(x); b = 12'(y); in_valid = v;
    want = int'(signed'(12'(x))) * int'(signed'(12'(y)));
    @(posedge clk) #1;
    check(out_valid == v, "valid not delayed by one clock");
    check(int'(p) == want, $sformatf("%0d * %0d = %0d, got %0d", signed'(12'(x)), signed'(12'(y)), want, p));
  endtask

  initial begin
    int corners [6] = '{-2048, -2047, -1, 0, 1, 2047};
    foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j], 1'b1);
    for (int i = 0; i < 3000; i++) apply(int'($urandom), int'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
