// tb_fir_accum: sums of 32 products (including the most negative ones) and
// random clear/enable traffic against a 64-bit model truncated to 29 bits.
module tb_fir_accum;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic clr = 1'b1, en = 1'b0;
  logic signed [23:0] p = '0;
  logic signed [28:0] acc;
  longint model;

  fir_accum dut (.clk, .clr, .en, .p, .acc);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic step(input bit c, input bit e, input int v);
    @(negedge clk);
    clr = c; en = e; p = 24'(v);
    @(posedge clk) #1;
    if (c) model = 0;
    else if (e) model += longint'(signed'(24'(v)));
    check(longint'(acc) == model, $sformatf("acc %0d want %0d", acc, model));
  endtask

  initial begin
    model = 0;
    step(1'b1, 1'b0, 0);
    // Full-scale window: 32 x (-2048 * -2048) = 2^27 fits in 29 bits.
    for (int i = 0; i < 32; i++) step(1'b0, 1'b1, 4194304);
    // 32 x (-2048 * 2047): a large negative sum.
    step(1'b1, 1'b0, 0);
    for (int i = 0; i < 32; i++) step(1'b0, 1'b1, -4192256);
    // Random windows of 32 products.
    for (int w = 0; w < 100; w++) begin
      step(1'b1, 1'($urandom), 0);
      for (int i = 0; i < 32; i++)
        step(1'b0, 1'($urandom_range(0, 3) != 0),
             int'(signed'(12'($urandom))) * int'(signed'(12'($urandom))));
    end
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
