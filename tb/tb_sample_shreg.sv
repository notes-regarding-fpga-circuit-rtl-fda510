// tb_sample_shreg: random loads, rotations and idle cycles against a queue
// model of the shift register; also checks that NTAPS rotations return the
// newest sample to the output.
module tb_sample_shreg;
  localparam int N = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst = 1'b1, shift_en = 1'b0, load = 1'b0;
  logic signed [11:0] din = '0, dout;
  logic signed [11:0] model [N];

  sample_shreg dut (.clk, .rst, .shift_en, .load, .din, .dout);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic step(input bit en, input bit ld, input logic signed [11:0] d);
    logic signed [11:0] tmp [N];
    @(negedge clk);
    shift_en = en; load = ld; din = d;
    @(posedge clk) #1;
    tmp = model;
    if (en && ld) begin
      model[0] = d;
      for (int i = 1; i < N; i++) model[i] = tmp[i-1];
    end else if (en) begin
      for (int i = 0; i < N; i++) model[i] = tmp[(i + 1) % N];
    end
    check(dout == model[0], $sformatf("dout %0d want %0d", dout, model[0]));
  endtask

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // Fill with known samples, then run full rotations as the filter does.
    for (int s = 0; s < 40; s++) begin
      logic signed [11:0] v;
      v = 12'($urandom);
      step(1'b1, 1'b1, v);
      check(dout == v, "newest sample not at the output after a load");
      for (int k = 0; k < N; k++) step(1'b1, 1'b0, '0);
      check(dout == v, "register not back in place after NTAPS rotations");
    end
    // Random mix including disabled cycles.
    for (int i = 0; i < 2000; i++)
      step(1'($urandom), 1'($urandom), 12'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
