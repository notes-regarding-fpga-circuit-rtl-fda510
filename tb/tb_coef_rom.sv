// tb_coef_rom: checks every word of the coefficient ROM, its one-clock read
// latency, that no bit position is zero in all words, and the RAMP_TEST
// contents. Expected words are written out here from the page definitions.
module tb_coef_rom;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [6:0] addr = '0;
  logic signed [11:0] data, data_r;

  coef_rom dut (.clk(clk), .addr(addr), .data(data));
  coef_rom #(.RAMP_TEST(1'b1)) dut_r (.clk(clk), .addr(addr), .data(data_r));

  function automatic logic [11:0] expect_word(int a);
    int pg = a >> 5, k = a & 31;
    int lp [32] = '{8, 16, 24, 32, 40, 48, 56, 64, 72, 80, 88, 96, 104, 112, 120, 128,
                    128, 120, 112, 104, 96, 88, 80, 72, 64, 56, 48, 40, 32, 24, 16, 8};
    case (pg)
      0: return (k == 0) ? 12'h001 : 12'h000;
      1: return 12'h001;
      2: return 12'(lp[k]);
      default: return (k == 0) ? 12'hFFF : 12'h000;
    endcase
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [11:0] ored;

  initial begin
    ored = '0;
    for (int a = 0; a < 128; a++) begin
      @(negedge clk) addr = 7'(a);
      #1 if (a > 0) check(data == expect_word(a - 1), $sformatf("latency: data changed before the edge at %0d", a));
      @(posedge clk) #1;
      check(data == expect_word(a), $sformatf("addr %0d: got %h want %h", a, data, expect_word(a)));
      check(data_r == 12'(a & 31), $sformatf("ramp addr %0d: got %h", a, data_r));
      ored |= data;
    end
    check(ored == 12'hFFF, $sformatf("a bit position is zero in every word: %h", ored));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
