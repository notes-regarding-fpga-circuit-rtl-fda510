// tb_acc_range_sel: every range against a shift-and-mask model, for random
// and edge-case accumulator values.
module tb_acc_range_sel;
  import fir_pkg::*;
  int checks = 0, failures = 0;
  logic signed [28:0] acc;
  range_sel_e sel;
  logic signed [11:0] subset;

  acc_range_sel dut (.acc, .sel, .subset);

  initial begin
    int lo [4] = '{0, 5, 10, 15};
    for (int i = 0; i < 4000; i++) begin
      logic [11:0] want;
      case (i)
        0: acc = '0;
        1: acc = '1;
        2: acc = 29'h1000_0000;
        3: acc = 29'h0FFF_FFFF;
        default: acc = 29'($urandom);
      endcase
      sel = range_sel_e'(i % 4);
      want = {acc[28], 11'((acc >>> lo[i % 4]) & 29'h7FF)};
      #1;
      checks++;
      if (subset !== want) begin
        failures++;
        $display("FAIL: acc %h sel %0d got %h want %h", acc, i % 4, subset, want);
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
