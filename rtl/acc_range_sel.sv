// acc_range_sel: picks the 12-bit output word out of the 29-bit accumulator.
//
// The output keeps the accumulator's sign bit (bit 28) as its MSB and takes
// 11 further bits from one of four ranges, chosen by two switches:
//   sel 0: acc[10:0]   sel 1: acc[15:5]   sel 2: acc[20:10]   sel 3: acc[25:15]
// How large the filtered signal is depends on the coefficients and the input,
// so the range is picked by hand; a range too low for the signal wraps and
// distorts it, one too high leaves only a few active bits. The four ranges are
// those of the original design. Purely combinational.
module acc_range_sel
  import fir_pkg::*;
#(
  parameter int ACCW = FIR_ACCW
) (
  input  logic signed [ACCW-1:0] acc,
  input  range_sel_e             sel,
  output logic signed [11:0]     subset
);

  always_comb begin
    unique case (sel)
      RNG_10_0:  subset = {acc[ACCW-1], acc[10:0]};
      RNG_15_5:  subset = {acc[ACCW-1], acc[15:5]};
      RNG_20_10: subset = {acc[ACCW-1], acc[20:10]};
      default:   subset = {acc[ACCW-1], acc[25:15]};
    endcase
  end

  initial assert (ACCW >= 27) else $error("acc_range_sel: ACCW must exceed bit 25");

endmodule
