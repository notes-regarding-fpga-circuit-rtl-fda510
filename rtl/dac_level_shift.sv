// dac_level_shift: turns the signed filter output into a DAC code.
//
// Adds 2047, the largest positive 12-bit two's-complement number, to the
// signed word so that negative half-cycles become DAC codes below mid-scale:
// -2047 -> 0, 0 -> 2047, +2047 -> 4094. The sum is 12 bits wide and wraps,
// so the single value -2048 maps to 4095. This follows the original design.
// Purely combinational.
module dac_level_shift #(
  parameter int DW = 12
) (
  input  logic signed [DW-1:0] subset,
  output logic [DW-1:0]        dac_word
);

  localparam logic signed [DW-1:0] HALF = {1'b0, {(DW-1){1'b1}}};

  assign dac_word = unsigned'(subset + HALF);

endmodule
