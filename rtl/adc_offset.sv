// adc_offset: removes the mid-scale offset from an ADC word.
//
// The ADC delivers an unsigned word whose mid-scale, 2048, stands for 0 V of
// AC signal. Adding the 12-bit two's-complement pattern 1000_0000_0000 (which
// is -2048) to the word read as signed subtracts 2048 modulo 4096 and gives
// the signed sample: 0 -> -2048, 2048 -> 0, 4095 -> +2047. This is the
// original design's method. Purely combinational.
module adc_offset #(
  parameter int DW = 12
) (
  input  logic [DW-1:0]        adc_raw,
  output logic signed [DW-1:0] sample
);

  localparam logic signed [DW-1:0] MID = {1'b1, {(DW-1){1'b0}}};

  assign sample = signed'(adc_raw) + MID;

endmodule
