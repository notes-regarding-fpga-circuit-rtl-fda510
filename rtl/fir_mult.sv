// fir_mult: signed multiplier with one output register.
//
// p = a * b, AW x BW signed operands, AW+BW-bit signed product (24 bits for
// 12 x 12, as in the original design). The product and its valid bit are
// registered, so both appear one clock after the operands. The output
// register is this implementation's choice; it keeps the multiplier and the
// accumulator adder in separate clock cycles.
module fir_mult #(
  parameter int AW = 12,
  parameter int BW = 12
) (
  input  logic                    clk,
  input  logic                    in_valid,
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic                    out_valid,
  output logic signed [AW+BW-1:0] p
);

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    p         <= a * b;
  end

endmodule
