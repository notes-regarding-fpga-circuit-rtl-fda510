// fir_accum: sign-extending accumulator (acc_reg).
//
// Each clock with en=1 the PW-bit signed product is sign-extended to ACCW
// bits and added to the accumulator; clr=1 sets it to zero and wins over en.
// With 32 products of 12 x 12 bits the sum cannot overflow 29 bits: the
// largest magnitude, 32 * 2048 * 2048, is 2^27. The 24-to-29-bit sign extension and
// the 29-bit width follow the original design; the clear/enable interface
// is this implementation's.
module fir_accum #(
  parameter int PW   = 24,
  parameter int ACCW = 29
) (
  input  logic                   clk,
  input  logic                   clr,
  input  logic                   en,
  input  logic signed [PW-1:0]   p,
  output logic signed [ACCW-1:0] acc
);

  logic signed [ACCW-1:0] p_ext;

  // Sign extension: replicate the product's sign bit into the upper bits.
  assign p_ext = {{(ACCW-PW){p[PW-1]}}, p};

  always_ff @(posedge clk) begin
    if (clr)     acc <= '0;
    else if (en) acc <= acc + p_ext;
  end

endmodule
