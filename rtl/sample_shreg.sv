// sample_shreg: data memory holding the last NTAPS input samples.
//
// A shift register with two moves, both gated by shift_en (fir_shift_en):
//   load=1 (load_fir_shiftR): the new sample din enters at position 0, every
//          sample moves one place older and the oldest is dropped.
//   load=0: the register rotates one place toward position 0, the sample at
//          position 0 going round to position NTAPS-1.
// dout is position 0, read without a register. Right after a load it is the
// newest sample x[n]; after k rotations it is x[n-k]; after NTAPS rotations
// the register is back where it started, ready for the next load. Reset
// clears the samples. The load and enable names follow the original design;
// the rotating read-out is this implementation's way of feeding one sample
// per clock to the multiplier.
module sample_shreg #(
  parameter int NTAPS = 32,
  parameter int DW    = 12
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 shift_en,
  input  logic                 load,
  input  logic signed [DW-1:0] din,
  output logic signed [DW-1:0] dout
);

  logic signed [DW-1:0] sr [NTAPS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NTAPS; i++) sr[i] <= '0;
    end else if (shift_en) begin
      if (load) begin
        sr[0] <= din;
        for (int i = 1; i < NTAPS; i++) sr[i] <= sr[i-1];
      end else begin
        for (int i = 0; i < NTAPS - 1; i++) sr[i] <= sr[i+1];
        sr[NTAPS-1] <= sr[0];
      end
    end
  end

  assign dout = sr[0];

endmodule
