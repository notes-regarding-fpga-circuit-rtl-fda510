// sample_timer: sample-rate strobe.
//
// Counts DIV clocks and pulses tick for one clock at the end of each count,
// so tick comes every DIV clocks. The default, 5000, gives a 20 kHz sample
// rate from a 100 MHz clock; the 20 kHz rate is the one the filter was tried
// at, the clock frequency is this implementation's assumption. The first tick
// comes DIV clocks after reset is released.
module sample_timer #(
  parameter int DIV = 5000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

  initial assert (DIV >= 2) else $error("sample_timer: DIV must be at least 2");

endmodule
