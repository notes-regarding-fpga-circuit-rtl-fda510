// fir_ctrl: sequencer of the multiply-accumulate FIR filter.
//
// One multiplier serves all NTAPS taps, so every sample takes NTAPS+3 clocks:
//   S_LOAD  (1 clock)     load_fir_shiftR=1, fir_shift_en=1: the new sample is
//                         shifted in; acc_clr=1 clears the accumulator; the
//                         ROM address is 0, so the ROM registers coefficient 0.
//   S_CALC  (NTAPS clks)  fir_calc=1, fir_shift_en=1: in the k-th clock
//                         (k = 0..NTAPS-1) the registered ROM shows
//                         coefficient k and the shift register shows sample
//                         x[n-k]; the multiplier takes both (mac_valid=1),
//                         the register rotates and the address moves to k+1.
//   S_DRAIN (1 clock)     the last product enters the accumulator.
//   S_OUT   (1 clock)     out_load=1: the accumulator holds y[n].
// Samples are taken in S_IDLE only; a sample_valid pulse in any other state
// is ignored (busy=1). The address is 0 while idle, which puts coefficient 0
// on the ROM output in the first clock of fir_calc, as the original design's
// logic-analyzer check expects. The signal names fir_calc, load_fir_shiftR
// and fir_shift_en are the original design's; the state machine is this
// implementation's own.
module fir_ctrl
  import fir_pkg::*;
#(
  parameter int NTAPS = FIR_NTAPS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     sample_valid,
  output logic                     fir_shift_en,
  output logic                     load_fir_shiftR,
  output logic                     fir_calc,
  output logic [$clog2(NTAPS)-1:0] coef_addr,
  output logic                     mac_valid,
  output logic                     acc_clr,
  output logic                     out_load,
  output logic                     busy
);

  localparam int IW = $clog2(NTAPS);

  ctrl_state_e   state;
  logic [IW-1:0] k;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      k     <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (sample_valid) state <= S_LOAD;
        S_LOAD:  begin
          state <= S_CALC;
          k     <= '0;
        end
        S_CALC:  begin
          k <= k + 1'b1;
          if (k == IW'(NTAPS - 1)) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_OUT;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign fir_calc        = (state == S_CALC);
  assign load_fir_shiftR = (state == S_LOAD);
  assign fir_shift_en    = (state == S_LOAD) || (state == S_CALC);
  assign acc_clr         = (state == S_LOAD);
  assign mac_valid       = fir_calc;
  assign out_load        = (state == S_OUT);
  assign busy            = (state != S_IDLE);
  // Address runs one ahead of k because the ROM output is registered.
  assign coef_addr       = fir_calc ? k + 1'b1 : '0;

  initial assert (NTAPS == 2 ** IW) else $error("fir_ctrl: NTAPS must be a power of two");

  // fir_calc lasts exactly NTAPS clocks: it starts with k = 0 and ends
  // right after k = NTAPS-1.
  a_calc_start: assert property (@(posedge clk) disable iff (rst)
    $rose(fir_calc) |-> k == '0);
  a_calc_end: assert property (@(posedge clk) disable iff (rst)
    fir_calc && k == IW'(NTAPS - 1) |=> !fir_calc);

endmodule
