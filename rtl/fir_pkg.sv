// fir_pkg: widths, types and encodings shared by the FIR filter blocks.
//
// The filter multiplies 12-bit signed samples by 12-bit signed coefficients,
// giving 24-bit products that are sign-extended into a 29-bit accumulator
// (24 bits plus 5 bits of growth for 32 terms). These widths and the 32-tap,
// 4-page coefficient ROM are the ones the filter was designed around; the
// enumerations below are this implementation's own encodings.
package fir_pkg;

  localparam int FIR_NTAPS = 32;   // coefficients per ROM page
  localparam int FIR_DW    = 12;   // sample, coefficient and DAC word width
  localparam int FIR_PW    = 24;   // product width (12 x 12)
  localparam int FIR_ACCW  = 29;   // accumulator width

  typedef logic signed [FIR_DW-1:0]   sample_t;
  typedef logic signed [FIR_DW-1:0]   coef_t;
  typedef logic signed [FIR_PW-1:0]   prod_t;
  typedef logic signed [FIR_ACCW-1:0] acc_t;

  // Word shown on the 12 data pins of the debug port.
  typedef enum logic [1:0] {
    DBG_ROM = 2'd0,   // coefficient ROM output
    DBG_MEM = 2'd1,   // sample shift register (data memory) output
    DBG_ADC = 2'd2,   // ADC sample after offset removal
    DBG_DAC = 2'd3    // word sent to the DAC
  } dbg_sel_e;

  // Accumulator bit range sent to the DAC (switches sw7, sw6).
  typedef enum logic [1:0] {
    RNG_10_0  = 2'd0,
    RNG_15_5  = 2'd1,
    RNG_20_10 = 2'd2,
    RNG_25_15 = 2'd3
  } range_sel_e;

  typedef enum logic [2:0] {
    S_IDLE,    // waiting for a sample
    S_LOAD,    // shift the new sample in, clear the accumulator
    S_CALC,    // NTAPS multiply-accumulate steps
    S_DRAIN,   // last product reaches the accumulator
    S_OUT      // accumulator final: load the output register
  } ctrl_state_e;

endpackage
