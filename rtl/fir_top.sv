// fir_top: 32-tap FIR filter between an ADC and a DAC, with debug pins.
//
// Data path, per sample:
//   sample_timer  --adc_start-->  (external ADC driver)  --adc_valid/adc_data-->
//   adc_offset (subtract 2048) -> sample register -> sample_shreg (data memory)
//   coef_rom (page from sw_page) --\
//   sample_shreg output ------------> fir_mult (12x12 -> 24) -> fir_accum (29)
//   fir_accum -> acc_range_sel (sw_range) -> dac_level_shift (+2047)
//             -> output register -> dac_data/dac_valid (to the external DAC driver)
// fir_ctrl sequences one sample in NTAPS+3 clocks (see fir_ctrl). The output
// word for the sample whose adc_valid came in clock t is on dac_data from
// clock t+NTAPS+5 on, with dac_valid high for that one clock; it holds until
// the next result. A sample that arrives while the previous one is still
// being filtered is dropped. The switches act at once: sw_page changes the
// coefficient set from the next sample on, sw_range the bits of the next
// output. debug_port drives tek[15:0] with the clock, the three control
// signals and a 12-bit word chosen by dbg_sel.
// Widths, the ROM paging, the output ranges, the offset and level-shift
// arithmetic and the debug pin map follow the original design; the sample
// rate divider's clock frequency, the ADC/DAC handshake and the sequencing
// are this implementation's choices.
module fir_top
  import fir_pkg::*;
#(
  parameter int NTAPS      = FIR_NTAPS,
  parameter int SAMPLE_DIV = 5000,
  parameter bit RAMP_TEST  = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  sw_page,
  input  range_sel_e  sw_range,
  input  dbg_sel_e    dbg_sel,
  output logic        adc_start,
  input  logic        adc_valid,
  input  logic [11:0] adc_data,
  output logic        dac_valid,
  output logic [11:0] dac_data,
  output logic [15:0] tek
);

  localparam int IW = $clog2(NTAPS);

  // Controller outputs
  logic          fir_shift_en, load_fir_shiftR, fir_calc;
  logic [IW-1:0] coef_idx;
  logic          mac_valid, acc_clr, out_load, busy;

  // Data path
  sample_t             adc_sample, sample_q, tap;
  coef_t               coef;
  logic                prod_valid;
  prod_t               prod;
  acc_t                acc;
  logic signed [11:0]  acc_subset;
  logic [11:0]         dac_word;
  logic                start;

  sample_timer #(.DIV(SAMPLE_DIV)) u_timer (
    .clk (clk), .rst (rst), .tick (adc_start)
  );

  adc_offset #(.DW(FIR_DW)) u_adc_offset (
    .adc_raw (adc_data), .sample (adc_sample)
  );

  // Hold the sample until the controller loads it; start one clock later.
  always_ff @(posedge clk) begin
    if (rst) begin
      sample_q <= '0;
      start    <= 1'b0;
    end else begin
      start <= adc_valid && !busy;
      if (adc_valid && !busy) sample_q <= adc_sample;
    end
  end

  fir_ctrl #(.NTAPS(NTAPS)) u_ctrl (
    .clk (clk), .rst (rst), .sample_valid (start),
    .fir_shift_en (fir_shift_en), .load_fir_shiftR (load_fir_shiftR),
    .fir_calc (fir_calc), .coef_addr (coef_idx), .mac_valid (mac_valid),
    .acc_clr (acc_clr), .out_load (out_load), .busy (busy)
  );

  sample_shreg #(.NTAPS(NTAPS), .DW(FIR_DW)) u_shreg (
    .clk (clk), .rst (rst), .shift_en (fir_shift_en), .load (load_fir_shiftR),
    .din (sample_q), .dout (tap)
  );

  coef_rom #(.DEPTH(4 * NTAPS), .WIDTH(FIR_DW), .NTAPS(NTAPS), .RAMP_TEST(RAMP_TEST)) u_rom (
    .clk (clk), .addr ({sw_page, coef_idx}), .data (coef)
  );

  fir_mult #(.AW(FIR_DW), .BW(FIR_DW)) u_mult (
    .clk (clk), .in_valid (mac_valid), .a (tap), .b (coef),
    .out_valid (prod_valid), .p (prod)
  );

  fir_accum #(.PW(FIR_PW), .ACCW(FIR_ACCW)) u_accum (
    .clk (clk), .clr (acc_clr), .en (prod_valid), .p (prod), .acc (acc)
  );

  acc_range_sel #(.ACCW(FIR_ACCW)) u_range (
    .acc (acc), .sel (sw_range), .subset (acc_subset)
  );

  dac_level_shift #(.DW(FIR_DW)) u_level (
    .subset (acc_subset), .dac_word (dac_word)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      dac_data  <= 12'd2047;
      dac_valid <= 1'b0;
    end else begin
      dac_valid <= out_load;
      if (out_load) dac_data <= dac_word;
    end
  end

  debug_port u_dbg (
    .clk (clk), .sel (dbg_sel),
    .rom_data (coef), .mem_data (tap), .adc_data (adc_sample), .dac_data (dac_data),
    .fir_calc (fir_calc), .load_fir_shiftR (load_fir_shiftR), .fir_shift_en (fir_shift_en),
    .tek (tek)
  );

endmodule
