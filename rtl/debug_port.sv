// debug_port: 16 logic-analyzer pins on the TEK1/TEK2 connectors.
//
// Pin map (tek[i] is analyzer input DIO i):
//   DIO0  bclk (the system clock, forwarded)
//   DIO1  fir_calc
//   DIO2  load_fir_shiftR
//   DIO3  fir_shift_en
//   DIO4..DIO15  a 12-bit data word, bit 0 on DIO4
// sel picks the data word: ROM output, data memory (sample shift register)
// output, offset-corrected ADC sample, or DAC word. With the ROM selected the
// analyzer can check that coefficient k leaves the ROM in the k-th cycle of
// fir_calc. The pin map is the one used when debugging the original design;
// the data select is this implementation's addition. All paths are
// combinational, so the pins show the signals in the cycle they occur.
module debug_port
  import fir_pkg::*;
(
  input  logic        clk,
  input  dbg_sel_e    sel,
  input  logic [11:0] rom_data,
  input  logic [11:0] mem_data,
  input  logic [11:0] adc_data,
  input  logic [11:0] dac_data,
  input  logic        fir_calc,
  input  logic        load_fir_shiftR,
  input  logic        fir_shift_en,
  output logic [15:0] tek
);

  logic [11:0] word;

  always_comb begin
    unique case (sel)
      DBG_ROM: word = rom_data;
      DBG_MEM: word = mem_data;
      DBG_ADC: word = adc_data;
      default: word = dac_data;
    endcase
  end

  assign tek = {word, fir_shift_en, load_fir_shiftR, fir_calc, clk};

endmodule
