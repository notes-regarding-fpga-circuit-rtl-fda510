// coef_rom: paged FIR coefficient ROM with a registered output.
//
// DEPTH words of WIDTH bits, seen as 4 pages of NTAPS coefficients. The upper
// two address bits pick the page (driven from two switches), the lower bits
// pick the coefficient. The output register means data appears one clock
// after its address. Contents, page by page:
//   page 0: first word 0x001, the rest 0x000 (passes the input unchanged)
//   page 1: every word 0x001 (NTAPS-sample moving average)
//   page 2: low-pass set, c[k] = 8*min(k+1, NTAPS-k) (triangular window)
//   page 3: first word 0xFFF (-1), the rest 0x000 (inverts the input)
// Page 3 makes sure no bit position is zero in every word, so synthesis
// cannot prune output flip-flops from the ROM. Pages 0, 1 and 3 and the
// paging scheme follow the original design; the values of the low-pass page
// are this implementation's choice, since only "a low-pass set" was given.
// With RAMP_TEST=1 every page instead holds 0, 1, ..., NTAPS-1, a debug
// pattern that makes the address sequence visible on a logic analyzer.
module coef_rom #(
  parameter int DEPTH     = 128,
  parameter int WIDTH     = 12,
  parameter int NTAPS     = 32,
  parameter bit RAMP_TEST = 1'b0
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic signed [WIDTH-1:0]  data
);

  localparam int IW = $clog2(NTAPS);

  logic [WIDTH-1:0] mem [DEPTH];

  function automatic logic [WIDTH-1:0] init_word(int a);
    int page, k, tri_w;
    page  = a / NTAPS;
    k     = a % NTAPS;
    tri_w = (k + 1 < NTAPS - k) ? k + 1 : NTAPS - k;
    if (RAMP_TEST) return WIDTH'(k);
    case (page)
      0:       return (k == 0) ? WIDTH'(1) : '0;
      1:       return WIDTH'(1);
      2:       return WIDTH'(8 * tri_w);
      default: return (k == 0) ? '1 : '0;
    endcase
  endfunction

  initial begin
    for (int a = 0; a < DEPTH; a++) mem[a] = init_word(a);
  end

  always_ff @(posedge clk) data <= mem[addr];

  initial assert (DEPTH == 4 * NTAPS && NTAPS == 2 ** IW)
    else $error("coef_rom: DEPTH must be 4 pages of a power-of-two NTAPS");

endmodule
