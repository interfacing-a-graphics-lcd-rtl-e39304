// Window table of the real-time DFT.
//
// Holds N window coefficients in Q15 and returns the one addressed, one cycle
// later. Every input sample is multiplied by its coefficient before the DFT,
// to reduce leakage between bins. The table is built at elaboration time by
// the constant function hann_q15 of dsp_lcd_pkg:
//   w[n] = round(32768 * (0.5 - 0.5*cos(2*pi*n/N))), clamped to 32767.
// Only the presence of a window table is documented; the Hann shape, the Q15
// format and the synchronous read are this design's choices.
module window_rom
  import dsp_lcd_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic                 clk,
  input  logic [$clog2(N)-1:0] addr,
  output logic signed [15:0]   coef
);

  typedef logic signed [15:0] table_t [N];

  function automatic table_t build();
    table_t t;
    for (int i = 0; i < int'(N); i++) t[i] = hann_q15(i, int'(N));
    return t;
  endfunction

  localparam table_t TABLE = build();

  always_ff @(posedge clk) coef <= TABLE[addr];

endmodule
