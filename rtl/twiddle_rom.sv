// Wavetable of the DFT kernel exp(-j*2*pi*k*n/N).
//
// A single table of N cosine values in Q15 serves both parts of the kernel:
// for phase index m (= k*n mod N) it returns cos(2*pi*m/N) and
// sin(2*pi*m/N), the sine being read from the same table a quarter period
// earlier (index m - N/4 mod N). The DFT negates the sine term itself.
// Reads are synchronous: both values appear one cycle after idx.
//
// Table contents: c[m] = round(32768*cos(2*pi*m/N)), clamped to 32767,
// computed at elaboration by cos_q15 of dsp_lcd_pkg. The kernel is the
// documented one; the table format and the quarter-period sine lookup are
// this design's choices. N must be a multiple of 4.
module twiddle_rom
  import dsp_lcd_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic                 clk,
  input  logic [$clog2(N)-1:0] idx,
  output logic signed [15:0]   cos_v,
  output logic signed [15:0]   sin_v
);

  localparam int unsigned AW = $clog2(N);
  typedef logic signed [15:0] table_t [N];

  function automatic table_t build();
    table_t t;
    for (int i = 0; i < int'(N); i++) t[i] = cos_q15(i, int'(N));
    return t;
  endfunction

  localparam table_t TABLE = build();

  logic [AW-1:0] sin_idx;
  assign sin_idx = idx - AW'(N / 4);

  always_ff @(posedge clk) begin
    cos_v <= TABLE[idx];
    sin_v <= TABLE[sin_idx];
  end

endmodule
