// Shared constants, types and table functions for the DSP-to-LCD link.
//
// The link has two halves. The signal half is a real-time 128-point DFT
// that turns codec samples into a power spectrum held in two ping-pong
// buffers of DSP data memory (DM). The host half is a small CPLD that lets an
// 8-bit micro-controller read that memory through the DSP's 16-bit IDMA port.
// This package holds what both halves agree on: the DFT length, the data
// width, the layout of the IDMA control word and the DM addresses of the
// spectrum buffers and of the "block ready" variable the host polls.
//
// The DFT length (128), the 16-bit word size and the 14-bit IDMA address are the documented figures. The DM
// addresses of the buffers and of the ready variable, the bit position of the
// PM/DM select (bit 14, as on the ADSP-2181) and the Q15 table rounding are
// choices of this design.
package dsp_lcd_pkg;

  localparam int unsigned DFT_N      = 128;   // points per DFT block
  localparam int unsigned IDMA_AW    = 14;    // IDMA address field

  // Default DM placement of the two power spectrum buffers (bank 0 at
  // SPEC_BASE, bank 1 right after it) and of the ready variable.
  localparam logic [IDMA_AW-1:0] SPEC_BASE_DEFAULT  = 14'h2000;
  localparam logic [IDMA_AW-1:0] READY_ADDR_DEFAULT = 14'h2100;

  // Memory space selected by bit 14 of the IDMA control word.
  typedef enum logic {
    IDMA_SPACE_PM = 1'b0,
    IDMA_SPACE_DM = 1'b1
  } idma_space_e;

  typedef struct packed {
    logic        unused;      // bit 15
    idma_space_e space;       // bit 14
    logic [IDMA_AW-1:0] addr; // bits 13..0, auto-incremented after each access
  } idma_ctrl_t;

  // round(32768 * cos(2*pi*i/n)), clamped to the Q15 range.
  function automatic logic signed [15:0] cos_q15(input int i, input int n);
    real v;
    v = $cos(2.0 * 3.14159265358979323846 * real'(i) / real'(n)) * 32768.0;
    if (v > 32767.0) v = 32767.0;
    if (v < -32768.0) v = -32768.0;
    return 16'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // Hann window in Q15: round(32768 * (0.5 - 0.5*cos(2*pi*i/n))), clamped.
  function automatic logic signed [15:0] hann_q15(input int i, input int n);
    real v;
    v = (0.5 - 0.5 * $cos(2.0 * 3.14159265358979323846 * real'(i) / real'(n))) * 32768.0;
    if (v > 32767.0) v = 32767.0;
    return 16'($rtoi(v + 0.5));
  endfunction

endpackage
