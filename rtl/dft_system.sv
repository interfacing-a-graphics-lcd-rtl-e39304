// Real-time windowed DFT: codec samples in, power spectrum in data memory out.
//
// Samples fill one of two input buffers while the DFT processes the other.
// Each time a buffer fills (every N samples) the core starts on it: every
// sample is windowed, an N-point DFT is taken and the power re^2 + im^2 of
// each bin is written to one of two output buffers. When the last bin is
// written the output buffers swap and the ready variable is set to the base
// address of the finished buffer, for the host to copy through IDMA.
//
// Real-time operation requires the DFT (N*N + 5 cycles) to finish before the
// next input buffer is full, i.e. a sample period of more than about N + 1
// clock cycles. If a buffer fills while the DFT is still busy, that block is
// dropped and overrun pulses for one cycle.
//
// Interface: s_valid/s_data carry one codec sample; dm_* is the data-memory
// port used by the IDMA port (see spectrum_buffer); block_done pulses when a
// new spectrum has been published. The arrangement follows the documented
// block diagram of the DFT program; the overrun flag is this design's.
module dft_system
  import dsp_lcd_pkg::*;
#(
  parameter int unsigned        N          = DFT_N,
  parameter logic [IDMA_AW-1:0] SPEC_BASE  = SPEC_BASE_DEFAULT,
  parameter logic [IDMA_AW-1:0] READY_ADDR = READY_ADDR_DEFAULT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                s_valid,
  input  logic signed [15:0]  s_data,
  input  logic [IDMA_AW-1:0]  dm_addr,
  input  logic                dm_re,
  output logic [15:0]         dm_rdata,
  input  logic                dm_we,
  input  logic [15:0]         dm_wdata,
  output logic [15:0]         ready_var,
  output logic                block_done,
  output logic                overrun
);

  localparam int unsigned AW = $clog2(N);

  logic                block_ready, busy, done;
  logic [AW-1:0]       x_addr, tw_idx, bin_k, p_k;
  logic signed [15:0]  x_data, w_data, tw_cos, tw_sin, bin_re, bin_im;
  logic                bin_valid, p_valid;
  logic [15:0]         p_val;
  logic                done_q;

  sample_buffer #(.N(N), .W(16)) u_in (
    .clk, .rst_n, .s_valid, .s_data, .rd_addr(x_addr), .rd_data(x_data),
    .block_ready, .fill_bank()
  );

  window_rom #(.N(N)) u_win (.clk, .addr(x_addr), .coef(w_data));

  twiddle_rom #(.N(N)) u_tw (.clk, .idx(tw_idx), .cos_v(tw_cos), .sin_v(tw_sin));

  dft_core #(.N(N), .W(16), .ACC_W(40)) u_dft (
    .clk, .rst_n, .start(block_ready), .busy, .done,
    .x_addr, .x_data, .w_data, .tw_idx, .tw_cos, .tw_sin,
    .bin_valid, .bin_k, .bin_re, .bin_im
  );

  power_unit #(.KW(AW)) u_pow (
    .clk, .rst_n, .in_valid(bin_valid), .in_k(bin_k), .re(bin_re), .im(bin_im),
    .out_valid(p_valid), .out_k(p_k), .power(p_val)
  );

  // The power of the last bin is written one cycle after done.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done_q <= 1'b0;
    else        done_q <= done;
  end

  spectrum_buffer #(.N(N), .SPEC_BASE(SPEC_BASE), .READY_ADDR(READY_ADDR)) u_out (
    .clk, .rst_n,
    .we(p_valid), .waddr(p_k), .wdata(p_val), .swap(done_q), .fill_bank(),
    .rd_en(dm_re), .rd_addr(dm_addr), .rd_data(dm_rdata),
    .host_we(dm_we), .host_addr(dm_addr), .host_wdata(dm_wdata),
    .ready_var
  );

  assign block_done = done_q;
  assign overrun    = block_ready & busy;

endmodule
