// Ping-pong power spectrum buffers and the "block ready" variable, as seen
// in DSP data memory.
//
// The DFT writes the power of bin k to word k of the fill bank. When a block
// is complete (swap), the ready variable is set to the data-memory base
// address of the bank just filled and the banks change roles, so the host
// can copy the finished block while the next one is being written. Bank 0
// sits at SPEC_BASE, bank 1 at SPEC_BASE + N and the ready variable at
// READY_ADDR, all in data memory.
//
// The host side (the IDMA port) reads any of these words: rd_en with rd_addr
// returns the word on rd_data one cycle later; addresses outside them read as
// zero. A host write (host_we) changes only the ready variable, so the host
// can set it back to 0 after taking a block; a swap in the same cycle wins.
//
// Two output buffers of N words and publishing the base address of the
// finished one through a variable that is 0 while no block is available are
// documented; the addresses, the clearing by the host and the read latency
// are this design's choices.
module spectrum_buffer
  import dsp_lcd_pkg::*;
#(
  parameter int unsigned        N          = 128,
  parameter logic [IDMA_AW-1:0] SPEC_BASE  = SPEC_BASE_DEFAULT,
  parameter logic [IDMA_AW-1:0] READY_ADDR = READY_ADDR_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // DFT side
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  logic [15:0]          wdata,
  input  logic                 swap,
  output logic                 fill_bank,
  // host (IDMA) side
  input  logic                 rd_en,
  input  logic [IDMA_AW-1:0]   rd_addr,
  output logic [15:0]          rd_data,
  input  logic                 host_we,
  input  logic [IDMA_AW-1:0]   host_addr,
  input  logic [15:0]          host_wdata,
  output logic [15:0]          ready_var
);

  localparam int unsigned AW = $clog2(N);

  logic [15:0] mem [2*N];
  logic [15:0] mem_q;
  logic        sel_mem, sel_ready;
  logic [IDMA_AW-1:0] offs;

  logic [IDMA_AW-1:0] bank_base;

  assign offs      = rd_addr - SPEC_BASE;
  assign bank_base = fill_bank ? SPEC_BASE + IDMA_AW'(N) : SPEC_BASE;

  always_ff @(posedge clk) begin
    if (we) mem[{fill_bank, waddr}] <= wdata;
    if (rd_en) mem_q <= mem[offs[AW:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_bank <= 1'b0;
      ready_var <= '0;
      sel_mem   <= 1'b0;
      sel_ready <= 1'b0;
    end else begin
      if (swap) begin
        fill_bank <= ~fill_bank;
        ready_var <= 16'(bank_base);
      end else if (host_we && host_addr == READY_ADDR) begin
        ready_var <= host_wdata;
      end
      if (rd_en) begin
        sel_mem   <= (rd_addr >= SPEC_BASE) && (rd_addr < SPEC_BASE + IDMA_AW'(2 * N));
        sel_ready <= (rd_addr == READY_ADDR);
      end
    end
  end

  assign rd_data = sel_mem ? mem_q : (sel_ready ? ready_var : '0);

endmodule
