// Top level of the DSP-to-LCD link: a real-time DFT whose power spectrum a
// slow 8-bit micro-controller copies out through the DSP's IDMA port, via a
// small CPLD, to draw it on a graphics LCD.
//
// Inside: dft_system (input ping-pong buffers, window, 128-point DFT, power,
// output ping-pong buffers and the ready variable), idma_port (the DSP's
// host-memory port) and idma_bridge (the CPLD: four byte
// latches and glue logic). The micro-controller, the codec and the LCD are
// outside: the codec delivers s_valid/s_data, and the micro-controller's
// external bus comes in on ad_*, a0, a1, a_hi, exc_n, wr_n and rd_n (see
// idma_glue for its register map). The IDMA bus between bridge and port is
// internal; iack_n and the current IDMA control word are brought out for
// observation, as are block_done, overrun and the ready variable. Data
// memory, as far as the host sees it, is the spectrum buffer inside
// dft_system; the DSP's program memory is not part of the design, so the
// IDMA port's program-memory side (pm_*, 24-bit words) goes out as ports.
//
// The display side, lcd_display (a 128-word bin buffer and the bar-graph LCD
// sequencer), stands beside them: the micro-controller that would copy each
// block from the IDMA bridge into it is outside the design, so its buffer
// write port (disp_wr_*) and disp_start come in as ports and the LCD pins
// (lcd_*) go out.
//
// A host reads spectrum block b as follows: poll the ready variable (address
// cycle to READY_ADDR, then reads) until it is non-zero, echo that value as
// the start address of an address cycle, then read N words; each word is two
// host reads (high byte, then low byte). The whole design runs on one clock;
// host strobes are synchronised inside the bridge.
module dsp_lcd_link_top
  import dsp_lcd_pkg::*;
#(
  parameter int unsigned N             = DFT_N,
  parameter logic [3:0]  SEL_CODE      = 4'h0,
  parameter int unsigned STROBE_CYCLES = 2,
  parameter int unsigned READ_CYCLES   = 4,
  parameter int unsigned SCALE_SHIFT   = 10,
  parameter int unsigned LCD_E_CYCLES  = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // codec
  input  logic               s_valid,
  input  logic signed [15:0] s_data,
  // micro-controller bus
  input  logic [7:0]         ad_i,
  output logic [7:0]         ad_o,
  output logic               ad_oe,
  input  logic               a0,
  input  logic               a1,
  input  logic [3:0]         a_hi,
  input  logic               exc_n,
  input  logic               wr_n,
  input  logic               rd_n,
  // display buffer and LCD
  input  logic               disp_wr_en,
  input  logic [6:0]         disp_wr_addr,
  input  logic [15:0]        disp_wr_data,
  input  logic               disp_start,
  output logic               disp_busy,
  output logic               disp_done,
  output logic [7:0]         lcd_db,
  output logic               lcd_rst_n,
  output logic               lcd_rw,
  output logic               lcd_di,
  output logic               lcd_e,
  output logic               lcd_cs1,
  output logic               lcd_cs2,
  // DSP program memory, reached through the IDMA port
  output logic [IDMA_AW-1:0] pm_addr,
  output logic               pm_re,
  input  logic [23:0]        pm_rdata,
  output logic               pm_we,
  output logic [23:0]        pm_wdata,
  // observation
  output logic               iack_n,
  output idma_ctrl_t         idma_ctrl,
  output logic [15:0]        ready_var,
  output logic               block_done,
  output logic               overrun
);

  logic [15:0] iad_host, iad_dsp;
  logic        iad_host_oe, iad_dsp_oe;
  logic        is_n, iwr_n, ird_n, ial;
  logic [IDMA_AW-1:0] dm_addr;
  logic        dm_re, dm_we;
  logic [15:0] dm_rdata, dm_wdata;

  idma_bridge #(
    .SYNC_STAGES(2), .SEL_CODE(SEL_CODE),
    .STROBE_CYCLES(STROBE_CYCLES), .READ_CYCLES(READ_CYCLES)
  ) u_bridge (
    .clk, .rst_n, .ad_i, .ad_o, .ad_oe, .a0, .a1, .a_hi, .exc_n, .wr_n, .rd_n,
    .iad_i(iad_dsp), .iad_o(iad_host), .iad_oe(iad_host_oe),
    .is_n, .iwr_n, .ird_n, .ial
  );

  idma_port u_idma (
    .clk, .rst_n,
    .iad_i(iad_host), .iad_o(iad_dsp), .iad_oe(iad_dsp_oe),
    .is_n, .iwr_n, .ird_n, .ial, .iack_n,
    .dm_addr, .dm_re, .dm_rdata, .dm_we, .dm_wdata,
    .pm_addr, .pm_re, .pm_rdata, .pm_we, .pm_wdata, .ctrl(idma_ctrl)
  );

  dft_system #(.N(N)) u_dft (
    .clk, .rst_n, .s_valid, .s_data,
    .dm_addr, .dm_re, .dm_rdata, .dm_we, .dm_wdata,
    .ready_var, .block_done, .overrun
  );

  lcd_display #(
    .SCALE_SHIFT(SCALE_SHIFT), .RST_CYCLES(8), .E_CYCLES(LCD_E_CYCLES), .HOLD_CYCLES(LCD_E_CYCLES)
  ) u_disp (
    .clk, .rst_n, .wr_en(disp_wr_en), .wr_addr(disp_wr_addr), .wr_data(disp_wr_data),
    .start(disp_start), .busy(disp_busy), .done(disp_done),
    .lcd_db, .lcd_rst_n, .lcd_rw, .lcd_di, .lcd_e, .lcd_cs1, .lcd_cs2
  );

  // The shared IAD bus must never be driven from both ends.
  a_iad_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
    !(iad_host_oe && iad_dsp_oe));

endmodule
