// IDMA slave port of the DSP: lets a host read and write DSP memory through a
// 16-bit address/data bus without stopping the DSP program.
//
// The host first pulses IAL (with IS low) while presenting a control word on
// IAD15..0: bits 13..0 are the start address and bit 14 selects data memory
// (1) or program memory (0). Each later IWR pulse writes the IAD word to the
// current address and each IRD pulse reads the current address onto IAD;
// after every access the address increments, so a block of consecutive words
// needs only one address cycle. IS must be low for every access. This much is
// the documented behaviour of the port.
//
// Data memory words are 16 bits and take one access each (dm_* port, one
// cycle read latency, single-cycle write). Program memory words are 24 bits
// and take two accesses at the same address: the first carries bits 23..8 on
// IAD15..0, the second bits 7..0 on IAD7..0 (IAD15..8 read as zero and are
// ignored on a write), and only the second increments the address. A PM write
// reaches memory (pm_we) on the second access; a PM read fetches the whole
// word (pm_re) on the first and returns the held low byte on the second. An
// address cycle restarts the pairing. This split follows the processor's own
// IDMA port; the memories themselves belong to the processor and sit outside.
// The strobes are assumed synchronous to clk.
//
// Timing: a read is issued to memory in the first cycle IRD is seen low;
// the word is on iad_o, with iack_n low, two cycles later and stays there
// until IRD rises. A write is committed in the cycle after IWR rises, with
// the last word seen on IAD while IWR was low. The control word is loaded on
// every cycle IAL is high.
module idma_port
  import dsp_lcd_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // IDMA bus
  input  logic [15:0]         iad_i,
  output logic [15:0]         iad_o,
  output logic                iad_oe,
  input  logic                is_n,
  input  logic                iwr_n,
  input  logic                ird_n,
  input  logic                ial,
  output logic                iack_n,
  // data memory
  output logic [IDMA_AW-1:0]  dm_addr,
  output logic                dm_re,
  input  logic [15:0]         dm_rdata,
  output logic                dm_we,
  output logic [15:0]         dm_wdata,
  // program memory
  output logic [IDMA_AW-1:0]  pm_addr,
  output logic                pm_re,
  input  logic [23:0]         pm_rdata,
  output logic                pm_we,
  output logic [23:0]         pm_wdata,
  // current control word, for observation
  output idma_ctrl_t          ctrl
);

  logic wr_act, rd_act, ial_act, wr_act_q, rd_act_q;
  logic rd_pend, rd_valid;
  logic [15:0] wdata_q, rdata_q;
  logic        pm_second;          // next PM access is the low byte
  logic [15:0] pm_hi_q;            // upper 16 bits of a PM word being written
  logic [7:0]  pm_lo_q;            // low byte of a PM word being read

  assign wr_act  = ~is_n & ~iwr_n;
  assign rd_act  = ~is_n & ~ird_n;
  assign ial_act = ~is_n &  ial;

  wire rd_start = rd_act & ~rd_act_q;
  wire rd_end   = ~rd_act & rd_act_q;
  wire wr_end   = ~wr_act & wr_act_q;
  wire is_dm    = (ctrl.space == IDMA_SPACE_DM);
  wire acc_end  = wr_end | rd_end;
  wire step     = acc_end & (is_dm | pm_second);   // address increments

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl     <= '0;
      wr_act_q <= 1'b0;
      rd_act_q <= 1'b0;
      rd_pend  <= 1'b0;
      rd_valid <= 1'b0;
      wdata_q  <= '0;
      rdata_q  <= '0;
      pm_second <= 1'b0;
      pm_hi_q  <= '0;
      pm_lo_q  <= '0;
    end else begin
      wr_act_q <= wr_act;
      rd_act_q <= rd_act;
      rd_pend  <= rd_start;
      if (wr_act) wdata_q <= iad_i;
      if (rd_pend) begin
        if (is_dm)          rdata_q <= dm_rdata;
        else if (pm_second) rdata_q <= {8'h00, pm_lo_q};
        else begin
          rdata_q <= pm_rdata[23:8];
          pm_lo_q <= pm_rdata[7:0];
        end
        rd_valid <= rd_act;
      end else if (!rd_act) begin
        rd_valid <= 1'b0;
      end
      if (wr_end && !is_dm && !pm_second) pm_hi_q <= wdata_q;
      if (ial_act) begin
        ctrl      <= idma_ctrl_t'(iad_i);
        pm_second <= 1'b0;
      end else begin
        if (step)              ctrl.addr <= ctrl.addr + 1'b1;
        if (acc_end && !is_dm) pm_second <= ~pm_second;
      end
    end
  end

  assign dm_addr  = ctrl.addr;
  assign dm_re    = rd_start & is_dm;
  assign dm_we    = wr_end & is_dm;
  assign dm_wdata = wdata_q;
  assign pm_addr  = ctrl.addr;
  assign pm_re    = rd_start & ~is_dm & ~pm_second;
  assign pm_we    = wr_end & ~is_dm & pm_second;
  assign pm_wdata = {pm_hi_q, wdata_q[7:0]};
  assign iad_o    = rdata_q;
  assign iad_oe   = rd_act;
  assign iack_n   = ~(rd_valid | wr_act);

  a_one_access: assert property (@(posedge clk) disable iff (!rst_n)
    !(~is_n && $countones({~iwr_n, ~ird_n, ial}) > 1));

endmodule
