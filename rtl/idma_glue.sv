// Glue logic of the host interface CPLD: turns 8-bit micro-controller bus
// cycles into 16-bit IDMA port cycles.
//
// One IDMA cycle takes two host bus cycles. The host register map, selected
// by address lines A1 and A0 while EXC is low and A12..A9 equal SEL_CODE, is:
//
//   write, A0=0        low byte into latch C (no IDMA activity)
//   write, A0=1, A1=0  high byte into latch A, then an IDMA data write:
//                      latches A and C drive IAD15..0 while IS and IWR pulse
//   write, A0=1, A1=1  as above but IAL pulses instead of IWR, loading the
//                      IDMA control register (memory space + start address)
//   read,  A0=0        IDMA read: IS and IRD pulse, IAD15..8 is caught in
//                      latch B and IAD7..0 in latch D; latch B is then
//                      driven onto the host bus for the rest of the read
//   read,  A0=1        latch D is driven onto the host bus (no IDMA activity)
//
// The order (low byte first on writes, high byte first on reads) and the
// pairing of latches with byte lanes follow the documented interface. Which
// address line picks which operation, the SEL_CODE decode of A12..A9 and all
// cycle counts are this design's own choices.
//
// Timing: WR and RD come from another clock domain and pass through
// SYNC_STAGES flip-flops; the address lines and EXC are stable while a strobe
// is low and are sampled when the synchronised strobe falls. A data or
// address write loads latch A one cycle after the strobe is seen, drives the
// IAD bus for one set-up cycle, pulses IWR or IAL (with IS) for
// STROBE_CYCLES, and holds the bus one more cycle. A read asserts IS and IRD
// for READ_CYCLES and captures the IAD bus on the last of them, so the high
// byte reaches the host SYNC_STAGES + READ_CYCLES + 1 cycles after RD falls;
// the host's read strobe must be longer than that. The IDMA acknowledge is not
// used: as in the documented design, the host is slow enough that fixed
// timing suffices.
module idma_glue #(
  parameter int unsigned SYNC_STAGES   = 2,
  parameter logic [3:0]  SEL_CODE      = 4'h0,
  parameter int unsigned STROBE_CYCLES = 2,
  parameter int unsigned READ_CYCLES   = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // micro-controller side
  input  logic       wr_n,
  input  logic       rd_n,
  input  logic       exc_n,
  input  logic       a0,
  input  logic       a1,
  input  logic [3:0] a_hi,      // A12..A9
  // latch controls (names of the block diagram)
  output logic       lewu, oewu, // latch A: host -> IAD15..8
  output logic       lewl, oewl, // latch C: host -> IAD7..0
  output logic       leru, oeru, // latch B: IAD15..8 -> host
  output logic       lerl, oerl, // latch D: IAD7..0 -> host
  // IDMA strobes
  output logic       is_n,
  output logic       iwr_n,
  output logic       ird_n,
  output logic       ial
);

  typedef enum logic [3:0] {
    G_IDLE,
    G_LOAD_C,    // capture low byte into latch C
    G_LOAD_A,    // capture high byte into latch A
    G_WSETUP,    // A and C drive IAD, strobes still idle
    G_WSTROBE,   // IS plus IWR or IAL
    G_WHOLD,     // strobes released, IAD still driven
    G_WAIT_WR,   // wait for the host write strobe to end
    G_RSTROBE,   // IS plus IRD, capture into B and D on the last cycle
    G_RDRIVE_B,  // latch B on the host bus until RD ends
    G_RDRIVE_D   // latch D on the host bus until RD ends
  } glue_state_e;

  localparam int unsigned CW = 8;

  glue_state_e state;
  logic [SYNC_STAGES-1:0] wr_sync, rd_sync;
  logic wr_s, rd_s, wr_s_q, rd_s_q;
  logic wr_fall, rd_fall, sel;
  logic addr_cycle;             // latched A1 of the current write
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_sync <= '1;
      rd_sync <= '1;
      wr_s_q  <= 1'b1;
      rd_s_q  <= 1'b1;
    end else begin
      wr_sync <= {wr_sync[SYNC_STAGES-2:0], wr_n};
      rd_sync <= {rd_sync[SYNC_STAGES-2:0], rd_n};
      wr_s_q  <= wr_s;
      rd_s_q  <= rd_s;
    end
  end

  assign wr_s    = wr_sync[SYNC_STAGES-1];
  assign rd_s    = rd_sync[SYNC_STAGES-1];
  assign wr_fall = wr_s_q & ~wr_s;
  assign rd_fall = rd_s_q & ~rd_s;
  assign sel     = ~exc_n & (a_hi == SEL_CODE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= G_IDLE;
      cnt        <= '0;
      addr_cycle <= 1'b0;
    end else begin
      unique case (state)
        G_IDLE: begin
          cnt <= '0;
          if (wr_fall && sel) begin
            addr_cycle <= a1;
            state      <= a0 ? G_LOAD_A : G_LOAD_C;
          end else if (rd_fall && sel) begin
            state <= a0 ? G_RDRIVE_D : G_RSTROBE;
          end
        end
        G_LOAD_C:  state <= G_WAIT_WR;
        G_LOAD_A:  state <= G_WSETUP;
        G_WSETUP:  state <= G_WSTROBE;
        G_WSTROBE: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(STROBE_CYCLES - 1)) state <= G_WHOLD;
        end
        G_WHOLD:   state <= G_WAIT_WR;
        G_WAIT_WR: if (wr_s) state <= G_IDLE;
        G_RSTROBE: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(READ_CYCLES - 1)) state <= G_RDRIVE_B;
        end
        G_RDRIVE_B, G_RDRIVE_D: if (rd_s) state <= G_IDLE;
        default:   state <= G_IDLE;
      endcase
    end
  end

  // Moore outputs.
  always_comb begin
    lewl  = (state == G_LOAD_C);
    lewu  = (state == G_LOAD_A);
    oewu  = (state == G_WSETUP) || (state == G_WSTROBE) || (state == G_WHOLD);
    oewl  = oewu;
    leru  = (state == G_RSTROBE) && (cnt == CW'(READ_CYCLES - 1));
    lerl  = leru;
    oeru  = (state == G_RDRIVE_B);
    oerl  = (state == G_RDRIVE_D);
    iwr_n = !((state == G_WSTROBE) && !addr_cycle);
    ial   =   (state == G_WSTROBE) &&  addr_cycle;
    ird_n = !(state == G_RSTROBE);
    is_n  = !((state == G_WSTROBE) || (state == G_RSTROBE));
  end

  // Bus rules: one IDMA strobe at a time, always under IS; never drive the
  // IAD bus while the DSP is driving it, nor both host-side latches at once.
  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({~iwr_n, ~ird_n, ial}));
  a_strobe_is:  assert property (@(posedge clk) disable iff (!rst_n)
    (~iwr_n | ~ird_n | ial) |-> ~is_n);
  a_no_fight:   assert property (@(posedge clk) disable iff (!rst_n)
    !(oewu && !ird_n) && !(oeru && oerl));

endmodule
