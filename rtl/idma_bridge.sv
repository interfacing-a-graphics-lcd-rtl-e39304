// Host interface CPLD: joins the 8-bit multiplexed bus of a micro-controller
// to the 16-bit IDMA port of a DSP.
//
// Four byte latches form two bidirectional byte-wide paths. Latch A
// (host -> IAD15..8) and latch C (host -> IAD7..0) assemble a 16-bit word
// from two host writes so that the IDMA port receives the whole word at once;
// latch B (IAD15..8 -> host) and latch D (IAD7..0 -> host) hold a 16-bit word
// read from the port so the host can fetch it as two bytes. The glue logic
// (idma_glue) decodes the host cycle and sequences the latch enables and the
// IDMA strobes; its header gives the register map and the timing.
//
// Buses are split into an input, an output and an output-enable, as a
// tri-state pad would be: ad_o/ad_oe drive the host's AD7..0 and
// iad_o/iad_oe drive IAD15..0. The latch arrangement and the signal names
// follow the documented block diagram; the split buses are this design's.
module idma_bridge #(
  parameter int unsigned SYNC_STAGES   = 2,
  parameter logic [3:0]  SEL_CODE      = 4'h0,
  parameter int unsigned STROBE_CYCLES = 2,
  parameter int unsigned READ_CYCLES   = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // micro-controller bus
  input  logic [7:0]  ad_i,
  output logic [7:0]  ad_o,
  output logic        ad_oe,
  input  logic        a0,
  input  logic        a1,
  input  logic [3:0]  a_hi,    // A12..A9
  input  logic        exc_n,
  input  logic        wr_n,
  input  logic        rd_n,
  // IDMA port
  input  logic [15:0] iad_i,
  output logic [15:0] iad_o,
  output logic        iad_oe,
  output logic        is_n,
  output logic        iwr_n,
  output logic        ird_n,
  output logic        ial
);

  logic lewu, oewu, lewl, oewl, leru, oeru, lerl, oerl;
  logic [7:0] q_a, q_b, q_c, q_d;
  logic dr_a, dr_b, dr_c, dr_d;

  idma_glue #(
    .SYNC_STAGES(SYNC_STAGES), .SEL_CODE(SEL_CODE),
    .STROBE_CYCLES(STROBE_CYCLES), .READ_CYCLES(READ_CYCLES)
  ) u_glue (
    .clk, .rst_n, .wr_n, .rd_n, .exc_n, .a0, .a1, .a_hi,
    .lewu, .oewu, .lewl, .oewl, .leru, .oeru, .lerl, .oerl,
    .is_n, .iwr_n, .ird_n, .ial
  );

  byte_latch #(.W(8)) u_latch_a (.clk, .rst_n, .le(lewu), .oe(oewu), .d(ad_i),        .q(q_a), .drive(dr_a));
  byte_latch #(.W(8)) u_latch_b (.clk, .rst_n, .le(leru), .oe(oeru), .d(iad_i[15:8]), .q(q_b), .drive(dr_b));
  byte_latch #(.W(8)) u_latch_c (.clk, .rst_n, .le(lewl), .oe(oewl), .d(ad_i),        .q(q_c), .drive(dr_c));
  byte_latch #(.W(8)) u_latch_d (.clk, .rst_n, .le(lerl), .oe(oerl), .d(iad_i[7:0]),  .q(q_d), .drive(dr_d));

  assign ad_o   = q_b | q_d;
  assign ad_oe  = dr_b | dr_d;
  assign iad_o  = {q_a, q_c};
  assign iad_oe = dr_a | dr_c;

endmodule
