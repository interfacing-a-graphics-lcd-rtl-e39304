// One 8-bit latch of the host interface CPLD (latches A, B, C and D).
//
// Each latch moves one byte lane in one direction between the 8-bit
// micro-controller bus and the 16-bit IDMA bus. It captures its input while
// its latch enable is high and presents the held byte only while its output
// enable is high, which is how the CPLD's tri-state latches isolate the two
// buses from each other.
//
// Interface: d is the input byte; le loads it; oe enables the output. q is
// the held byte when oe is high and zero otherwise, and drive mirrors oe so
// that the parent can build the shared bus from q and drive (no z values are
// used, so the outputs of several latches can simply be ORed).
//
// Timing: q follows the byte captured at the rising clock edge on which le was
// high, from the next cycle on. Using a clocked register in place of a
// transparent latch is a choice of this design; the byte width and the
// load/output-enable pair per latch follow the interface's block diagram.
module byte_latch #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         le,
  input  logic         oe,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         drive
);

  logic [W-1:0] held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  held <= '0;
    else if (le) held <= d;
  end

  assign q     = oe ? held : '0;
  assign drive = oe;

endmodule
