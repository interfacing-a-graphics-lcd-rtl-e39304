// Pixel pattern of one bar-graph column on one LCD page.
//
// The spectrum is drawn as one vertical bar per DFT bin on a 64-row display
// organised as 8 pages of 8 rows, page 0 at the top; each display byte holds
// one page of one column, bit 0 being the top row of the page. A bin value is
// first scaled to a 6-bit bar height h = value >> SCALE_SHIFT (0..63 pixels,
// measured from the bottom row). Page p spans heights 8*(7-p) .. 8*(7-p)+7,
// so its byte is
//   0x00                                 if h <= 8*(7-p)   (bar below the page)
//   the lowest (h - 8*(7-p)) rows lit    if the bar ends inside the page
//   0xFF                                 if h >= 8*(8-p)   (page fully under the bar)
// Pure combinational logic.
//
// Scaling to 6 bits and the per-page threshold test (empty above the bar,
// partial pattern where it ends, all ones below) follow the documented display
// program; bit 0 = top row and page 0 = top are the display module's usual
// layout and taken as given here.
module bargraph_pattern #(
  parameter int unsigned SCALE_SHIFT = 10
) (
  input  logic [15:0] value,
  input  logic [2:0]  page,
  output logic [7:0]  pattern
);

  logic [5:0] height;
  logic [5:0] floor_h;
  logic [6:0] above;

  assign height  = 6'(value >> SCALE_SHIFT);
  assign floor_h = {3'd7 - page, 3'b000};
  assign above   = 7'(height) - 7'(floor_h);

  always_comb begin
    if (height <= floor_h)  pattern = 8'h00;
    else if (above >= 7'd8) pattern = 8'hFF;
    else                    pattern = ~(8'hFF >> above[2:0]);
  end

endmodule
