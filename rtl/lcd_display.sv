// Display side of the link: the 128-word bin buffer that receives one
// spectrum block from the IDMA transfer, and the sequencer that draws it on
// the graphics LCD as a bar graph.
//
// The buffer is written one word at a time (wr_en, wr_addr, wr_data), in the
// order the words arrive from the DSP; start then draws the whole block (see
// lcd_writer for the LCD bus sequence and timing). Writing the buffer while a
// frame is being drawn is allowed and simply shows up in the rest of that
// frame. The buffer plays the role of the micro-controller's array of DFT
// values in the documented design; the drawing steps follow its display
// program.
module lcd_display #(
  parameter int unsigned SCALE_SHIFT = 10,
  parameter int unsigned RST_CYCLES  = 8,
  parameter int unsigned E_CYCLES    = 16,
  parameter int unsigned HOLD_CYCLES = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [6:0]           wr_addr,
  input  logic [15:0]          wr_data,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic [7:0]           lcd_db,
  output logic                 lcd_rst_n,
  output logic                 lcd_rw,
  output logic                 lcd_di,
  output logic                 lcd_e,
  output logic                 lcd_cs1,
  output logic                 lcd_cs2
);

  logic [15:0] bin_mem [128];   // one word per LCD column
  logic [6:0]  rd_addr;
  logic [15:0] rd_data;

  always_ff @(posedge clk) begin
    if (wr_en) bin_mem[wr_addr] <= wr_data;
    rd_data <= bin_mem[rd_addr];
  end

  lcd_writer #(
    .SCALE_SHIFT(SCALE_SHIFT), .RST_CYCLES(RST_CYCLES),
    .E_CYCLES(E_CYCLES), .HOLD_CYCLES(HOLD_CYCLES)
  ) u_writer (
    .clk, .rst_n, .start, .busy, .done,
    .bin_addr(rd_addr), .bin_data(rd_data),
    .lcd_db, .lcd_rst_n, .lcd_rw, .lcd_di, .lcd_e, .lcd_cs1, .lcd_cs2
  );

endmodule
