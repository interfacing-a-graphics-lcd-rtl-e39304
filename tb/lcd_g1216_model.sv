// Behavioural model of a 128x64 two-half graphics LCD module of the kind
// driven by lcd_writer (not synthesizable intent; testbench use only).
//
// Each half (CS1 = left, CS2 = right) has 8 pages x 64 columns of display
// bytes, a page register, a column register that increments after every data
// write and an on/off flag. RST low turns both halves off and zeroes the
// page and column registers. Writes (R/W = 0) take effect on the falling edge
// of E: with D/I = 0 the byte is an instruction (0x3E/0x3F display off/on,
// 0x40|c set column, 0xB8|p set page, 0xC0|l start line, ignored here), with
// D/I = 1 it is display data. Reads are not modelled.
module lcd_g1216_model (
  input logic [7:0] db,
  input logic       rst_n,
  input logic       rw,
  input logic       di,
  input logic       e,
  input logic       cs1,
  input logic       cs2
);
  logic [7:0] ram [2][8][64];
  logic [2:0] page [2];
  logic [5:0] col [2];
  logic       on [2];
  int n_cmd = 0, n_data = 0, n_reset = 0;

  initial begin
    for (int h = 0; h < 2; h++) begin
      on[h] = 0; page[h] = 0; col[h] = 0;
      for (int p = 0; p < 8; p++) for (int c = 0; c < 64; c++) ram[h][p][c] = 8'h00;
    end
  end

  always @(negedge rst_n) begin
    n_reset++;
    for (int h = 0; h < 2; h++) begin on[h] = 0; page[h] = 0; col[h] = 0; end
  end

  always @(negedge e) begin
    if (rst_n && !rw) begin
      for (int h = 0; h < 2; h++) begin
        if ((h == 0 && cs1) || (h == 1 && cs2)) begin
          if (di) begin
            ram[h][page[h]][col[h]] = db;
            col[h] = col[h] + 1;
            n_data++;
          end else begin
            n_cmd++;
            if (db[7:1] == 7'b0011111) on[h] = db[0];
            else if (db[7:6] == 2'b01) col[h] = db[5:0];
            else if (db[7:3] == 5'b10111) page[h] = db[2:0];
          end
        end
      end
    end
  end
endmodule
