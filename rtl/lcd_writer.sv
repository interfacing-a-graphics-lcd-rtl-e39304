// Display sequencer: draws a 128-bin spectrum as a bar graph on a 128x64
// two-half graphics LCD through its 8-bit parallel interface.
//
// On start the sequencer runs the documented display program:
//   1. pulse the LCD reset (RST low for RST_CYCLES, then wait RST_CYCLES):
//      both halves off, page and column counters at 0;
//   2. turn both halves on (one command written with CS1 and CS2 high);
//   3. for the left half (CS1, bins 0..63) and then the right half (CS2,
//      bins 64..127), for page 0..7: set the page, set column 0, then write
//      64 pattern bytes, relying on the module's column auto-increment.
// Each byte comes from bargraph_pattern applied to the bin value read from
// the bin buffer (bin_addr in, bin_data one cycle later).
//
// Every LCD write is a fixed-timing bus cycle: one cycle to fetch the bin,
// one set-up cycle with D/I, R/W, CS and DB valid and E low, E high for
// E_CYCLES, then E low for HOLD_CYCLES. The LCD's busy flag is never read, as
// in the documented design where the host is much slower than the LCD
// controller; E_CYCLES and HOLD_CYCLES must meet the module's timing.
// A frame is 1 + 2*8*66 = 1057 writes; done pulses after the last.
//
// Command bytes (display on 0x3F, set page 0xB8|p, set column 0x40|c) are the
// usual ones of this class of LCD controller and are this design's
// assumption; so are CS1/CS2 active high and the cycle counts.
module lcd_writer #(
  parameter int unsigned SCALE_SHIFT = 10,
  parameter int unsigned RST_CYCLES  = 8,
  parameter int unsigned E_CYCLES    = 16,
  parameter int unsigned HOLD_CYCLES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  // bin buffer
  output logic [6:0]  bin_addr,
  input  logic [15:0] bin_data,
  // LCD module pins
  output logic [7:0]  lcd_db,
  output logic        lcd_rst_n,
  output logic        lcd_rw,     // 0 = write
  output logic        lcd_di,     // 1 = data, 0 = instruction
  output logic        lcd_e,
  output logic        lcd_cs1,    // left half
  output logic        lcd_cs2     // right half
);

  localparam logic [7:0] CMD_ON   = 8'h3F;
  localparam logic [7:0] CMD_PAGE = 8'hB8;
  localparam logic [7:0] CMD_COL  = 8'h40;
  localparam int unsigned CW = 16;

  typedef enum logic [2:0] { W_IDLE, W_RESET, W_RECOVER, W_FETCH, W_SETUP, W_EHIGH, W_HOLD } wstate_e;
  typedef enum logic [1:0] { OP_ON, OP_PAGE, OP_COL, OP_DATA } op_e;

  wstate_e state;
  op_e     op;
  logic    half;
  logic [2:0] page;
  logic [5:0] col;
  logic [CW-1:0] cnt;
  logic [7:0] pattern;

  bargraph_pattern #(.SCALE_SHIFT(SCALE_SHIFT)) u_pat (.value(bin_data), .page(page), .pattern(pattern));

  assign bin_addr = {half, col};
  assign busy     = (state != W_IDLE);
  assign lcd_rw   = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= W_IDLE;
      op        <= OP_ON;
      half      <= 1'b0;
      page      <= '0;
      col       <= '0;
      cnt       <= '0;
      done      <= 1'b0;
      lcd_db    <= '0;
      lcd_rst_n <= 1'b1;
      lcd_di    <= 1'b0;
      lcd_e     <= 1'b0;
      lcd_cs1   <= 1'b0;
      lcd_cs2   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        W_IDLE: if (start) begin
          state     <= W_RESET;
          cnt       <= '0;
          lcd_rst_n <= 1'b0;
        end
        W_RESET: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(RST_CYCLES - 1)) begin
            lcd_rst_n <= 1'b1;
            cnt       <= '0;
            state     <= W_RECOVER;
          end
        end
        W_RECOVER: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(RST_CYCLES - 1)) begin
            op    <= OP_ON;
            half  <= 1'b0;
            page  <= '0;
            col   <= '0;
            state <= W_FETCH;
          end
        end
        W_FETCH: state <= W_SETUP;        // bin_data valid next cycle
        W_SETUP: begin
          unique case (op)
            OP_ON:   begin lcd_db <= CMD_ON;            lcd_di <= 1'b0; lcd_cs1 <= 1'b1;  lcd_cs2 <= 1'b1; end
            OP_PAGE: begin lcd_db <= CMD_PAGE | 8'(page); lcd_di <= 1'b0; lcd_cs1 <= !half; lcd_cs2 <= half; end
            OP_COL:  begin lcd_db <= CMD_COL;           lcd_di <= 1'b0; lcd_cs1 <= !half; lcd_cs2 <= half; end
            OP_DATA: begin lcd_db <= pattern;           lcd_di <= 1'b1; lcd_cs1 <= !half; lcd_cs2 <= half; end
            default: ;
          endcase
          cnt   <= '0;
          state <= W_EHIGH;
        end
        W_EHIGH: begin
          lcd_e <= 1'b1;
          cnt   <= cnt + 1'b1;
          if (cnt == CW'(E_CYCLES)) begin
            lcd_e <= 1'b0;
            cnt   <= '0;
            state <= W_HOLD;
          end
        end
        W_HOLD: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(HOLD_CYCLES - 1)) begin
            state <= W_FETCH;
            unique case (op)
              OP_ON:   op <= OP_PAGE;
              OP_PAGE: op <= OP_COL;
              OP_COL:  op <= OP_DATA;
              OP_DATA: begin
                col <= col + 1'b1;
                if (col == 6'd63) begin
                  op   <= OP_PAGE;
                  page <= page + 1'b1;
                  if (page == 3'd7) begin
                    half <= ~half;
                    if (half) begin
                      state   <= W_IDLE;
                      done    <= 1'b1;
                      lcd_cs1 <= 1'b0;
                      lcd_cs2 <= 1'b0;
                    end
                  end
                end
              end
              default: ;
            endcase
          end
        end
        default: state <= W_IDLE;
      endcase
    end
  end

  // The LCD is written, never read; E only rises with a chip selected.
  a_write_only: assert property (@(posedge clk) disable iff (!rst_n) lcd_e |-> !lcd_rw && (lcd_cs1 || lcd_cs2));

endmodule
