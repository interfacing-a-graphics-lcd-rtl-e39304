// Self-checking test of lcd_display: a spectrum block is written into the bin
// buffer in scrambled order, drawn, and the LCD model's contents compared
// with the bar graph worked out pixel by pixel; then half the bins are
// rewritten and the frame redrawn.
module tb_lcd_display;
  logic clk = 0, rst_n = 0, wr_en = 0, start = 0, busy, done;
  logic [6:0] wr_addr = 0;
  logic [15:0] wr_data = 0;
  logic [7:0] lcd_db;
  logic lcd_rst_n, lcd_rw, lcd_di, lcd_e, lcd_cs1, lcd_cs2;
  int checks = 0, failures = 0;

  lcd_display #(.SCALE_SHIFT(10), .RST_CYCLES(4), .E_CYCLES(3), .HOLD_CYCLES(2)) dut (.*);
  lcd_g1216_model u_lcd (.db(lcd_db), .rst_n(lcd_rst_n), .rw(lcd_rw), .di(lcd_di), .e(lcd_e), .cs1(lcd_cs1), .cs2(lcd_cs2));

  always #5 clk = ~clk;

  logic [15:0] val [128];

  task automatic check_screen();
    logic [7:0] e;
    int h;
    for (int k = 0; k < 128; k++)
      for (int p = 0; p < 8; p++) begin
        h = int'(val[k] >> 10);
        for (int b = 0; b < 8; b++) e[b] = ((63 - (8 * p + b)) < h);
        checks++;
        if (u_lcd.ram[k / 64][p][k % 64] != e) begin
          failures++; $display("FAIL bin %0d page %0d: %b expected %b", k, p, u_lcd.ram[k / 64][p][k % 64], e);
        end
      end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 128; i++) begin
        automatic int k = (i * 37) % 128;
        if (pass == 1 && k % 2 == 0) continue;
        val[k] = 16'($urandom_range(0, 65535));
        @(negedge clk); wr_en = 1; wr_addr = 7'(k); wr_data = val[k];
      end
      @(negedge clk); wr_en = 0; start = 1;
      @(negedge clk); start = 0;
      checks++;
      if (!busy) begin failures++; $display("FAIL not busy"); end
      @(negedge clk iff done);
      check_screen();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
