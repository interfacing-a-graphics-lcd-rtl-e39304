// Self-checking test of lcd_writer against the LCD module model: after a
// frame the display must be on in both halves and every display byte must be
// the bar-graph column of its bin, worked out pixel by pixel here. The number
// of LCD writes and the frame time are checked too, and a second frame with
// new data must overwrite the first.
module tb_lcd_writer;
  localparam int E = 4, HOLD = 3, RST = 5;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [6:0] bin_addr;
  logic [15:0] bin_data;
  logic [7:0] lcd_db;
  logic lcd_rst_n, lcd_rw, lcd_di, lcd_e, lcd_cs1, lcd_cs2;
  int checks = 0, failures = 0;

  lcd_writer #(.SCALE_SHIFT(10), .RST_CYCLES(RST), .E_CYCLES(E), .HOLD_CYCLES(HOLD)) dut (.*);
  lcd_g1216_model u_lcd (.db(lcd_db), .rst_n(lcd_rst_n), .rw(lcd_rw), .di(lcd_di), .e(lcd_e), .cs1(lcd_cs1), .cs2(lcd_cs2));

  always #5 clk = ~clk;

  logic [15:0] bin_val [128];
  always @(posedge clk) bin_data <= bin_val[bin_addr];

  int cyc = 0;
  always @(negedge clk) cyc++;

  task automatic check_screen(int frame);
    logic [7:0] e;
    int h;
    checks++;
    if (!u_lcd.on[0] || !u_lcd.on[1]) begin failures++; $display("FAIL display off"); end
    for (int k = 0; k < 128; k++)
      for (int p = 0; p < 8; p++) begin
        h = int'(bin_val[k] >> 10);
        for (int b = 0; b < 8; b++) e[b] = ((63 - (8 * p + b)) < h);
        checks++;
        if (u_lcd.ram[k / 64][p][k % 64] != e) begin
          failures++; $display("FAIL frame %0d bin %0d page %0d: %b expected %b", frame, k, p, u_lcd.ram[k / 64][p][k % 64], e);
        end
      end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    for (int k = 0; k < 128; k++) bin_val[k] = 16'(k * 512);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 2; frame++) begin
      @(negedge clk); start = 1; t0 = cyc;
      @(negedge clk); start = 0;
      @(negedge clk iff done);
      check_screen(frame);
      checks++;
      // reset + recovery, then 1057 writes of (fetch + setup + E high + hold)
      if (cyc - t0 != 2 * RST + 1057 * (2 + E + 1 + HOLD) + 1) begin
        failures++; $display("FAIL frame time %0d", cyc - t0);
      end
      for (int k = 0; k < 128; k++) bin_val[k] = 16'($urandom);
    end
    checks++;
    if (u_lcd.n_data != 2 * 1024 || u_lcd.n_reset < 2) begin
      failures++; $display("FAIL writes %0d resets %0d", u_lcd.n_data, u_lcd.n_reset);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
