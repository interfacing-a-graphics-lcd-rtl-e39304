// End-to-end test body for dsp_lcd_link_top with every design parameter at its
// default; SPACING (cycles per sample) and BLOCKS set the workload.
//
// A codec model streams a tone plus noise, one sample every SPACING cycles
// of a 30 ns system clock, changing the tone every block. A bus-functional
// model of the 8-bit micro-controller (12 MHz timing: 500 ns strobes, about
// 2 us per bus cycle) does what the display
// program does: it polls the ready variable through the IDMA bridge until it
// is non-zero, echoes it as the IDMA start address, copies the 128 spectrum
// words (high byte, then low byte) and clears the variable again. Every word
// is compared with the reference model of the block that was published.
// Finally the codec model sends samples far too fast, which must be flagged
// as an overrun.
//
// Counted mechanisms (each must occur): IDMA address cycles, data writes,
// data reads, address auto-increment, publication of each output bank, polls
// that found no block ready, overruns, LCD frames drawn, LCD resets and
// program-memory words written and read back (24-bit words, two IDMA
// accesses each, done once after the last block). After
// each block the bus model also stores the copied words in the display buffer
// and starts a frame; the LCD model's contents must then show the block's
// bar graph. The host's copy time per block is printed and checked against
// the time one input block takes to arrive. When the run is over, finished is
// set; the wrapper module prints the result, stops the simulation and holds
// the watchdog.
module tb_link_run #(
  parameter int SPACING = 1663,   // clock cycles per codec sample
  parameter int BLOCKS  = 4       // spectrum blocks to stream, copy and draw
);
  import dsp_lcd_pkg::*;
  import tb_dft_ref_pkg::*;
  localparam int N = DFT_N, PULSE = 17, GAP = 48;
  localparam logic [13:0] RDY = READY_ADDR_DEFAULT;

  logic clk = 0, rst_n = 0, s_valid = 0;
  logic signed [15:0] s_data = 0;
  logic [7:0] ad_i = 0, ad_o;
  logic ad_oe, a0 = 0, a1 = 0, exc_n = 1, wr_n = 1, rd_n = 1;
  logic [3:0] a_hi = 0;
  logic iack_n, block_done, overrun;
  logic disp_wr_en = 0, disp_start = 0, disp_busy, disp_done;
  logic [6:0] disp_wr_addr = 0;
  logic [15:0] disp_wr_data = 0;
  logic [7:0] lcd_db;
  logic lcd_rst_n, lcd_rw, lcd_di, lcd_e, lcd_cs1, lcd_cs2;
  idma_ctrl_t idma_ctrl;
  logic [15:0] ready_var;
  logic [13:0] pm_addr;
  logic pm_re, pm_we;
  logic [23:0] pm_rdata, pm_wdata;
  int checks = 0, failures = 0;
  bit finished = 1'b0;   // set when the run is complete; the wrapper reports

  dsp_lcd_link_top dut (.*);
  lcd_g1216_model u_lcd (.db(lcd_db), .rst_n(lcd_rst_n), .rw(lcd_rw), .di(lcd_di), .e(lcd_e), .cs1(lcd_cs1), .cs2(lcd_cs2));

  always #15 clk = ~clk;   // 30 ns

  // ---------------- monitors ----------------
  int cyc = 0, n_ial = 0, n_iwr = 0, n_ird = 0, n_inc = 0, n_bank0 = 0, n_bank1 = 0;
  int n_frames = 0, n_pm_words = 0;
  int n_overrun = 0, n_idle_polls = 0, n_published = 0, last_block = -1;
  logic [13:0] addr_q = 0;
  logic ial_q = 0, iwr_q = 1, ird_q = 1;
  always @(negedge clk) begin
    cyc++;
    if (dut.ial && !ial_q) n_ial++;
    if (!dut.iwr_n && iwr_q) n_iwr++;
    if (!dut.ird_n && ird_q) n_ird++;
    if (!dut.ial && idma_ctrl.addr == addr_q + 1'b1) n_inc++;
    ial_q <= dut.ial; iwr_q <= dut.iwr_n; ird_q <= dut.ird_n; addr_q <= idma_ctrl.addr;
    if (overrun) n_overrun++;
    if (disp_done) n_frames++;
    if (block_done) begin
      n_published++;
      last_block = n_published - 1;
      if (dut.u_dft.u_out.fill_bank) n_bank1++; else n_bank0++;
    end
  end

  // DSP program memory model (first 256 words)
  logic [23:0] pmem [256];
  initial for (int i = 0; i < 256; i++) pmem[i] = 24'(i * 24'h010101);
  always @(posedge clk) begin
    if (pm_re) pm_rdata <= pmem[pm_addr[7:0]];
    if (pm_we) pmem[pm_addr[7:0]] <= pm_wdata;
  end

  // ---------------- codec model ----------------
  int blocks [BLOCKS][N];
  bit fast = 0, host_done = 0;
  initial begin
    for (int b = 0; b < BLOCKS; b++)
      for (int i = 0; i < N; i++)
        blocks[b][i] = tone(i, N, 3 + 11 * b, 6000 + 5000 * b, $urandom_range(0, 64) - 32);
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < BLOCKS; b++)
      for (int i = 0; i < N; i++) begin
        @(negedge clk); s_valid = 1; s_data = 16'(blocks[b][i]);
        @(negedge clk); s_valid = 0;
        repeat (SPACING - 2) @(negedge clk);
      end
    wait (host_done);
    fast = 1;
    for (int i = 0; i < 3 * N; i++) begin
      @(negedge clk); s_valid = 1; s_data = 16'(i);
      @(negedge clk); s_valid = 0;
    end
  end

  // ---------------- micro-controller bus model ----------------
  task automatic host_wr(bit aa1, bit aa0, logic [7:0] v);
    @(negedge clk); exc_n = 0; a_hi = 4'h0; a1 = aa1; a0 = aa0; ad_i = v;
    @(negedge clk); wr_n = 0;
    repeat (PULSE) @(negedge clk);
    wr_n = 1;
    @(negedge clk); exc_n = 1;
    repeat (GAP) @(negedge clk);
  endtask
  task automatic host_rd(bit aa0, output logic [7:0] v);
    @(negedge clk); exc_n = 0; a_hi = 4'h0; a1 = 0; a0 = aa0;
    @(negedge clk); rd_n = 0;
    repeat (PULSE) @(negedge clk);
    checks++;
    if (!ad_oe) begin failures++; $display("FAIL host bus not driven at end of read"); end
    v = ad_o; rd_n = 1;
    @(negedge clk); exc_n = 1;
    repeat (GAP) @(negedge clk);
  endtask
  task automatic idma_addr(logic [15:0] w);
    host_wr(1'b0, 1'b0, w[7:0]); host_wr(1'b1, 1'b1, w[15:8]);
  endtask
  task automatic idma_write(logic [15:0] w);
    host_wr(1'b0, 1'b0, w[7:0]); host_wr(1'b0, 1'b1, w[15:8]);
  endtask
  function automatic logic [23:0] pm_word(int i);
    return 24'hA5C300 ^ 24'(i * 24'h123457);
  endfunction
  task automatic idma_read(output logic [15:0] w);
    logic [7:0] hi, lo;
    host_rd(1'b0, hi); host_rd(1'b1, lo); w = {hi, lo};
  endtask


  task automatic check_screen(int blk);
    logic [7:0] e;
    int h, er, ei;
    checks++;
    if (!u_lcd.on[0] || !u_lcd.on[1]) begin failures++; $display("FAIL LCD off"); end
    for (int k = 0; k < N; k++) begin
      ref_bin(blocks[blk], N, k, er, ei);
      h = ref_power(er, ei) >> 10;
      for (int p = 0; p < 8; p++) begin
        for (int b = 0; b < 8; b++) e[b] = ((63 - (8 * p + b)) < h);
        checks++;
        if (u_lcd.ram[k / 64][p][k % 64] != e) begin
          failures++; $display("FAIL LCD block %0d bin %0d page %0d", blk, k, p);
        end
      end
    end
  endtask

  initial begin
    logic [15:0] v, w;
    int blk, er, ei, t0, worst = 0, taken = 0;
    repeat (6) @(posedge clk);
    while (taken < BLOCKS) begin
      // poll the ready variable
      v = 0;
      while (v == 0) begin
        idma_addr(16'h4000 | 16'(RDY));
        idma_read(v);
        if (v == 0) n_idle_polls++;
      end
      t0 = cyc;
      blk = last_block;
      checks++;
      if (v != 16'(SPEC_BASE_DEFAULT) + 16'((blk % 2) * N)) begin
        failures++; $display("FAIL ready variable %h for block %0d", v, blk);
      end
      // echo the base address and copy the block
      idma_addr(16'h4000 | v);
      for (int k = 0; k < N; k++) begin
        idma_read(w);
        @(negedge clk); disp_wr_en = 1; disp_wr_addr = 7'(k); disp_wr_data = w;
        @(negedge clk); disp_wr_en = 0;
        ref_bin(blocks[blk], N, k, er, ei);
        checks++;
        if (w != 16'(ref_power(er, ei))) begin
          failures++; $display("FAIL block %0d bin %0d: %0d expected %0d", blk, k, w, ref_power(er, ei));
        end
      end
      // clear the ready variable
      idma_addr(16'h4000 | 16'(RDY));
      idma_write(16'h0000);
      // draw it and compare the LCD with the expected bar graph
      @(negedge clk); disp_start = 1;
      @(negedge clk); disp_start = 0;
      @(negedge clk iff disp_done);
      check_screen(blk);
      if (cyc - t0 > worst) worst = cyc - t0;
      checks++;
      if (ready_var != 0 && last_block == blk) begin failures++; $display("FAIL ready variable not cleared"); end
      taken++;
    end
    // run-time program memory access: write four 24-bit words (two IDMA
    // writes each, bits 23..8 then 7..0) and read them and a neighbour back
    idma_addr(16'h0040);
    for (int i = 0; i < 4; i++) begin
      idma_write(16'(pm_word(i) >> 8));
      idma_write(16'(pm_word(i) & 24'hFF));
    end
    idma_addr(16'h0040);
    for (int i = 0; i < 5; i++) begin
      logic [23:0] e;
      e = (i < 4) ? pm_word(i) : 24'(8'h44 * 24'h010101);
      idma_read(v); idma_read(w);
      checks++;
      if ({v, w[7:0]} != e || w[15:8] != 0) begin
        failures++; $display("FAIL PM word %0d: %h%h expected %h", i, v, w, e);
      end
      else n_pm_words++;
    end
    host_done = 1;
    wait (fast);
    repeat (8 * N) @(negedge clk);
    $display("host copy time per block: %0d cycles (%0d us at 30 ns); one input block: %0d cycles",
             worst, worst * 30 / 1000, N * SPACING);
    checks++;
    if (worst >= N * SPACING) begin failures++; $display("FAIL host too slow"); end
    $display("mechanisms: ial=%0d iwr=%0d ird=%0d autoinc=%0d bank0=%0d bank1=%0d idle_polls=%0d overrun=%0d",
             n_ial, n_iwr, n_ird, n_inc, n_bank0, n_bank1, n_idle_polls, n_overrun);
    $display("frames drawn=%0d lcd resets=%0d pm words=%0d", n_frames, u_lcd.n_reset, n_pm_words);
    checks += 11;
    if (n_pm_words == 0) begin failures++; $display("FAIL no program memory access"); end
    if (n_frames != BLOCKS) begin failures++; $display("FAIL frames %0d", n_frames); end
    if (u_lcd.n_reset < BLOCKS) begin failures++; $display("FAIL LCD resets %0d", u_lcd.n_reset); end
    if (n_ial == 0) begin failures++; $display("FAIL no IDMA address cycle"); end
    if (n_iwr == 0) begin failures++; $display("FAIL no IDMA write"); end
    if (n_ird == 0) begin failures++; $display("FAIL no IDMA read"); end
    if (n_inc == 0) begin failures++; $display("FAIL no auto-increment"); end
    if (n_bank0 == 0) begin failures++; $display("FAIL bank 0 never published"); end
    if (n_bank1 == 0) begin failures++; $display("FAIL bank 1 never published"); end
    if (n_idle_polls == 0) begin failures++; $display("FAIL never polled an empty variable"); end
    if (n_overrun == 0) begin failures++; $display("FAIL no overrun"); end
    finished = 1'b1;
  end
endmodule
