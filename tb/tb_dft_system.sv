// Self-checking test of dft_system at N = 128: three blocks of a tone plus
// noise are streamed in at a real-time sample rate; after each published
// block the whole spectrum is read through the data-memory port and compared
// with the reference model. Both output banks must be published in turn.
// Finally samples are sent too fast, and the overrun flag must fire.
module tb_dft_system;
  import dsp_lcd_pkg::*;
  import tb_dft_ref_pkg::*;
  localparam int N = 128, SPACING = 140;
  logic clk = 0, rst_n = 0, s_valid = 0, dm_re = 0, dm_we = 0, block_done, overrun;
  logic signed [15:0] s_data = 0;
  logic [13:0] dm_addr = 0;
  logic [15:0] dm_rdata, dm_wdata = 0, ready_var;
  int checks = 0, failures = 0;

  dft_system dut (.*);

  always #5 clk = ~clk;

  int blocks [4][N];
  int n_done = 0, n_overrun = 0, cyc = 0;
  always @(negedge clk) begin
    cyc++;
    if (block_done) n_done++;
    if (overrun) n_overrun++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample source
  bit fast = 0;
  initial begin
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < N; i++)
        blocks[b][i] = tone(i, N, 5 + 7 * b, 9000 + 3000 * b, $urandom_range(0, 64) - 32);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < N; i++) begin
        @(negedge clk); s_valid = 1; s_data = 16'(blocks[b][i]);
        @(negedge clk); s_valid = 0;
        repeat (SPACING - 2) @(negedge clk);
      end
    // then far too fast: one sample every other cycle
    fast = 1;
    for (int i = 0; i < 3 * N; i++) begin
      @(negedge clk); s_valid = 1; s_data = 16'(i);
      @(negedge clk); s_valid = 0;
    end
  end

  initial begin
    int er, ei, base;
    repeat (3) @(posedge clk);
    for (int b = 0; b < 3; b++) begin
      @(negedge clk iff block_done);
      @(negedge clk);                    // ready variable is set by the swap
      base = int'(ready_var);
      checks++;
      if (base != int'(SPEC_BASE_DEFAULT) + (b % 2) * N) begin failures++; $display("FAIL base %h", base); end
      for (int k = 0; k < N; k++) begin
        @(negedge clk); dm_re = 1; dm_addr = 14'(base + k);
        @(negedge clk); dm_re = 0;
        ref_bin(blocks[b], N, k, er, ei);
        checks++;
        if (dm_rdata != 16'(ref_power(er, ei))) begin
          failures++; $display("FAIL block %0d bin %0d: %0d expected %0d", b, k, dm_rdata, ref_power(er, ei));
        end
      end
    end
    wait (fast);
    repeat (8 * N) @(negedge clk);
    checks++;
    if (n_overrun == 0) begin failures++; $display("FAIL no overrun seen"); end
    checks++;
    if (n_done < 3) begin failures++; $display("FAIL only %0d blocks", n_done); end
    $display("blocks published %0d, overruns %0d", n_done, n_overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
