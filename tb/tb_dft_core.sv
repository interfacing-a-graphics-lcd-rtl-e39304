// Self-checking test of dft_core at N = 128: a windowed tone plus noise is
// transformed twice (two starts) and every bin's real and imaginary part is
// compared with the reference model; the bin order, the block time
// (N*N + 4 cycles from start to done) and the tone's peak bin are checked.
module tb_dft_core;
  import tb_dft_ref_pkg::*;
  localparam int N = 128, TONE = 9;
  logic clk = 0, rst_n = 0, start = 0, busy, done, bin_valid;
  logic [6:0] x_addr, tw_idx, bin_k;
  logic signed [15:0] x_data, w_data, tw_cos, tw_sin, bin_re, bin_im;
  int checks = 0, failures = 0;

  dft_core #(.N(N), .W(16), .ACC_W(40)) dut (.*);

  always #5 clk = ~clk;

  int x [N];
  always @(posedge clk) begin
    x_data <= 16'(x[x_addr]);
    w_data <= 16'(ref_hann(int'(x_addr), N));
    tw_cos <= 16'(ref_cos(int'(tw_idx), N));
    tw_sin <= 16'(ref_sin(int'(tw_idx), N));
  end

  int exp_k = 0, peak_k = -1, peak_p = -1, cyc = 0, t_start = 0, t_done = 0;
  always @(negedge clk) begin
    int er, ei;
    cyc++;
    if (bin_valid) begin
      ref_bin(x, N, int'(bin_k), er, ei);
      checks++;
      if (int'(bin_k) != exp_k || bin_re != 16'(er) || bin_im != 16'(ei)) begin
        failures++;
        $display("FAIL bin %0d (expected k %0d): %0d,%0d vs %0d,%0d", bin_k, exp_k, bin_re, bin_im, er, ei);
      end
      if (int'(bin_k) < N / 2 && ref_power(er, ei) > peak_p) begin peak_p = ref_power(er, ei); peak_k = int'(bin_k); end
      exp_k = (exp_k + 1) % N;
    end
    if (done) t_done = cyc;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) x[i] = tone(i, N, TONE, 12000, $urandom_range(0, 200) - 100);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      @(negedge clk); start = 1; t_start = cyc;
      @(negedge clk); start = 0;
      checks++;
      if (!busy) begin failures++; $display("FAIL not busy"); end
      @(negedge clk); start = 1;           // ignored while busy
      @(negedge clk); start = 0;
      wait (done);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (t_done - t_start != N * N + 4) begin failures++; $display("FAIL block time %0d", t_done - t_start); end
      checks++;
      if (busy) begin failures++; $display("FAIL still busy"); end
      if (rep == 0) for (int i = 0; i < N; i++) x[i] = -x[N - 1 - i] + 7;
    end
    checks++;
    if (peak_k != TONE) begin failures++; $display("FAIL peak at %0d", peak_k); end
    checks++;
    if (exp_k != 0) begin failures++; $display("FAIL bins out %0d", exp_k); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
