// Self-checking test of window_rom: every coefficient against the Hann
// formula evaluated in the testbench, plus symmetry and end/mid values.
module tb_window_rom;
  import tb_dft_ref_pkg::*;
  localparam int N = 128;
  logic clk = 0;
  logic [6:0] addr = 0;
  logic signed [15:0] coef;
  int checks = 0, failures = 0;

  window_rom #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w [N];
    for (int i = 0; i < N; i++) begin
      @(negedge clk); addr = 7'(i);
      @(negedge clk); w[i] = coef;
      checks++;
      if (coef != ref_hann(i, N)) begin failures++; $display("FAIL w[%0d]=%0d expected %0d", i, coef, ref_hann(i, N)); end
    end
    checks += 3;
    if (w[0] != 0) failures++;
    if (w[N/2] != 32767) failures++;
    for (int i = 1; i < N; i++) if (w[i] != w[N - i]) begin failures++; break; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
