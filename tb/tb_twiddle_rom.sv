// Self-checking test of twiddle_rom: cosine and sine outputs for every phase
// index against the testbench's own evaluation of the table formula, and
// quarter-period landmarks.
module tb_twiddle_rom;
  import tb_dft_ref_pkg::*;
  localparam int N = 128;
  logic clk = 0;
  logic [6:0] idx = 0;
  logic signed [15:0] cos_v, sin_v;
  int checks = 0, failures = 0;

  twiddle_rom #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ec, es;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); idx = 7'(i);
      @(negedge clk);
      ec = $cos(2.0 * 3.14159265358979 * i / N) * 32768.0;
      es = $sin(2.0 * 3.14159265358979 * i / N) * 32768.0;
      checks += 2;
      if (cos_v != ref_cos(i, N) || sin_v != ref_sin(i, N)) begin
        failures++; $display("FAIL idx %0d: %0d %0d", i, cos_v, sin_v);
      end
      // within one LSB (plus clamping at +1.0) of the true values
      if ((real'(cos_v) - ec) > 1.0 || (ec - real'(cos_v)) > 1.0 ||
          (real'(sin_v) - es) > 1.0 || (es - real'(sin_v)) > 1.0) begin
        failures++; $display("FAIL accuracy idx %0d", i);
      end
      if (i == N / 4) begin
        checks++;
        if (sin_v != 32767 || cos_v != 0) begin failures++; $display("FAIL quarter period"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
