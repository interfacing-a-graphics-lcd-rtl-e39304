// Self-checking test of sample_buffer: three blocks of samples are written;
// after each block_ready the whole read bank is read back and compared, and
// the bank swap and ready pulse are checked to happen once per N samples.
module tb_sample_buffer;
  localparam int N = 128;
  logic clk = 0, rst_n = 0, s_valid = 0, block_ready, fill_bank;
  logic signed [15:0] s_data = 0, rd_data;
  logic [6:0] rd_addr = 0;
  int checks = 0, failures = 0;

  sample_buffer #(.N(N), .W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_ready = 0;
  always @(posedge clk) if (rst_n && block_ready) n_ready++;

  initial begin
    logic signed [15:0] blk [3][N];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 3; b++) begin
      for (int i = 0; i < N; i++) begin
        blk[b][i] = 16'($urandom);
        @(negedge clk); s_valid = 1; s_data = blk[b][i];
        @(negedge clk); s_valid = 0;
        checks++;
        if (block_ready != (i == N - 1)) begin failures++; $display("FAIL ready at %0d/%0d", b, i); end
      end
      checks++;
      if (fill_bank != 1'((b + 1) % 2)) begin failures++; $display("FAIL fill bank"); end
      for (int i = 0; i < N; i++) begin
        @(negedge clk); rd_addr = 7'(i);
        @(negedge clk);
        checks++;
        if (rd_data != blk[b][i]) begin failures++; $display("FAIL block %0d word %0d: %h vs %h", b, i, rd_data, blk[b][i]); end
      end
    end
    checks++;
    if (n_ready != 3) begin failures++; $display("FAIL ready count %0d", n_ready); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
