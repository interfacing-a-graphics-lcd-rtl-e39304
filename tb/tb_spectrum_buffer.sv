// Self-checking test of spectrum_buffer: blocks are written into alternate
// banks; after each swap the ready variable must hold the finished bank's
// base address, the finished bank must read back through the host port at
// its data-memory addresses while the other bank is being rewritten, the
// host must be able to clear the ready variable, and unmapped addresses
// must read as zero.
module tb_spectrum_buffer;
  import dsp_lcd_pkg::*;
  localparam int N = 128;
  localparam logic [13:0] BASE = 14'h2000, RDY = 14'h2100;
  logic clk = 0, rst_n = 0, we = 0, swap = 0, fill_bank, rd_en = 0, host_we = 0;
  logic [6:0] waddr = 0;
  logic [15:0] wdata = 0, rd_data, host_wdata = 0, ready_var;
  logic [13:0] rd_addr = 0, host_addr = 0;
  int checks = 0, failures = 0;

  spectrum_buffer #(.N(N), .SPEC_BASE(BASE), .READY_ADDR(RDY)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic host_read(logic [13:0] a, output logic [15:0] v);
    @(negedge clk); rd_en = 1; rd_addr = a;
    @(negedge clk); rd_en = 0; v = rd_data;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] blk [4][N];
    logic [15:0] v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    host_read(RDY, v); check("ready after reset", v, 0);
    for (int b = 0; b < 4; b++) begin
      for (int k = 0; k < N; k++) begin
        blk[b][k] = 16'($urandom);
        @(negedge clk); we = 1; waddr = 7'(k); wdata = blk[b][k];
      end
      @(negedge clk); we = 0; swap = 1;
      @(negedge clk); swap = 0;
      check("ready var", ready_var, BASE + ((b % 2) ? N : 0));
      host_read(RDY, v); check("ready via host port", v, BASE + ((b % 2) ? N : 0));
      // write garbage into the new fill bank while reading the finished one
      for (int k = 0; k < N; k++) begin
        @(negedge clk); we = 1; waddr = 7'(k); wdata = 16'hFFFF;
        rd_en = 1; rd_addr = BASE + 14'((b % 2) * N + k);
        @(negedge clk); we = 0; rd_en = 0;
        check("block word", rd_data, blk[b][k]);
      end
      // host clears the ready variable
      @(negedge clk); host_we = 1; host_addr = RDY; host_wdata = 0;
      @(negedge clk); host_we = 0;
      check("cleared", ready_var, 0);
    end
    host_read(BASE - 1, v);       check("below map", v, 0);
    host_read(BASE + 2 * N, v);   check("above map", v, 0);
    @(negedge clk); host_we = 1; host_addr = BASE; host_wdata = 16'h1234;
    @(negedge clk); host_we = 0;
    check("host write elsewhere ignored", ready_var, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
