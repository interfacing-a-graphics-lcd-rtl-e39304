// Self-checking test of idma_bridge: a host bus-functional model writes an
// IDMA address, a run of data words and reads them back, byte by byte,
// against a behavioural IDMA target (control register with auto-increment
// over a small memory) written inside this testbench.
module tb_idma_bridge;
  localparam int PULSE = 14;
  logic clk = 0, rst_n = 0;
  logic [7:0] ad_i = 0, ad_o;
  logic ad_oe, a0 = 0, a1 = 0, exc_n = 1, wr_n = 1, rd_n = 1;
  logic [3:0] a_hi = 0;
  logic [15:0] iad_i, iad_o;
  logic iad_oe, is_n, iwr_n, ird_n, ial;
  int checks = 0, failures = 0;

  idma_bridge dut (.*);

  always #5 clk = ~clk;

  // behavioural IDMA target
  logic [15:0] tgt_mem [256];
  logic [15:0] tgt_ctrl = 0;
  logic iwr_q = 1, ird_q = 1;
  int n_ial = 0, n_iwr = 0, n_ird = 0;
  always @(posedge clk) begin
    iwr_q <= iwr_n | is_n;
    ird_q <= ird_n | is_n;
    if (!is_n && ial) begin
      tgt_ctrl <= iad_o;
      checks++;
      if (!iad_oe) begin failures++; $display("FAIL IAD not driven under IAL"); end
    end
    if (!is_n && !iwr_n && !iad_oe) begin failures++; $display("FAIL IAD not driven under IWR"); end
    if (!is_n && !iwr_n && iwr_q) n_iwr++;
    if (!is_n && ial && !$past(ial)) n_ial++;
    if (!is_n && !ird_n && ird_q) n_ird++;
    if ((iwr_n | is_n) && !iwr_q) begin
      tgt_mem[tgt_ctrl[7:0]] <= iad_o;
      tgt_ctrl[13:0] <= tgt_ctrl[13:0] + 1;
    end
    if ((ird_n | is_n) && !ird_q) tgt_ctrl[13:0] <= tgt_ctrl[13:0] + 1;
  end
  assign iad_i = (!is_n && !ird_n) ? tgt_mem[tgt_ctrl[7:0]] : 16'hDEAD;

  task automatic host_wr(bit aa1, bit aa0, logic [7:0] v);
    @(negedge clk);
    exc_n = 0; a1 = aa1; a0 = aa0; ad_i = v;
    @(negedge clk); wr_n = 0;
    repeat (PULSE) @(negedge clk);
    wr_n = 1;
    repeat (4) @(negedge clk);
    exc_n = 1; ad_i = 8'h00;
  endtask

  task automatic host_rd(bit aa0, output logic [7:0] v);
    @(negedge clk);
    exc_n = 0; a1 = 0; a0 = aa0;
    @(negedge clk); rd_n = 0;
    repeat (PULSE) @(negedge clk);
    checks++;
    if (!ad_oe) begin failures++; $display("FAIL host bus not driven at end of read"); end
    v = ad_o;
    rd_n = 1;
    repeat (4) @(negedge clk);
    exc_n = 1;
  endtask

  task automatic idma_addr(logic [15:0] w);
    host_wr(1'b0, 1'b0, w[7:0]);
    host_wr(1'b1, 1'b1, w[15:8]);
  endtask
  task automatic idma_write(logic [15:0] w);
    host_wr(1'b0, 1'b0, w[7:0]);
    host_wr(1'b0, 1'b1, w[15:8]);
  endtask
  task automatic idma_read(output logic [15:0] w);
    logic [7:0] hi, lo;
    host_rd(1'b0, hi);
    host_rd(1'b1, lo);
    w = {hi, lo};
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] words [8];
    logic [15:0] r;
    for (int i = 0; i < 256; i++) tgt_mem[i] = 16'(i * 3);
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (words[i]) words[i] = 16'($urandom);
    idma_addr(16'h4020);
    checks++;
    if (tgt_ctrl != 16'h4020) begin failures++; $display("FAIL ctrl %h", tgt_ctrl); end
    foreach (words[i]) idma_write(words[i]);
    foreach (words[i]) begin
      checks++;
      if (tgt_mem[8'h20 + i] != words[i]) begin
        failures++; $display("FAIL mem[%0d]=%h expected %h", i, tgt_mem[8'h20 + i], words[i]);
      end
    end
    idma_addr(16'h401E);
    for (int i = 0; i < 10; i++) begin
      idma_read(r);
      checks++;
      if (r != ((i < 2) ? 16'((8'h1E + i) * 3) : words[i - 2])) begin
        failures++; $display("FAIL read %0d got %h", i, r);
      end
    end
    checks++;
    if (n_ial != 2 || n_iwr != 8 || n_ird != 10) begin
      failures++; $display("FAIL strobe counts ial=%0d iwr=%0d ird=%0d", n_ial, n_iwr, n_ird);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
