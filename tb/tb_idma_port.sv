// Self-checking test of idma_port: IDMA address, write and read cycles are
// driven directly against a small data-memory model; checks cover the
// control word, auto-increment on reads and writes, the read latency and
// acknowledge, and program-memory accesses against a 24-bit memory model:
// each PM word as two accesses (bits 23..8, then 7..0), the address stepping
// only after the second, and an address cycle restarting the pairing.
module tb_idma_port;
  import dsp_lcd_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] iad_i = 0, iad_o;
  logic iad_oe, is_n = 1, iwr_n = 1, ird_n = 1, ial = 0, iack_n;
  logic [IDMA_AW-1:0] dm_addr;
  logic dm_re, dm_we;
  logic [15:0] dm_rdata, dm_wdata;
  logic [IDMA_AW-1:0] pm_addr;
  logic pm_re, pm_we;
  logic [23:0] pm_rdata, pm_wdata;
  idma_ctrl_t ctrl;
  int checks = 0, failures = 0;

  idma_port dut (.*);

  always #5 clk = ~clk;

  logic [15:0] mem [1024];
  always @(posedge clk) begin
    if (dm_re) dm_rdata <= mem[dm_addr[9:0]];
    if (dm_we) mem[dm_addr[9:0]] <= dm_wdata;
  end

  logic [23:0] pmem [1024];
  int n_pm_re = 0, n_pm_we = 0;
  always @(posedge clk) begin
    if (pm_re) begin pm_rdata <= pmem[pm_addr[9:0]]; n_pm_re++; end
    if (pm_we) begin pmem[pm_addr[9:0]] <= pm_wdata; n_pm_we++; end
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic addr_cycle(logic [15:0] w);
    @(negedge clk); is_n = 0; ial = 1; iad_i = w;
    repeat (2) @(negedge clk); ial = 0; is_n = 1;
    @(negedge clk);
  endtask
  task automatic write_cycle(logic [15:0] w);
    @(negedge clk); is_n = 0; iwr_n = 0; iad_i = w;
    repeat (2) @(negedge clk); iwr_n = 1; is_n = 1;
    repeat (2) @(negedge clk);
  endtask
  task automatic read_cycle(output logic [15:0] w, output int lat);
    lat = 0;
    @(negedge clk); is_n = 0; ird_n = 0;
    while (iack_n) begin @(negedge clk); lat++; end
    check("iad driven during read", int'(iad_oe), 1);
    w = iad_o;
    @(negedge clk); ird_n = 1; is_n = 1;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r;
    int lat;
    for (int i = 0; i < 1024; i++) mem[i] = 16'(i ^ 16'h5A00);
    for (int i = 0; i < 1024; i++) pmem[i] = 24'(i ^ 24'hC3C3C3);
    repeat (3) @(posedge clk);
    rst_n = 1;
    addr_cycle(16'h4100);
    check("ctrl addr", int'(ctrl.addr), 'h100);
    check("ctrl space", int'(ctrl.space), int'(IDMA_SPACE_DM));
    for (int i = 0; i < 5; i++) write_cycle(16'hA000 + 16'(i));
    check("addr after 5 writes", int'(ctrl.addr), 'h105);
    for (int i = 0; i < 5; i++) check("mem written", int'(mem[10'h100 + i]), 'hA000 + i);
    check("neighbour untouched", int'(mem[10'h105]), 'h105 ^ 'h5A00);
    addr_cycle(16'h40FE);
    for (int i = 0; i < 6; i++) begin
      read_cycle(r, lat);
      check("read data", int'(r), (i < 2) ? ((10'h0FE + i) ^ 'h5A00) : ('hA000 + i - 2));
      check("read latency", lat, 2);
    end
    check("addr after 6 reads", int'(ctrl.addr), 'h104);
    // program memory: 24-bit words as pairs of accesses
    addr_cycle(16'h0100);
    check("pm space", int'(ctrl.space), int'(IDMA_SPACE_PM));
    write_cycle(16'hABCD);
    check("pm addr held after first half", int'(ctrl.addr), 'h100);
    check("pm not written after first half", n_pm_we, 0);
    write_cycle(16'h00EF);
    check("pm addr after word", int'(ctrl.addr), 'h101);
    write_cycle(16'h1234);
    write_cycle(16'hFF56);                       // upper byte ignored
    check("pm writes", n_pm_we, 2);
    check("pm word 0x100", int'(pmem[10'h100]), 'hABCDEF);
    check("pm word 0x101", int'(pmem[10'h101]), 'h123456);
    check("pm write left dm alone", int'(mem[10'h101]), 'hA001);
    addr_cycle(16'h00FF);
    for (int w = 0; w < 3; w++) begin
      logic [23:0] e;
      e = (w == 0) ? 24'h0FF ^ 24'hC3C3C3 : (w == 1) ? 24'hABCDEF : 24'h123456;
      read_cycle(r, lat);
      check("pm read high", int'(r), int'(e[23:8]));
      check("pm read latency", lat, 2);
      read_cycle(r, lat);
      check("pm read low", int'(r), int'(e[7:0]));
      check("pm read latency", lat, 2);
    end
    check("pm addr after 3 words read", int'(ctrl.addr), 'h102);
    check("pm fetches", n_pm_re, 3);
    // an address cycle in the middle of a word restarts the pairing
    addr_cycle(16'h0100);
    read_cycle(r, lat);
    addr_cycle(16'h0101);
    read_cycle(r, lat);
    check("pm pairing restarted", int'(r), 'h1234);
    // back to data memory
    addr_cycle(16'h4101);
    read_cycle(r, lat);
    check("dm after pm", int'(r), 'hA001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
