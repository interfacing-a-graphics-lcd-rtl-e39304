// Self-checking test of idma_glue: each host operation of the register map
// is issued and the strobes and latch controls are counted and timed.
module tb_idma_glue;
  localparam int SYNC = 2, STROBE = 2, READC = 4, PULSE = 14;
  logic clk = 0, rst_n = 0;
  logic wr_n = 1, rd_n = 1, exc_n = 1, a0 = 0, a1 = 0;
  logic [3:0] a_hi = 0;
  logic lewu, oewu, lewl, oewl, leru, oeru, lerl, oerl, is_n, iwr_n, ird_n, ial;
  int checks = 0, failures = 0;

  idma_glue #(.SYNC_STAGES(SYNC), .SEL_CODE(4'h5), .STROBE_CYCLES(STROBE), .READ_CYCLES(READC)) dut (.*);

  always #5 clk = ~clk;

  // per-operation activity counters
  int n_lewu, n_lewl, n_leru, n_lerl, n_iwr, n_ial, n_ird, n_oeru, n_oerl, n_oew, n_is;
  int t_strobe, t_oeru, cyc;
  bit cap_ok;
  always @(posedge clk) begin
    cyc++;
    n_lewu += int'(lewu); n_lewl += int'(lewl); n_leru += int'(leru); n_lerl += int'(lerl);
    n_iwr  += int'(!iwr_n); n_ial += int'(ial); n_ird += int'(!ird_n);
    n_oeru += int'(oeru); n_oerl += int'(oerl); n_oew += int'(oewu & oewl); n_is += int'(!is_n);
    if (oeru && t_oeru < 0) t_oeru = cyc;
    if (leru && ird_n) cap_ok = 0;            // capture must happen under IRD
    if ((!iwr_n || ial) && !(oewu && oewl)) cap_ok = 0; // bus driven during write strobe
  end

  task automatic clear();
    n_lewu = 0; n_lewl = 0; n_leru = 0; n_lerl = 0; n_iwr = 0; n_ial = 0; n_ird = 0;
    n_oeru = 0; n_oerl = 0; n_oew = 0; n_is = 0; t_oeru = -1; cap_ok = 1;
  endtask

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic host(bit is_read, bit sel, bit aa1, bit aa0, output int t0);
    @(negedge clk);
    exc_n = !sel; a_hi = 4'h5; a1 = aa1; a0 = aa0;
    @(negedge clk);
    t0 = cyc;
    if (is_read) rd_n = 0; else wr_n = 0;
    repeat (PULSE) @(negedge clk);
    rd_n = 1; wr_n = 1;
    repeat (8) @(negedge clk);
    exc_n = 1;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // low byte write: latch C only
    clear(); host(0, 1, 0, 0, t0);
    check("lowwr lewl", n_lewl, 1); check("lowwr lewu", n_lewu, 0); check("lowwr is", n_is, 0);
    // high byte, data: latch A then IWR
    clear(); host(0, 1, 0, 1, t0);
    check("datawr lewu", n_lewu, 1); check("datawr iwr", n_iwr, STROBE); check("datawr ial", n_ial, 0);
    check("datawr is", n_is, STROBE); check("datawr oe", n_oew, STROBE + 2); check("datawr bus", int'(cap_ok), 1);
    // high byte, address: latch A then IAL
    clear(); host(0, 1, 1, 1, t0);
    check("addrwr ial", n_ial, STROBE); check("addrwr iwr", n_iwr, 0); check("addrwr bus", int'(cap_ok), 1);
    // first read: IRD, capture into B and D, drive B
    clear(); host(1, 1, 0, 0, t0);
    check("rd ird", n_ird, READC); check("rd leru", n_leru, 1); check("rd lerl", n_lerl, 1);
    check("rd capture under IRD", int'(cap_ok), 1); check("rd oerl", n_oerl, 0);
    check("rd latency", t_oeru - t0, SYNC + READC + 2); // +1: sampled after the edge
    check("rd oeru width", n_oeru, PULSE - READC);
    // second read: drive D only
    clear(); host(1, 1, 0, 1, t0);
    check("rd2 ird", n_ird, 0); check("rd2 oerl>0", int'(n_oerl > 0), 1); check("rd2 oeru", n_oeru, 0);
    // not selected: nothing happens
    clear(); host(0, 0, 0, 1, t0); host(1, 0, 0, 0, t0);
    check("unsel", n_lewu + n_lewl + n_is + n_oeru + n_oerl, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
