// Workload test of dsp_lcd_link_top at the 22.05 kHz sample rate: one sample
// every 1512 cycles of a 30 ns clock (5.80 ms per 128-sample block), three
// blocks polled for, copied, checked and drawn. The test body is tb_link_run.
module tb_workload_22k;
  tb_link_run #(.SPACING(1512), .BLOCKS(3)) u_run ();
  localparam int LIMIT = 6_000_000;

  initial begin
    wait (u_run.finished);
    $display("TB_RESULT checks=%0d failures=%0d", u_run.checks, u_run.failures);
    $finish;
  end

  // Watchdog: far more cycles than the run needs.
  initial begin
    repeat (LIMIT) @(posedge u_run.clk);
    u_run.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", u_run.checks, u_run.failures);
    $finish;
  end
endmodule
