// Full-size end-to-end test of dsp_lcd_link_top: four spectrum blocks at a
// 20.05 kHz sample rate (one sample every 1663 cycles of a 30 ns clock), each
// polled for, copied through the IDMA bridge, checked word by word and drawn
// on the LCD model. The test body is tb_link_run.
module tb_dsp_lcd_link_top;
  tb_link_run #(.SPACING(1663), .BLOCKS(4)) u_run ();
  localparam int LIMIT = 8_000_000;

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
