// Self-checking test of byte_latch: random load and output-enable patterns
// against a one-register model.
module tb_byte_latch;
  logic clk = 0, rst_n = 0, le = 0, oe = 0, drive;
  logic [7:0] d = 0, q, model = 0;
  int checks = 0, failures = 0;

  byte_latch #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      checks++;
      if (q !== (oe ? model : 8'h00) || drive !== oe) begin
        failures++;
        $display("mismatch cycle %0d: q=%h expected %h", i, q, oe ? model : 8'h00);
      end
      le = 1'($urandom_range(0, 1));
      oe = 1'($urandom_range(0, 1));
      d  = 8'($urandom);
      @(posedge clk);
      if (le) model = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
