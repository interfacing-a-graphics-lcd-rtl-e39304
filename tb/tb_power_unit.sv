// Self-checking test of power_unit: random and corner values of re and im
// against P = min(65535, (re^2 + im^2) >> 15), with one cycle of latency.
module tb_power_unit;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [6:0] in_k = 0, out_k;
  logic signed [15:0] re = 0, im = 0;
  logic [15:0] power;
  int checks = 0, failures = 0;

  power_unit #(.KW(7)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    int rv, iv;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      case (t)
        0: begin rv = -32768; iv = -32768; end
        1: begin rv = 32767; iv = 0; end
        2: begin rv = 0; iv = -32768; end
        3: begin rv = 181; iv = 181; end
        default: begin
          rv = (t % 3 == 0) ? $urandom_range(0, 400) - 200 : int'($signed(16'($urandom)));
          iv = (t % 3 == 0) ? $urandom_range(0, 400) - 200 : int'($signed(16'($urandom)));
        end
      endcase
      @(negedge clk); in_valid = 1; in_k = 7'(t); re = 16'(rv); im = 16'(iv);
      @(negedge clk); in_valid = 0;
      e = (longint'(rv) * rv + longint'(iv) * iv) >>> 15;
      if (e > 65535) e = 65535;
      checks++;
      if (!out_valid || out_k != 7'(t) || power != 16'(e)) begin
        failures++; $display("FAIL re=%0d im=%0d: %0d expected %0d", rv, iv, power, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
