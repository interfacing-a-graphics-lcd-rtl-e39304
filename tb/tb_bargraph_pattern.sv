// Self-checking test of bargraph_pattern: for every page and many values
// the byte must equal the column of a bar of height value>>10 drawn pixel by
// pixel (row r of the 64-row display lit when 63 - r < height).
module tb_bargraph_pattern;
  logic [15:0] value;
  logic [2:0]  page;
  logic [7:0]  pattern;
  int checks = 0, failures = 0;

  bargraph_pattern #(.SCALE_SHIFT(10)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e;
    int h;
    for (int t = 0; t < 4000; t++) begin
      value = (t < 64) ? 16'(t << 10) + 16'(t * 7) : 16'($urandom);
      for (int p = 0; p < 8; p++) begin
        page = 3'(p);
        #1;
        h = int'(value >> 10);
        for (int b = 0; b < 8; b++) e[b] = ((63 - (8 * p + b)) < h);
        checks++;
        if (pattern != e) begin
          failures++; $display("FAIL value %h page %0d: %b expected %b", value, p, pattern, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
