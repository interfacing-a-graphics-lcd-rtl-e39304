// Power of one DFT bin: P = re^2 + im^2.
//
// re and im are Q15 values; the sum of squares is shifted right by 15 to
// return to Q15 and saturated to an unsigned 16-bit word (the only case that
// saturates is a full-scale complex value), then registered: out_valid and
// power follow in_valid by one cycle, and the bin index k travels alongside.
// The sum of squares is the documented operation; the Q15 scaling and
// saturation are this design's choices.
module power_unit #(
  parameter int unsigned KW = 7
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [KW-1:0]       in_k,
  input  logic signed [15:0]  re,
  input  logic signed [15:0]  im,
  output logic                out_valid,
  output logic [KW-1:0]       out_k,
  output logic [15:0]         power
);

  logic [31:0] re2, im2;
  logic [32:0] sum;
  logic [17:0] scaled;

  logic signed [31:0] re_w, im_w;
  assign re_w   = 32'(re);
  assign im_w   = 32'(im);
  assign re2    = 32'(re_w * re_w);
  assign im2    = 32'(im_w * im_w);
  assign sum    = 33'(re2) + 33'(im2);
  assign scaled = 18'(sum >> 15);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_k     <= '0;
      power     <= '0;
    end else begin
      out_valid <= in_valid;
      out_k     <= in_k;
      power     <= (scaled > 18'hFFFF) ? 16'hFFFF : scaled[15:0];
    end
  end

endmodule
