// Ping-pong input buffers of the real-time DFT (data buffers #1 and #2).
//
// Codec samples are written, one per s_valid, into the fill bank at a
// wrapping (modulo-N) write pointer. When the N-th sample of a block has been
// written the banks swap roles: the bank just filled becomes the read bank
// for the DFT and block_ready pulses for one cycle, while the next samples go
// into the other bank. The DFT must finish reading a bank before the next
// swap; checking that is the job of the caller.
//
// Interface: rd_addr selects a word of the read bank; rd_data returns it one
// cycle later (synchronous read, as a block RAM). fill_bank tells which bank
// is being written. The two-bank, swap-every-N scheme is the documented one;
// the single 2N-word memory and the read latency are this design's choice.
module sample_buffer #(
  parameter int unsigned N = 128,
  parameter int unsigned W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 s_valid,
  input  logic signed [W-1:0]  s_data,
  input  logic [$clog2(N)-1:0] rd_addr,
  output logic signed [W-1:0]  rd_data,
  output logic                 block_ready,
  output logic                 fill_bank
);

  localparam int unsigned AW = $clog2(N);

  logic signed [W-1:0] mem [2*N];
  logic [AW-1:0] wr_ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr      <= '0;
      fill_bank   <= 1'b0;
      block_ready <= 1'b0;
    end else begin
      block_ready <= 1'b0;
      if (s_valid) begin
        wr_ptr <= (wr_ptr == AW'(N - 1)) ? '0 : wr_ptr + 1'b1;
        if (wr_ptr == AW'(N - 1)) begin
          fill_bank   <= ~fill_bank;
          block_ready <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (s_valid) mem[{fill_bank, wr_ptr}] <= s_data;
    rd_data <= mem[{~fill_bank, rd_addr}];
  end

endmodule
