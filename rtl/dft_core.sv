// Windowed N-point DFT by direct multiply/accumulate (not an FFT).
//
// For every bin k = 0..N-1 the core walks n = 0..N-1, reads sample x[n] and
// window w[n], forms xw = (x*w) >>> 15, reads the kernel at phase index
// m = k*n mod N (kept as a running sum, so no multiplier is needed for it)
// and accumulates
//   re[k] += xw * cos(2*pi*m/N)      im[k] -= xw * sin(2*pi*m/N)
// in ACC_W-bit accumulators. At the end of a bin the sums are scaled by
// 2^-(15+log2 N), i.e. the result is X[k]/N in Q15, saturated to 16 bits,
// and presented for one cycle on bin_valid / bin_k / bin_re / bin_im.
//
// The windowing multiply, the wavetable kernel and the use of the
// multiply/accumulate are documented; the two accumulators working in
// parallel (one real, one imaginary), the scaling and the pipeline are this
// design's choices. With one (re, im) MAC pair per cycle a block takes
// N*N + 4 cycles from start to done: 16388 cycles for N = 128, about 0.49 ms
// at a 30 ns clock, in line with the "little over 0.5 ms" quoted for the
// processor program.
//
// Interface: start (one cycle, ignored while busy) begins a block; x_addr
// addresses the sample buffer and the window table and tw_idx the
// wavetable, all of which must answer one cycle later. done pulses with the
// last bin.
module dft_core #(
  parameter int unsigned N     = 128,
  parameter int unsigned W     = 16,
  parameter int unsigned ACC_W = 40
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  // sample buffer and window table
  output logic [$clog2(N)-1:0]  x_addr,
  input  logic signed [W-1:0]   x_data,
  input  logic signed [15:0]    w_data,
  // wavetable
  output logic [$clog2(N)-1:0]  tw_idx,
  input  logic signed [15:0]    tw_cos,
  input  logic signed [15:0]    tw_sin,
  // results
  output logic                  bin_valid,
  output logic [$clog2(N)-1:0]  bin_k,
  output logic signed [15:0]    bin_re,
  output logic signed [15:0]    bin_im
);

  localparam int unsigned AW    = $clog2(N);
  localparam int unsigned SHIFT = 15 + AW;

  typedef struct packed {
    logic          valid;
    logic          first;
    logic          last;
    logic [AW-1:0] k;
  } tag_t;

  // stage A: address generation
  logic          run;
  logic [AW-1:0] k_cnt, n_cnt, m_cnt;
  tag_t          tag_a, tag_b, tag_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run   <= 1'b0;
      k_cnt <= '0;
      n_cnt <= '0;
      m_cnt <= '0;
    end else if (!run) begin
      if (start && !busy) begin
        run   <= 1'b1;
        k_cnt <= '0;
        n_cnt <= '0;
        m_cnt <= '0;
      end
    end else begin
      n_cnt <= n_cnt + 1'b1;                 // wraps modulo N
      if (n_cnt == AW'(N - 1)) begin
        m_cnt <= '0;
        k_cnt <= k_cnt + 1'b1;
        if (k_cnt == AW'(N - 1)) run <= 1'b0;
      end else begin
        m_cnt <= m_cnt + k_cnt;              // k*n mod N
      end
    end
  end

  assign x_addr = n_cnt;
  assign tw_idx = m_cnt;
  assign tag_a  = '{valid: run, first: (n_cnt == '0), last: (n_cnt == AW'(N - 1)), k: k_cnt};

  // stage B: memories have answered; window the sample
  logic signed [31:0] xw_full;
  logic signed [15:0] xw_q, cos_q, sin_q;
  assign xw_full = 32'(x_data) * 32'(w_data);

  // stage C: multiply/accumulate
  logic signed [31:0]      p_re, p_im;
  logic signed [ACC_W-1:0] acc_re, acc_im;
  assign p_re = 32'(xw_q) * 32'(cos_q);
  assign p_im = 32'(xw_q) * 32'(sin_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_b  <= '0;
      tag_c  <= '0;
      xw_q   <= '0;
      cos_q  <= '0;
      sin_q  <= '0;
      acc_re <= '0;
      acc_im <= '0;
    end else begin
      tag_b <= tag_a;
      tag_c <= tag_b;
      xw_q  <= 16'(xw_full >>> 15);
      cos_q <= tw_cos;
      sin_q <= tw_sin;
      if (tag_c.valid) begin
        acc_re <= (tag_c.first ? '0 : acc_re) + ACC_W'(p_re);
        acc_im <= (tag_c.first ? '0 : acc_im) - ACC_W'(p_im);
      end
    end
  end

  // stage D: scale and saturate the finished bin
  function automatic logic signed [15:0] scale_sat(input logic signed [ACC_W-1:0] a);
    logic signed [ACC_W-1:0] s;
    s = a >>> SHIFT;
    if (s > ACC_W'(32767))       return 16'sh7FFF;
    else if (s < -ACC_W'(32768)) return 16'sh8000;
    else                         return 16'(s);
  endfunction

  logic d_valid, d_done;
  logic [AW-1:0] d_k;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0;
      d_done  <= 1'b0;
      d_k     <= '0;
    end else begin
      d_valid <= tag_c.valid & tag_c.last;
      d_done  <= tag_c.valid & tag_c.last & (tag_c.k == AW'(N - 1));
      d_k     <= tag_c.k;
    end
  end

  assign bin_valid = d_valid;
  assign bin_k     = d_k;
  assign bin_re    = scale_sat(acc_re);
  assign bin_im    = scale_sat(acc_im);
  assign done      = d_done;
  assign busy      = run | tag_b.valid | tag_c.valid;

endmodule
