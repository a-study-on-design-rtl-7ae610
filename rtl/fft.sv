// fft: streaming radix-2 FFT of N points (N = 8 by default) on complex samples.
//
// Samples arrive one per cycle while in_valid is high, N of them per frame.
// They are written into an input buffer at bit-reversed addresses, already
// shifted left by FRAC so that the transform keeps FRAC fractional bits. In
// the cycle after the last sample of a frame the whole decimation-in-time
// butterfly network (log2(N) stages, evaluated combinationally) is computed
// from that buffer and loaded into an output buffer, which is then streamed
// out one sample per cycle in natural order (out_idx = k for X[k]).
// The input buffer can take the next frame meanwhile, so frames may follow
// each other back to back at one sample per cycle.
//
// Timing: the first output of a frame is valid two cycles after the cycle
// that carried its last input; the N outputs then follow on consecutive cycles.
//
// Arithmetic: outputs are signed fixed point with FRAC fractional bits and
// OUT_W = IN_W + log2(N) + 1 + FRAC bits, enough for |X[k]| <= N*sqrt(2)*max|x|
// so nothing overflows. Multiplication by cos(pi/4) is rounded to the nearest
// output LSB; all other twiddles (1, -j) are exact.
//
// fault_en/fault_idx/fault_re/fault_im XOR an error pattern onto output
// sample fault_idx of every frame while fault_en is high. This models the
// single soft error in one FFT that the protection scheme must survive; it
// is tied off in normal use.
//
// What follows the published scheme: an FFT with sequential inputs and outputs, of
// 8 points. The scheme does not specify the FFT's insides; the radix-2 DIT
// structure, the buffering, the number formats and the latency are this
// design's own.
module fft
  import fft_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned FRAC  = 2,
  parameter int unsigned OUT_W = IN_W + $clog2(N) + 1 + FRAC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // input stream
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   in_re,
  input  logic signed [IN_W-1:0]   in_im,
  // output stream
  output logic                     out_valid,
  output logic                     out_last,
  output logic [$clog2(N)-1:0]     out_idx,
  output logic signed [OUT_W-1:0]  out_re,
  output logic signed [OUT_W-1:0]  out_im,
  // error injection (tie to 0 in normal operation)
  input  logic                     fault_en,
  input  logic [$clog2(N)-1:0]     fault_idx,
  input  logic [OUT_W-1:0]         fault_re,
  input  logic [OUT_W-1:0]         fault_im
);

  localparam int unsigned LOGN = $clog2(N);

  initial begin
    assert (N == 2 || N == 4 || N == 8)
      else $error("fft: N must be 2, 4 or 8");
  end

  typedef logic signed [OUT_W-1:0] word_t;

  word_t            ibuf_re [N];
  word_t            ibuf_im [N];
  word_t            obuf_re [N];
  word_t            obuf_im [N];
  logic [LOGN-1:0]  in_cnt;
  logic             start;
  logic [LOGN-1:0]  out_cnt;
  logic             out_act;

  // Round c*s to the nearest integer, c = cos(pi/4).
  function automatic word_t mul_c(input logic signed [OUT_W:0] s);
    logic signed [OUT_W+16:0] p;
    p = s * COS_PI4;
    p = p + (OUT_W+17)'(1 <<< (TW_FRAC - 1));
    p = p >>> TW_FRAC;
    return p[OUT_W-1:0];
  endfunction

  // t = v * exp(-j*2*pi*e/8)
  function automatic void tw_mul(input word_t a, input word_t b, input int unsigned e,
                                 output word_t tr, output word_t ti);
    logic signed [OUT_W:0] sum, dif;
    sum = {a[OUT_W-1], a} + {b[OUT_W-1], b};
    dif = {b[OUT_W-1], b} - {a[OUT_W-1], a};
    case (e)
      0:       begin tr = a;          ti = b;           end
      1:       begin tr = mul_c(sum); ti = mul_c(dif);  end
      2:       begin tr = b;          ti = -a;          end
      default: begin tr = mul_c(dif); ti = -mul_c(sum); end
    endcase
  endfunction

  // Butterfly network.
  word_t st_re [LOGN+1][N];
  word_t st_im [LOGN+1][N];

  always_comb begin
    word_t tr, ti;
    for (int i = 0; i < N; i++) begin
      st_re[0][i] = ibuf_re[i];
      st_im[0][i] = ibuf_im[i];
    end
    for (int s = 0; s < LOGN; s++) begin
      for (int k0 = 0; k0 < N; k0 += (2 << s)) begin
        for (int j = 0; j < (1 << s); j++) begin
          tw_mul(st_re[s][k0+j+(1<<s)], st_im[s][k0+j+(1<<s)],
                 int'(unsigned'(j) * (8 / (2 << s))), tr, ti);
          st_re[s+1][k0+j]        = st_re[s][k0+j] + tr;
          st_im[s+1][k0+j]        = st_im[s][k0+j] + ti;
          st_re[s+1][k0+j+(1<<s)] = st_re[s][k0+j] - tr;
          st_im[s+1][k0+j+(1<<s)] = st_im[s][k0+j] - ti;
        end
      end
    end
  end

  // Input side: bit-reversed write, frame counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt <= '0;
      start  <= 1'b0;
    end else begin
      start <= in_valid && (in_cnt == LOGN'(N - 1));
      if (in_valid) in_cnt <= in_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      ibuf_re[bitrev(32'(in_cnt), LOGN)] <= word_t'(in_re) <<< FRAC;
      ibuf_im[bitrev(32'(in_cnt), LOGN)] <= word_t'(in_im) <<< FRAC;
    end
    if (start) begin
      for (int i = 0; i < N; i++) begin
        obuf_re[i] <= st_re[LOGN][i];
        obuf_im[i] <= st_im[LOGN][i];
      end
    end
  end

  // Output side: stream the finished frame.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_act <= 1'b0;
      out_cnt <= '0;
    end else if (start) begin
      out_act <= 1'b1;
      out_cnt <= '0;
    end else if (out_act) begin
      out_cnt <= out_cnt + 1'b1;
      if (out_cnt == LOGN'(N - 1)) out_act <= 1'b0;
    end
  end

  logic hit;
  assign hit       = fault_en && (fault_idx == out_cnt);
  assign out_valid = out_act;
  assign out_last  = out_act && (out_cnt == LOGN'(N - 1));
  assign out_idx   = out_cnt;
  assign out_re    = obuf_re[out_cnt] ^ (hit ? word_t'(fault_re) : '0);
  assign out_im    = obuf_im[out_cnt] ^ (hit ? word_t'(fault_im) : '0);

  // A new frame may only complete once the previous one has been streamed out.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (!out_act || out_cnt == LOGN'(N - 1)))
    else $error("fft: frame completed while the previous one was still streaming");

endmodule
