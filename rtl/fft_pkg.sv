// fft_pkg: constants and arithmetic helpers shared by the protected FFT bank.
//
// The FFTs work on signed fixed-point complex samples. The only non-trivial
// twiddle factor of a radix-2 FFT of up to 8 points is cos(pi/4); it is held
// here as an unsigned integer scaled by 2^TW_FRAC (round(2^14 * 0.70710678)).
// Twiddles are indexed in eighths of a turn: W = exp(-j*2*pi*e/8), e = 0..3,
// which covers every twiddle of an N = 2, 4 or 8 point transform.
// The Q-format, the rounding and the twiddle precision are this design's own
// choices; the published scheme fixes only the transform size (8 points).
package fft_pkg;

  // Number of parallel, protected FFTs (four in every scheme of the design).
  localparam int unsigned K_FFT = 4;

  // Fractional bits of the cos(pi/4) constant.
  localparam int unsigned TW_FRAC = 14;
  // round(2^14 * cos(pi/4)) = round(11585.24) = 11585.
  localparam logic signed [15:0] COS_PI4 = 16'sd11585;

  // The three linear checks of the (7,4) Hamming-style code. Bit i of
  // CHECK_SET[j] is set when FFT i+1 takes part in check j+1:
  //   check 1: x5 = x1 + x2 + x3,  check 2: x6 = x1 + x2 + x4,
  //   check 3: x7 = x1 + x3 + x4.
  localparam logic [3:0] CHECK_SET [3] = '{4'b0111, 4'b1011, 4'b1101};

  // Syndrome of the three Parseval checks {P3, P2, P1} and the FFT it points to.
  // P1 watches FFTs 1,2,3; P2 watches 1,2,4; P3 watches 1,3,4 (see input_encoder).
  typedef enum logic [2:0] {
    SYN_NONE = 3'b000,
    SYN_FFT1 = 3'b111,
    SYN_FFT2 = 3'b011,
    SYN_FFT3 = 3'b101,
    SYN_FFT4 = 3'b110
  } syndrome_e;

  // Bit-reverse the low 'bits' bits of v.
  function automatic int unsigned bitrev(input int unsigned v, input int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned b = 0; b < bits; b++) begin
      if (v[b]) r |= (1 << (bits - 1 - b));
    end
    return r;
  endfunction

endpackage
