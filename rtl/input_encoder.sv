// input_encoder: the coding block in front of the redundant FFTs.
//
// From the four input samples x1..x4 of the current cycle it forms the three
// check inputs of the Hamming-style code and the parity input:
//     x5 = x1 + x2 + x3,  x6 = x1 + x2 + x4,  x7 = x1 + x3 + x4,
//     x  = x1 + x2 + x3 + x4.
// x5..x7 feed the three Parseval checks; x feeds the parity FFT, whose output
// is used to rebuild a faulty FFT's output. Purely combinational; the sums are
// two bits wider than the inputs so they cannot overflow. The sums follow the
// scheme; that they are complex and full width is this design's choice.
module input_encoder
  import fft_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0]   x_re  [K_FFT],
  input  logic signed [W-1:0]   x_im  [K_FFT],
  output logic signed [W+1:0]   c_re  [3],     // x5, x6, x7
  output logic signed [W+1:0]   c_im  [3],
  output logic signed [W+1:0]   par_re,        // x
  output logic signed [W+1:0]   par_im
);

  always_comb begin
    for (int j = 0; j < 3; j++) begin
      c_re[j] = '0;
      c_im[j] = '0;
      for (int i = 0; i < K_FFT; i++) begin
        if (CHECK_SET[j][i]) begin
          c_re[j] = c_re[j] + (W+2)'(x_re[i]);
          c_im[j] = c_im[j] + (W+2)'(x_im[i]);
        end
      end
    end
    par_re = '0;
    par_im = '0;
    for (int i = 0; i < K_FFT; i++) begin
      par_re = par_re + (W+2)'(x_re[i]);
      par_im = par_im + (W+2)'(x_im[i]);
    end
  end

endmodule
