// output_combiner: the linear combinations of the FFT outputs that the
// Parseval checks compare against the encoded inputs.
//
// Because the DFT is linear, the FFT of x5 = x1 + x2 + x3 equals
// X5 = X1 + X2 + X3, so a sum-of-squares check with x5 on its input side and
// X5 on its output side watches FFTs 1, 2 and 3 at once without a fourth FFT.
// This block forms, sample by sample,
//     X5 = X1 + X2 + X3,  X6 = X1 + X2 + X4,  X7 = X1 + X3 + X4.
// Purely combinational, two bits wider than its inputs.
module output_combiner
  import fft_pkg::*;
#(
  parameter int unsigned W = 14
) (
  input  logic signed [W-1:0]   y_re [K_FFT],
  input  logic signed [W-1:0]   y_im [K_FFT],
  output logic signed [W+1:0]   c_re [3],      // X5, X6, X7
  output logic signed [W+1:0]   c_im [3]
);

  always_comb begin
    for (int j = 0; j < 3; j++) begin
      c_re[j] = '0;
      c_im[j] = '0;
      for (int i = 0; i < K_FFT; i++) begin
        if (CHECK_SET[j][i]) begin
          c_re[j] = c_re[j] + (W+2)'(y_re[i]);
          c_im[j] = c_im[j] + (W+2)'(y_im[i]);
        end
      end
    end
  end

endmodule
