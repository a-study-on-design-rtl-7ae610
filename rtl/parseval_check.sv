// parseval_check: sum-of-squares (Parseval) check of one FFT frame.
//
// Parseval's theorem for an N-point DFT says sum|X[k]|^2 = N * sum|x[n]|^2.
// One sos_accumulator sums |x|^2 over the input stream of the watched FFT,
// another sums |X|^2 over its output stream; a magnitude comparator then
// raises p when the two sides differ by more than the tolerance TAU:
//
//     p = | N * 2^(2*FRAC) * SOS_in - SOS_out | > TAU
//
// (the factor 2^(2*FRAC) accounts for the FRAC fractional bits the FFT adds
// to its outputs). TAU is in units of the squared output LSB; it absorbs the
// rounding of the FFT's twiddle products, and it sets the fault coverage:
// an error that changes the output energy by no more than TAU goes unnoticed.
//
// The input sum of a frame is ready long before its output sum, and the next
// frame's input sum can arrive first, so finished input sums wait in a
// two-entry FIFO. p and p_valid are registered: p_valid pulses in the cycle
// after the one that carries the output sum, i.e. two cycles after the
// frame's last output sample.
//
// Magnitude square, accumulator and magnitude comparator are the check's
// structure as described for the scheme; the FIFO, the integer scaling and
// the default tolerance are this design's choices.
module parseval_check #(
  parameter int unsigned N     = 8,
  parameter int unsigned IN_W  = 10,
  parameter int unsigned OUT_W = 16,
  parameter int unsigned FRAC  = 2,
  parameter longint unsigned TAU = 64'd262144,
  parameter int unsigned ACC_W = 2 * OUT_W + $clog2(N) + 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // samples entering the FFT (or the same linear combination of FFT inputs)
  input  logic                     in_valid,
  input  logic                     in_last,
  input  logic signed [IN_W-1:0]   in_re,
  input  logic signed [IN_W-1:0]   in_im,
  // samples leaving the FFT (or the matching combination of FFT outputs)
  input  logic                     out_valid,
  input  logic                     out_last,
  input  logic signed [OUT_W-1:0]  out_re,
  input  logic signed [OUT_W-1:0]  out_im,
  // result of the check, one pulse per frame
  output logic                     p_valid,
  output logic                     p
);

  localparam int unsigned SHIFT = $clog2(N) + 2 * FRAC;   // N is a power of two
  localparam int unsigned CW    = (ACC_W + 2 > 64) ? ACC_W + 2 : 64;   // comparison width

  logic [ACC_W-1:0] sos_in, sos_out;
  logic             sos_in_valid, sos_out_valid;

  sos_accumulator #(.W(IN_W), .ACC_W(ACC_W)) u_sos_in (
    .clk, .rst_n, .valid(in_valid), .last(in_last), .re(in_re), .im(in_im),
    .sum(sos_in), .sum_valid(sos_in_valid)
  );

  sos_accumulator #(.W(OUT_W), .ACC_W(ACC_W)) u_sos_out (
    .clk, .rst_n, .valid(out_valid), .last(out_last), .re(out_re), .im(out_im),
    .sum(sos_out), .sum_valid(sos_out_valid)
  );

  // Two-entry FIFO of finished input sums.
  logic [ACC_W-1:0] fifo [2];
  logic             wr_ptr, rd_ptr;
  logic [1:0]       count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= 1'b0;
      rd_ptr <= 1'b0;
      count  <= '0;
    end else begin
      if (sos_in_valid) wr_ptr <= ~wr_ptr;
      if (sos_out_valid) rd_ptr <= ~rd_ptr;
      count <= count + 2'(sos_in_valid) - 2'(sos_out_valid);
    end
  end

  always_ff @(posedge clk) begin
    if (sos_in_valid) fifo[wr_ptr] <= sos_in;
  end

  // Magnitude comparator.
  logic signed [ACC_W+1:0] diff;
  logic        [ACC_W+1:0] mag;
  always_comb begin
    diff = $signed({2'b00, fifo[rd_ptr] << SHIFT}) - $signed({2'b00, sos_out});
    mag  = diff[ACC_W+1] ? unsigned'(-diff) : unsigned'(diff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p       <= 1'b0;
    end else begin
      p_valid <= sos_out_valid;
      if (sos_out_valid) p <= (CW'(mag) > CW'(TAU));
    end
  end

  a_fifo_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(count == 2'd2 && sos_in_valid && !sos_out_valid))
    else $error("parseval_check: more than two frames in flight");
  a_fifo_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    sos_out_valid |-> (count != 2'd0))
    else $error("parseval_check: output frame without a matching input frame");

endmodule
