// sos_accumulator: magnitude-square and accumulate, one half of a Parseval check.
//
// For every valid complex sample it adds re^2 + im^2 to a running sum. On the
// sample marked 'last' the frame's total is registered on 'sum' with a
// one-cycle 'sum_valid' pulse in the next cycle, and the running sum restarts
// from zero, so frames may follow each other without a gap.
// The squares are exact (full-width products); ACC_W must hold N times the
// largest square, which the instantiating Parseval check guarantees.
// The magnitude-square and accumulator stages follow the structure of the
// sum-of-squares check; the frame handshake is this design's own.
module sos_accumulator #(
  parameter int unsigned W     = 8,
  parameter int unsigned ACC_W = 2 * W + 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid,
  input  logic                last,
  input  logic signed [W-1:0] re,
  input  logic signed [W-1:0] im,
  output logic [ACC_W-1:0]    sum,
  output logic                sum_valid
);

  logic [2*W-1:0]   mag2;   // re^2 + im^2 < 2^(2W-1), unsigned
  logic [ACC_W-1:0] acc;
  logic [ACC_W-1:0] acc_next;

  always_comb begin
    logic signed [2*W-1:0] r2, i2;
    r2 = re * re;
    i2 = im * im;
    mag2 = unsigned'(r2) + unsigned'(i2);
    acc_next = acc + ACC_W'(mag2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      sum       <= '0;
      sum_valid <= 1'b0;
    end else begin
      sum_valid <= valid && last;
      if (valid) begin
        if (last) begin
          sum <= acc_next;
          acc <= '0;
        end else begin
          acc <= acc_next;
        end
      end
    end
  end

endmodule
