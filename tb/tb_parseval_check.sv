// tb_parseval_check: self-checking testbench of the Parseval (sum-of-squares) check.
//
// Streams overlapping frames the way an FFT produces them: the output frame
// of frame f (here the rounded floating-point DFT of the input frame, with one
// sample optionally perturbed) starts two cycles after the last input of frame
// f and runs alongside input frame f+1. The expected flag is worked out in the
// testbench from the integer sums of squares; perturbations are chosen so that
// the energy mismatch falls well below, just around and well above TAU. The
// p_valid pulse must come two cycles after each frame's last output sample.
module tb_parseval_check;
  localparam int unsigned N     = 8;
  localparam int unsigned IN_W  = 10;
  localparam int unsigned OUT_W = 16;
  localparam int unsigned FRAC  = 2;
  localparam longint      TAU   = 262144;
  localparam int unsigned NFRAMES = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_last = 0, out_valid = 0, out_last = 0;
  logic signed [IN_W-1:0]  in_re = 0, in_im = 0;
  logic signed [OUT_W-1:0] out_re = 0, out_im = 0;
  logic p_valid, p;

  parseval_check #(.N(N), .IN_W(IN_W), .OUT_W(OUT_W), .FRAC(FRAC)) dut (.*);

  int checks = 0, failures = 0;
  int xr [NFRAMES][N], xi [NFRAMES][N];
  int yr [NFRAMES][N], yi [NFRAMES][N];
  bit exp_p [NFRAMES];
  int out_last_t [NFRAMES];
  int t = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    real ang, rr, ri;
    longint si, so, d;
    int k, dv, mode;
    for (int f = 0; f < NFRAMES; f++) begin
      si = 0; so = 0;
      for (int n = 0; n < N; n++) begin
        xr[f][n] = $signed(IN_W'($urandom));
        xi[f][n] = $signed(IN_W'($urandom));
        si += longint'(xr[f][n]) * xr[f][n] + longint'(xi[f][n]) * xi[f][n];
      end
      for (int kk = 0; kk < N; kk++) begin
        rr = 0; ri = 0;
        for (int n = 0; n < N; n++) begin
          ang = -2.0 * 3.14159265358979 * real'(n * kk) / real'(N);
          rr += real'(xr[f][n]) * $cos(ang) - real'(xi[f][n]) * $sin(ang);
          ri += real'(xr[f][n]) * $sin(ang) + real'(xi[f][n]) * $cos(ang);
        end
        yr[f][kk] = int'(rr * real'(1 << FRAC));
        yi[f][kk] = int'(ri * real'(1 << FRAC));
      end
      // perturb one sample: none, small, large, or tuned near the threshold
      mode = f % 4;
      k = int'($urandom_range(N - 1));
      case (mode)
        1: yr[f][k] += int'($urandom_range(1, 3)) - 2;
        2: yr[f][k] += (yr[f][k] >= 0 ? -1 : 1) * int'($urandom_range(600, 3000));
        3: begin
          dv = int'($urandom_range(0, 20)) - 10;
          // shift energy by about TAU + dv using the imaginary part of sample k
          yi[f][k] += ((yi[f][k] >= 0) ? 1 : -1) *
                      int'(real'(TAU + dv) / (2.0 * ((yi[f][k] >= 0 ? yi[f][k] : -yi[f][k]) + 1)));
        end
        default: ;
      endcase
      for (int kk = 0; kk < N; kk++)
        so += longint'(yr[f][kk]) * yr[f][kk] + longint'(yi[f][kk]) * yi[f][kk];
      d = (si << ($clog2(N) + 2 * FRAC)) - so;
      if (d < 0) d = -d;
      exp_p[f] = (d > TAU);
    end
  end

  // stimulus: input frame f in cycles f*N .. f*N+N-1, its output N+2 cycles later
  initial begin
    int ti, to, fo;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (t = 0; t < NFRAMES * N + N + 8; t++) begin
      @(posedge clk);
      ti = t; to = t - N - 2;
      in_valid <= ti < NFRAMES * N;
      if (ti < NFRAMES * N) begin
        in_re <= IN_W'(xr[ti / N][ti % N]);
        in_im <= IN_W'(xi[ti / N][ti % N]);
        in_last <= (ti % N) == N - 1;
      end else in_last <= 0;
      out_valid <= to >= 0 && to < NFRAMES * N;
      if (to >= 0 && to < NFRAMES * N) begin
        fo = to / N;
        out_re <= OUT_W'(yr[fo][to % N]);
        out_im <= OUT_W'(yi[fo][to % N]);
        out_last <= (to % N) == N - 1;
        if ((to % N) == N - 1) out_last_t[fo] = t;
      end else out_last <= 0;
    end
    @(posedge clk);
    out_valid <= 0; out_last <= 0;
  end

  // checker
  initial begin
    int f = 0, ones = 0, zeros = 0;
    wait (rst_n);
    while (f < NFRAMES) begin
      @(posedge clk);
      #1;
      if (p_valid) begin
        // t already holds the next cycle's number here, hence 2 + 1
        check(t - out_last_t[f] == 3, $sformatf("p_valid timing frame %0d: %0d", f, t - out_last_t[f]));
        check(p == exp_p[f], $sformatf("frame %0d p=%0b expected %0b", f, p, exp_p[f]));
        if (exp_p[f]) ones++; else zeros++;
        f++;
      end
    end
    check(ones > 20 && zeros > 20, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFRAMES * N + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
