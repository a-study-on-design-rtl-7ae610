// tb_fft_ecc_psos: end-to-end testbench of the protected parallel FFT bank.
//
// Runs the design at its default parameters (N = 8 points, 8-bit samples).
// Four random real input streams are fed frame after frame, mostly back to
// back, with a few gaps and in-frame bubbles. Each frame carries one kind of
// event, in turn:
//   none             no error;
//   FFTk (k = 1..4)  a soft error flips bit 12 (weight 2^12 output LSBs) of
//                    the real part of one bin of FFT k: it must be detected,
//                    located as FFT k and corrected;
//   parity           a random error in the parity FFT: nothing is flagged and
//                    the outputs stay correct;
//   small            bit 0 of one bin of a random FFT flips: the energy change
//                    is far below the tolerance, so nothing is flagged;
//   checkj           the result of Parseval check j is flipped: check_alarm
//                    rises and the FFT outputs pass unchanged.
// The reference is a floating-point DFT of each input frame; outputs must
// match it within 1 output LSB (2.5 after a correction, which adds the
// rounding of four FFTs). Whether a bit flip is detectable is worked out from
// the reference energies; the rare flips whose energy change comes near the
// tolerance are reported as marginal and their outputs are not checked.
// The latency from a frame's last input to its first corrected output must
// be N + 5 cycles. Every event kind must occur; the counts are printed.
module tb_fft_ecc_psos;
  import fft_pkg::*;
  localparam int unsigned N      = 8;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned FRAC   = 2;
  localparam int unsigned OW     = DATA_W + $clog2(N) + 1 + FRAC;
  localparam int unsigned PW     = OW + 2;
  localparam real         TAU    = 262144.0;
  localparam int unsigned NFRAMES = 360;
  localparam int unsigned NCAT   = 12;

  // event kinds, indexed by frame % NCAT
  typedef enum int {EV_NONE, EV_FFT1, EV_FFT2, EV_FFT3, EV_FFT4, EV_PARITY, EV_SMALL,
                    EV_CHK1, EV_CHK2, EV_CHK3} ev_e;
  ev_e cat_tab [NCAT] = '{EV_NONE, EV_FFT1, EV_FFT2, EV_FFT3, EV_FFT4, EV_PARITY, EV_SMALL,
                         EV_CHK1, EV_NONE, EV_CHK2, EV_NONE, EV_CHK3};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en = 0;
  logic signed [DATA_W-1:0] x1 = 0, x2 = 0, x3 = 0, x4 = 0;
  logic y_valid, y_last;
  logic [$clog2(N)-1:0] y_idx;
  logic signed [OW-1:0] y1_re, y1_im, y2_re, y2_im, y3_re, y3_im, y4_re, y4_im;
  logic err_detected, err_corrected, check_alarm;
  logic [1:0] err_loc;
  logic fault_en;
  logic [2:0] fault_sel;
  logic [$clog2(N)-1:0] fault_idx;
  logic [PW-1:0] fault_re, fault_im;

  fft_ecc_psos dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int  xs [NFRAMES][4][N];
  real rr [NFRAMES][4][N], ri [NFRAMES][4][N];   // reference spectra, output LSB units
  ev_e ev [NFRAMES];
  int  fbin [NFRAMES];
  int  fch  [NFRAMES];                             // 0..3 FFT, 4 parity
  int  fmre [NFRAMES], fmim [NFRAMES];
  int  last_in [NFRAMES];
  int  count [10];
  int  marginal = 0, undetected_big = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- stimulus ----------------
  initial begin
    real ang;
    for (int f = 0; f < NFRAMES; f++) begin
      ev[f] = cat_tab[f % NCAT];
      for (int i = 0; i < 4; i++)
        for (int n = 0; n < N; n++)
          xs[f][i][n] = (f < 2) ? ((f == 0) ? -128 : 127) : $signed(DATA_W'($urandom));
      for (int i = 0; i < 4; i++)
        for (int k = 0; k < N; k++) begin
          rr[f][i][k] = 0; ri[f][i][k] = 0;
          for (int n = 0; n < N; n++) begin
            ang = -2.0 * 3.14159265358979 * real'(n * k) / real'(N);
            rr[f][i][k] += real'(xs[f][i][n]) * $cos(ang) * real'(1 << FRAC);
            ri[f][i][k] += real'(xs[f][i][n]) * $sin(ang) * real'(1 << FRAC);
          end
        end
      fbin[f] = int'($urandom_range(N - 1));
      fmim[f] = 0;
      case (ev[f])
        EV_FFT1, EV_FFT2, EV_FFT3, EV_FFT4: begin
          fch[f] = int'(ev[f]) - int'(EV_FFT1);
          fmre[f] = 1 << 12;
        end
        EV_PARITY: begin
          fch[f] = 4;
          fmre[f] = int'($urandom_range(1, (1 << PW) - 1));
          fmim[f] = int'($urandom_range(0, (1 << PW) - 1));
        end
        EV_SMALL: begin
          fch[f] = int'($urandom_range(3));
          fmre[f] = 1;
        end
        default: begin
          fch[f] = 0;
          fmre[f] = 0;
        end
      endcase
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      for (int n = 0; n < N; n++) begin
        en <= 1;
        x1 <= DATA_W'(xs[f][0][n]);
        x2 <= DATA_W'(xs[f][1][n]);
        x3 <= DATA_W'(xs[f][2][n]);
        x4 <= DATA_W'(xs[f][3][n]);
        @(posedge clk);
        if ((f % 9) == 5 && n == 2) begin
          en <= 0;
          @(posedge clk);
        end
      end
      if ((f % 5) == 4) begin
        en <= 0;
        repeat (3) @(posedge clk);
      end
    end
    en <= 0;
  end

  // cycle of each frame's last input (count before the sampling edge)
  int in_n = 0, in_f = 0;
  always @(posedge clk) if (rst_n && en) begin
    if (in_n == N - 1) begin
      last_in[in_f] = cyc;
      in_f++;
      in_n = 0;
    end else in_n++;
  end

  // ---------------- fault injection, timed by the FFT and check strobes ----------------
  int ofr = 0, pfr = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_fft[0].u_fft.out_valid && dut.g_fft[0].u_fft.out_last) ofr++;
    if (dut.g_chk[0].u_chk.p_valid) pfr++;
  end

  always_comb begin
    fault_en = 0; fault_sel = 0; fault_idx = 0; fault_re = 0; fault_im = 0;
    if (dut.g_fft[0].u_fft.out_valid && ofr < NFRAMES &&
        ev[ofr] inside {EV_FFT1, EV_FFT2, EV_FFT3, EV_FFT4, EV_PARITY, EV_SMALL}) begin
      fault_en  = 1;
      fault_sel = 3'(fch[ofr]);
      fault_idx = $clog2(N)'(fbin[ofr]);
      fault_re  = PW'(fmre[ofr]);
      fault_im  = PW'(fmim[ofr]);
    end
    if (dut.g_chk[0].u_chk.p_valid && pfr < NFRAMES && ev[pfr] inside {EV_CHK1, EV_CHK2, EV_CHK3}) begin
      fault_en  = 1;
      fault_sel = 3'(5 + int'(ev[pfr]) - int'(EV_CHK1));
    end
  end

  // For a bit-12 flip in FFT v, bin k: is each check that watches v sure to fire?
  // Returns 1 = surely detected, 0 = surely not, -1 = marginal.
  function automatic int detect_class(input int f);
    int v, k, r, b, nsure;
    real s, d, de;
    v = fch[f]; k = fbin[f];
    r = int'(rr[f][v][k]);
    if (((r + 2) >>> 12) != ((r - 2) >>> 12)) return -1;     // rounding may decide the bit
    b = (r >>> 12) & 1;
    d = b ? -4096.0 : 4096.0;
    nsure = 0;
    for (int j = 0; j < 3; j++) begin
      if (!CHECK_SET[j][v]) continue;
      s = 0;
      for (int i = 0; i < 4; i++) if (CHECK_SET[j][i]) s += rr[f][i][k];
      de = (s + d) * (s + d) - s * s;
      if (de < 0) de = -de;
      if (de < 2.0 * TAU) return -1;
      nsure++;
    end
    return 1;
  endfunction

  // ---------------- checker ----------------
  initial begin
    int f = 0, k = 0, dc, loc;
    real tol, got_r, got_i, er, ei;
    bit expect_fix, expect_alarm, skip;
    wait (rst_n);
    while (f < NFRAMES) begin
      @(posedge clk);
      if (y_valid) begin
        if (k == 0) begin
          check(cyc - last_in[f] == N + 5,
                $sformatf("frame %0d latency %0d", f, cyc - last_in[f]));
        end
        check(int'(y_idx) == k && y_last == (k == N - 1), "index/last");
        expect_fix = 0; expect_alarm = 0; skip = 0; loc = 0;
        case (ev[f])
          EV_FFT1, EV_FFT2, EV_FFT3, EV_FFT4: begin
            dc = detect_class(f);
            if (dc == 1) begin expect_fix = 1; loc = fch[f]; end
            else skip = 1;
          end
          EV_CHK1, EV_CHK2, EV_CHK3: expect_alarm = 1;
          default: ;
        endcase
        if (skip) begin
          if (k == 0) marginal++;
        end else begin
          check(err_corrected == expect_fix, $sformatf("frame %0d ev %s corrected=%0b", f, ev[f].name(), err_corrected));
          check(check_alarm == expect_alarm, $sformatf("frame %0d ev %s alarm=%0b", f, ev[f].name(), check_alarm));
          check(err_detected == (expect_fix || expect_alarm), "err_detected");
          if (expect_fix) check(int'(err_loc) == loc, $sformatf("frame %0d loc %0d want %0d", f, err_loc, loc));
          for (int i = 0; i < 4; i++) begin
            case (i)
              0: begin got_r = real'(y1_re); got_i = real'(y1_im); end
              1: begin got_r = real'(y2_re); got_i = real'(y2_im); end
              2: begin got_r = real'(y3_re); got_i = real'(y3_im); end
              default: begin got_r = real'(y4_re); got_i = real'(y4_im); end
            endcase
            er = rr[f][i][k]; ei = ri[f][i][k];
            tol = (expect_fix && i == loc) ? 2.5 : 1.0;
            if (ev[f] == EV_SMALL && i == fch[f] && k == fbin[f]) tol = 2.0;
            check(got_r - er <= tol && er - got_r <= tol && got_i - ei <= tol && ei - got_i <= tol,
                  $sformatf("frame %0d ev %s ch %0d bin %0d: (%0.0f,%0.0f) want (%0.2f,%0.2f)",
                            f, ev[f].name(), i + 1, k, got_r, got_i, er, ei));
          end
          if (k == 0) count[int'(ev[f])]++;
        end
        if (k == N - 1) begin k = 0; f++; end
        else k++;
      end
    end
    $display("events: none=%0d fft1=%0d fft2=%0d fft3=%0d fft4=%0d parity=%0d small=%0d chk1=%0d chk2=%0d chk3=%0d marginal=%0d",
             count[0], count[1], count[2], count[3], count[4], count[5], count[6], count[7], count[8], count[9], marginal);
    for (int e = 0; e < 10; e++) check(count[e] > 0, $sformatf("event kind %0d exercised", e));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFRAMES * (N + 4) + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
