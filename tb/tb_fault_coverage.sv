// tb_fault_coverage: fault-coverage sweep of the protected FFT bank.
//
// One soft error per frame: bit b of the real part of a random bin of one of
// the four FFTs is flipped, for every bit position b of the 14-bit FFT output
// and every FFT, several frames each, with a fault-free frame before each
// faulty one. Frames are sent one at a time (the error pattern is held for the
// whole frame). For each bit position the testbench prints how many errors
// were located and corrected, missed, or blamed on the wrong FFT, which shows
// how the Parseval tolerance sets the coverage: flips of the low bits change
// the energy by less than the tolerance and pass unnoticed.
// Checked: no fault-free frame is ever flagged; every frame whose error was
// located correctly comes out within 2.5 output LSBs of a floating-point DFT;
// every flip of the top two bits is caught; no flip of bit 0 is.
module tb_fault_coverage;
  localparam int unsigned N      = 8;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned FRAC   = 2;
  localparam int unsigned OW     = DATA_W + $clog2(N) + 1 + FRAC;
  localparam int unsigned PW     = OW + 2;
  localparam int unsigned REPS   = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en = 0;
  logic signed [DATA_W-1:0] x1 = 0, x2 = 0, x3 = 0, x4 = 0;
  logic y_valid, y_last;
  logic [$clog2(N)-1:0] y_idx;
  logic signed [OW-1:0] y1_re, y1_im, y2_re, y2_im, y3_re, y3_im, y4_re, y4_im;
  logic err_detected, err_corrected, check_alarm;
  logic [1:0] err_loc;
  logic fault_en = 0;
  logic [2:0] fault_sel = 0;
  logic [$clog2(N)-1:0] fault_idx = 0;
  logic [PW-1:0] fault_re = 0, fault_im = 0;

  fft_ecc_psos dut (.*);

  int checks = 0, failures = 0;
  int fixed_ok [OW], missed [OW], wrong [OW], alarm [OW];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // one frame in, its corrected frame out; returns the diagnosis
  task automatic run_frame(input bit faulty, input int ch, input int bitpos,
                           output bit det, output bit cor, output int loc,
                           output bit alm, output bit close);
    int xs [4][N];
    real rr, ri, ang, gr, gi;
    int k;
    for (int i = 0; i < 4; i++)
      for (int n = 0; n < N; n++) xs[i][n] = $signed(DATA_W'($urandom));
    fault_en  <= faulty;
    fault_sel <= 3'(ch);
    fault_idx <= $clog2(N)'($urandom_range(N - 1));
    fault_re  <= PW'(1) << bitpos;
    fault_im  <= '0;
    for (int n = 0; n < N; n++) begin
      en <= 1;
      x1 <= DATA_W'(xs[0][n]); x2 <= DATA_W'(xs[1][n]);
      x3 <= DATA_W'(xs[2][n]); x4 <= DATA_W'(xs[3][n]);
      @(posedge clk);
    end
    en <= 0;
    close = 1; det = 0; cor = 0; loc = 0; alm = 0;
    k = 0;
    while (k < N) begin
      @(posedge clk);
      if (y_valid) begin
        det = err_detected; cor = err_corrected; loc = int'(err_loc); alm = check_alarm;
        for (int i = 0; i < 4; i++) begin
          rr = 0; ri = 0;
          for (int n = 0; n < N; n++) begin
            ang = -2.0 * 3.14159265358979 * real'(n * k) / real'(N);
            rr += real'(xs[i][n]) * $cos(ang) * real'(1 << FRAC);
            ri += real'(xs[i][n]) * $sin(ang) * real'(1 << FRAC);
          end
          case (i)
            0: begin gr = real'(y1_re); gi = real'(y1_im); end
            1: begin gr = real'(y2_re); gi = real'(y2_im); end
            2: begin gr = real'(y3_re); gi = real'(y3_im); end
            default: begin gr = real'(y4_re); gi = real'(y4_im); end
          endcase
          if (gr - rr > 2.5 || rr - gr > 2.5 || gi - ri > 2.5 || ri - gi > 2.5) close = 0;
        end
        k++;
      end
    end
    fault_en <= 0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    bit det, cor, alm, close;
    int loc;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < OW; b++) begin
      for (int ch = 0; ch < 4; ch++) begin
        for (int r = 0; r < REPS; r++) begin
          run_frame(0, 0, 0, det, cor, loc, alm, close);
          check(!det && close, $sformatf("fault-free frame flagged or wrong (det=%0b)", det));
          run_frame(1, ch, b, det, cor, loc, alm, close);
          if (cor && loc == ch) begin
            fixed_ok[b]++;
            check(close, $sformatf("bit %0d FFT%0d: located but output wrong", b, ch + 1));
          end else if (cor) wrong[b]++;
          else if (alm) alarm[b]++;
          else missed[b]++;
        end
      end
    end
    $display("bit  corrected  missed  one-flag  wrong-FFT   (of %0d errors per bit)", 4 * REPS);
    for (int b = 0; b < OW; b++)
      $display("%3d  %9d  %6d  %8d  %9d", b, fixed_ok[b], missed[b], alarm[b], wrong[b]);
    check(missed[0] + alarm[0] + wrong[0] == 4 * REPS, "bit 0 flips stay below the tolerance");
    check(fixed_ok[OW-1] == 4 * REPS && fixed_ok[OW-2] >= 4 * REPS - 2, "top-bit flips are corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (OW * 4 * REPS * 2 * (3 * N + 10) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
