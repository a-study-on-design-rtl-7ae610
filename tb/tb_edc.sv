// tb_edc: self-checking testbench of the error detection and correction unit.
//
// Streams back-to-back frames of four FFT outputs X1..X4 plus the parity
// output X = X1 + X2 + X3 + X4, and two cycles after each frame's last sample
// gives a flag pattern {P3,P2,P1}. For the patterns that name an FFT the
// testbench first corrupts that FFT's samples, and expects the original
// values back; for 000 and one-flag patterns it expects the samples passed on
// unchanged (a one-flag pattern with a corrupted FFT must stay corrupted).
// It also checks the status outputs and that y_valid follows p_valid by two
// cycles.
module tb_edc;
  import fft_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned OW = 14;
  localparam int unsigned PW = OW + 2;
  localparam int unsigned NFRAMES = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_last = 0;
  logic [2:0] in_idx = 0;
  logic signed [OW-1:0] x_re [K_FFT], x_im [K_FFT];
  logic signed [PW-1:0] par_re = 0, par_im = 0;
  logic p_valid = 0;
  logic [2:0] p = 0;
  logic y_valid, y_last;
  logic [2:0] y_idx;
  logic signed [OW-1:0] y_re [K_FFT], y_im [K_FFT];
  logic err_detected, err_corrected, check_alarm;
  logic [1:0] err_loc;

  edc #(.N(N), .OW(OW), .PW(PW)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int gr [NFRAMES][N][4], gi [NFRAMES][N][4];   // true values
  int br [NFRAMES][N][4], bi [NFRAMES][N][4];   // as sent (maybe corrupted)
  logic [2:0] pat [NFRAMES];
  int pv_cyc [NFRAMES];
  int seen [8];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int loc_of(input logic [2:0] s);
    case (s)
      3'b111: return 0;
      3'b011: return 1;
      3'b101: return 2;
      3'b110: return 3;
      default: return -1;
    endcase
  endfunction

  initial begin
    int lim, victim;
    lim = 1 << (OW - 3);      // keep the parity sum inside PW bits
    for (int f = 0; f < NFRAMES; f++) begin
      pat[f] = 3'(f % 8);
      victim = loc_of(pat[f]);
      if (victim < 0 && pat[f] != 0) victim = int'($urandom_range(3));
      for (int n = 0; n < N; n++)
        for (int i = 0; i < 4; i++) begin
          gr[f][n][i] = int'($urandom_range(0, 2 * lim - 1)) - lim;
          gi[f][n][i] = int'($urandom_range(0, 2 * lim - 1)) - lim;
          br[f][n][i] = gr[f][n][i];
          bi[f][n][i] = gi[f][n][i];
          if (i == victim && victim >= 0) begin
            br[f][n][i] = gr[f][n][i] + int'($urandom_range(1, 999));
            bi[f][n][i] = gi[f][n][i] - int'($urandom_range(0, 999));
          end
        end
    end
    for (int i = 0; i < 4; i++) begin x_re[i] = 0; x_im[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      for (int n = 0; n < N; n++) begin
        int sr, si;
        sr = 0; si = 0;
        in_valid <= 1;
        in_last  <= (n == N - 1);
        in_idx   <= 3'(n);
        for (int i = 0; i < 4; i++) begin
          x_re[i] <= OW'(br[f][n][i]);
          x_im[i] <= OW'(bi[f][n][i]);
          sr += gr[f][n][i];
          si += gi[f][n][i];
        end
        par_re <= PW'(sr);
        par_im <= PW'(si);
        // flags of the previous frame, two cycles after its last sample
        p_valid <= (n == 1 && f > 0);
        if (n == 1 && f > 0) p <= pat[f - 1];
        @(posedge clk);
      end
    end
    in_valid <= 0; in_last <= 0;
    p_valid <= 0;
    @(posedge clk);
    p_valid <= 1; p <= pat[NFRAMES - 1];
    @(posedge clk);
    p_valid <= 0;
  end

  // record when the flags are applied
  int pf = 0;
  always @(posedge clk) if (rst_n && p_valid) begin
    pv_cyc[pf] = cyc;
    pf++;
  end

  initial begin
    int f = 0, k = 0, l, er, ei;
    wait (rst_n);
    while (f < NFRAMES) begin
      @(posedge clk);
      #1;
      if (y_valid) begin
        l = loc_of(pat[f]);
        if (k == 0) begin
          // pv_cyc holds the count before the sampling edge, cyc the count after
          check(cyc - pv_cyc[f] == 2, $sformatf("y_valid %0d cycles after p_valid", cyc - pv_cyc[f]));
          seen[pat[f]]++;
        end
        check(int'(y_idx) == k && y_last == (k == N - 1), "index/last");
        check(err_detected == (pat[f] != 0), "err_detected");
        check(err_corrected == (l >= 0), "err_corrected");
        check(check_alarm == (pat[f] != 0 && l < 0), "check_alarm");
        if (l >= 0) check(int'(err_loc) == l, "err_loc");
        for (int i = 0; i < 4; i++) begin
          er = (l >= 0) ? gr[f][k][i] : br[f][k][i];
          ei = (l >= 0) ? gi[f][k][i] : bi[f][k][i];
          check(int'(y_re[i]) == er && int'(y_im[i]) == ei,
                $sformatf("frame %0d pat %b bin %0d ch %0d: %0d,%0d want %0d,%0d",
                          f, pat[f], k, i, y_re[i], y_im[i], er, ei));
        end
        if (k == N - 1) begin k = 0; f++; end
        else k++;
      end
    end
    for (int s = 0; s < 8; s++) check(seen[s] > 0, $sformatf("pattern %b exercised", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFRAMES * N + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
