// tb_fft: self-checking testbench of the streaming FFT.
//
// Streams random frames (back to back and with gaps) into the FFT and compares
// every output sample with a floating-point DFT of the same frame, scaled to
// the output's fixed-point format; the error allowed is one output LSB. It also
// checks the latency (first output two cycles after the last input), the
// output index/last markers and the error-injection port (the injected XOR
// pattern must appear on exactly the chosen sample).
module tb_fft;
  localparam int unsigned N     = 8;
  localparam int unsigned IN_W  = 8;
  localparam int unsigned FRAC  = 2;
  localparam int unsigned OUT_W = IN_W + $clog2(N) + 1 + FRAC;
  localparam int unsigned NFRAMES = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    in_valid;
  logic signed [IN_W-1:0]  in_re, in_im;
  logic                    out_valid, out_last;
  logic [$clog2(N)-1:0]    out_idx;
  logic signed [OUT_W-1:0] out_re, out_im;
  logic                    fault_en;
  logic [$clog2(N)-1:0]    fault_idx;
  logic [OUT_W-1:0]        fault_re, fault_im;

  fft #(.N(N), .IN_W(IN_W), .FRAC(FRAC)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // frames as sent, for the checker
  int xr [NFRAMES][N];
  int xi [NFRAMES][N];
  int last_in_cycle [NFRAMES];
  int frame_fault [NFRAMES];      // -1 = none, else sample index
  int fmask_re [NFRAMES];
  int fmask_im [NFRAMES];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // driver
  initial begin
    in_valid = 0; in_re = 0; in_im = 0;
    fault_en = 0; fault_idx = 0; fault_re = 0; fault_im = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      for (int n = 0; n < N; n++) begin
        xr[f][n] = (f == 0) ? ((n == 0) ? 127 : 0) :
                   (f == 1) ? -128 : $signed(IN_W'($urandom));
        xi[f][n] = (f == 0) ? 0 : (f == 1) ? -128 : $signed(IN_W'($urandom));
      end
      frame_fault[f] = ((f % 5) == 3) ? int'($urandom_range(N - 1)) : -1;
      fmask_re[f] = int'($urandom_range(1, (1 << OUT_W) - 1));
      fmask_im[f] = int'($urandom_range(0, (1 << OUT_W) - 1));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      for (int n = 0; n < N; n++) begin
        in_valid <= 1;
        in_re <= IN_W'(xr[f][n]);
        in_im <= IN_W'(xi[f][n]);
        @(posedge clk);
        if (n == N - 1) last_in_cycle[f] = cycle;
        // occasional bubbles inside a frame
        if ((f % 7) == 2 && n == 3) begin
          in_valid <= 0;
          @(posedge clk);
        end
      end
      if ((f % 4) == 1) begin
        in_valid <= 0;
        repeat (5) @(posedge clk);
      end
    end
    in_valid <= 0;
  end

  // fault pattern follows the frame being streamed out
  int of = 0;      // output frame counter
  int ok_ = 0;
  always_comb begin
    fault_en  = (of < NFRAMES) && frame_fault[of] >= 0;
    fault_idx = (of < NFRAMES && frame_fault[of] >= 0) ? $clog2(N)'(frame_fault[of]) : '0;
    fault_re  = (of < NFRAMES) ? OUT_W'(fmask_re[of]) : '0;
    fault_im  = (of < NFRAMES) ? OUT_W'(fmask_im[of]) : '0;
  end

  // checker
  int k_exp = 0;
  initial begin
    real ang, rr, ri, scale;
    int er, ei;
    scale = real'(1 << FRAC);
    wait (rst_n);
    while (of < NFRAMES) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        if (k_exp == 0)
          check(cycle - last_in_cycle[of] == 2, $sformatf("latency frame %0d: %0d", of, cycle - last_in_cycle[of]));
        check(int'(out_idx) == k_exp, "out_idx");
        check(out_last == (k_exp == N - 1), "out_last");
        rr = 0; ri = 0;
        for (int n = 0; n < N; n++) begin
          ang = -2.0 * 3.14159265358979 * real'(n * k_exp) / real'(N);
          rr += real'(xr[of][n]) * $cos(ang) - real'(xi[of][n]) * $sin(ang);
          ri += real'(xr[of][n]) * $sin(ang) + real'(xi[of][n]) * $cos(ang);
        end
        rr *= scale; ri *= scale;
        er = int'(out_re); ei = int'(out_im);
        if (frame_fault[of] == k_exp) begin
          // undo the injected pattern: the rest must be the true value
          er = int'($signed(OUT_W'(out_re ^ OUT_W'(fmask_re[of]))));
          ei = int'($signed(OUT_W'(out_im ^ OUT_W'(fmask_im[of]))));
          check(out_re != $signed(OUT_W'(er)), "fault pattern visible");
        end
        check((real'(er) - rr) <= 1.0 && (rr - real'(er)) <= 1.0,
              $sformatf("re frame %0d k %0d: got %0d want %f", of, k_exp, er, rr));
        check((real'(ei) - ri) <= 1.0 && (ri - real'(ei)) <= 1.0,
              $sformatf("im frame %0d k %0d: got %0d want %f", of, k_exp, ei, ri));
        if (k_exp == N - 1) begin
          k_exp = 0;
          of++;
        end else k_exp++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFRAMES * (N + 8) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
