// fft_ecc_psos: four parallel FFTs protected by the Parity-SOS-ECC scheme.
//
// Four streaming FFTs (f1..f4) transform four independent input streams.
// Protection costs one extra FFT and three sum-of-squares checks:
//   * input_encoder forms x5 = x1+x2+x3, x6 = x1+x2+x4, x7 = x1+x3+x4 and the
//     parity input x = x1+x2+x3+x4;
//   * a parity FFT (fp) transforms x;
//   * output_combiner forms X5 = X1+X2+X3, X6 = X1+X2+X4, X7 = X1+X3+X4 from
//     the four FFT outputs; by linearity X5 is the FFT of x5, so Parseval
//     check j compares the energy of x(4+j) with that of X(4+j) and raises Pj
//     if a watched FFT has been corrupted;
//   * edc (instance f9) reads the pattern of P1..P3, which names a single
//     faulty FFT, and rebuilds that FFT's output as X minus the other three.
//
// Interface: while en is high each of x1..x4 carries one real sample per
// cycle; every N samples form one frame. Frames may follow back to back.
// y1..y4 carry the corrected complex spectra (FRAC fractional bits) with
// y_valid/y_last/y_idx (y_idx = frequency bin), and err_* tell for each frame
// what was found. The first corrected sample of a frame appears N + 5 cycles
// after the cycle carrying the frame's last input sample.
//
// fault_* inject one soft error for test: fault_sel 0..3 corrupts the output
// of FFT 1..4, 4 the parity FFT (XOR of fault_re/fault_im onto bin fault_idx
// of every frame while fault_en is high), and 5..7 flip the result of
// Parseval check 1..3. Tie fault_en low in normal operation.
//
// The block structure, the 8-point size and the 8-bit sample ports x1..x4 and
// en follow the description of the scheme; the ports' stream handshake,
// complex wide outputs, status and fault-injection ports are this design's.
module fft_ecc_psos
  import fft_pkg::*;
#(
  parameter int unsigned     N      = 8,
  parameter int unsigned     DATA_W = 8,
  parameter int unsigned     FRAC   = 2,
  parameter longint unsigned TAU    = 64'd262144,
  localparam int unsigned    LOGN   = $clog2(N),
  localparam int unsigned    OW     = DATA_W + LOGN + 1 + FRAC,   // FFT output width
  localparam int unsigned    PW     = OW + 2                      // parity FFT output width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [DATA_W-1:0] x1,
  input  logic signed [DATA_W-1:0] x2,
  input  logic signed [DATA_W-1:0] x3,
  input  logic signed [DATA_W-1:0] x4,
  // corrected outputs
  output logic                    y_valid,
  output logic                    y_last,
  output logic [LOGN-1:0]         y_idx,
  output logic signed [OW-1:0]    y1_re,
  output logic signed [OW-1:0]    y1_im,
  output logic signed [OW-1:0]    y2_re,
  output logic signed [OW-1:0]    y2_im,
  output logic signed [OW-1:0]    y3_re,
  output logic signed [OW-1:0]    y3_im,
  output logic signed [OW-1:0]    y4_re,
  output logic signed [OW-1:0]    y4_im,
  output logic                    err_detected,
  output logic                    err_corrected,
  output logic [1:0]              err_loc,
  output logic                    check_alarm,
  // soft-error injection
  input  logic                    fault_en,
  input  logic [2:0]              fault_sel,
  input  logic [LOGN-1:0]         fault_idx,
  input  logic [PW-1:0]           fault_re,
  input  logic [PW-1:0]           fault_im
);

  localparam int unsigned EW = DATA_W + 2;   // encoded input width

  // ---------------- input side ----------------
  logic signed [DATA_W-1:0] xin_re [K_FFT];
  logic signed [DATA_W-1:0] xin_im [K_FFT];
  assign xin_re = '{x1, x2, x3, x4};
  assign xin_im = '{default: '0};

  logic signed [EW-1:0] xc_re [3], xc_im [3];
  logic signed [EW-1:0] xp_re, xp_im;

  input_encoder #(.W(DATA_W)) u_enc (
    .x_re(xin_re), .x_im(xin_im), .c_re(xc_re), .c_im(xc_im), .par_re(xp_re), .par_im(xp_im)
  );

  // frame position of the input stream, for the Parseval checks
  logic [LOGN-1:0] in_cnt;
  logic            in_last;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  in_cnt <= '0;
    else if (en) in_cnt <= in_cnt + 1'b1;
  end
  assign in_last = (in_cnt == LOGN'(N - 1));

  // ---------------- FFTs ----------------
  logic                 fv    [K_FFT];
  logic                 fl    [K_FFT];
  logic [LOGN-1:0]      fidx  [K_FFT];
  logic signed [OW-1:0] fy_re [K_FFT];
  logic signed [OW-1:0] fy_im [K_FFT];

  for (genvar i = 0; i < K_FFT; i++) begin : g_fft
    fft #(.N(N), .IN_W(DATA_W), .FRAC(FRAC)) u_fft (
      .clk, .rst_n,
      .in_valid(en), .in_re(xin_re[i]), .in_im(xin_im[i]),
      .out_valid(fv[i]), .out_last(fl[i]), .out_idx(fidx[i]),
      .out_re(fy_re[i]), .out_im(fy_im[i]),
      .fault_en(fault_en && fault_sel == 3'(i)), .fault_idx(fault_idx),
      .fault_re(fault_re[OW-1:0]), .fault_im(fault_im[OW-1:0])
    );
  end

  logic                 pv, pl;
  logic [LOGN-1:0]      pidx;
  logic signed [PW-1:0] py_re, py_im;

  fft #(.N(N), .IN_W(EW), .FRAC(FRAC)) fp (
    .clk, .rst_n,
    .in_valid(en), .in_re(xp_re), .in_im(xp_im),
    .out_valid(pv), .out_last(pl), .out_idx(pidx),
    .out_re(py_re), .out_im(py_im),
    .fault_en(fault_en && fault_sel == 3'd4), .fault_idx(fault_idx),
    .fault_re(fault_re), .fault_im(fault_im)
  );

  // ---------------- Parseval checks on the code ----------------
  logic signed [OW+1:0] yc_re [3], yc_im [3];

  output_combiner #(.W(OW)) u_comb (
    .y_re(fy_re), .y_im(fy_im), .c_re(yc_re), .c_im(yc_im)
  );

  logic       chk_valid [3];
  logic [2:0] chk_p;
  logic [2:0] p_flags;

  for (genvar j = 0; j < 3; j++) begin : g_chk
    parseval_check #(.N(N), .IN_W(EW), .OUT_W(OW + 2), .FRAC(FRAC), .TAU(TAU)) u_chk (
      .clk, .rst_n,
      .in_valid(en), .in_last(in_last), .in_re(xc_re[j]), .in_im(xc_im[j]),
      .out_valid(fv[0]), .out_last(fl[0]), .out_re(yc_re[j]), .out_im(yc_im[j]),
      .p_valid(chk_valid[j]), .p(chk_p[j])
    );
    assign p_flags[j] = chk_p[j] ^ (fault_en && fault_sel == 3'(5 + j));
  end

  // ---------------- detection and correction ----------------
  logic signed [OW-1:0] yo_re [K_FFT], yo_im [K_FFT];

  edc #(.N(N), .OW(OW), .PW(PW)) f9 (
    .clk, .rst_n,
    .in_valid(fv[0]), .in_last(fl[0]), .in_idx(fidx[0]),
    .x_re(fy_re), .x_im(fy_im), .par_re(py_re), .par_im(py_im),
    .p_valid(chk_valid[0]), .p(p_flags),
    .y_valid, .y_last, .y_idx, .y_re(yo_re), .y_im(yo_im),
    .err_detected, .err_corrected, .err_loc, .check_alarm
  );

  assign y1_re = yo_re[0];
  assign y1_im = yo_im[0];
  assign y2_re = yo_re[1];
  assign y2_im = yo_im[1];
  assign y3_re = yo_re[2];
  assign y3_im = yo_im[2];
  assign y4_re = yo_re[3];
  assign y4_im = yo_im[3];

  // All FFTs and checks run in lockstep.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    fv[1] == fv[0] && fv[2] == fv[0] && fv[3] == fv[0] && pv == fv[0] &&
    fl[1] == fl[0] && pl == fl[0] && pidx == fidx[0] &&
    chk_valid[1] == chk_valid[0] && chk_valid[2] == chk_valid[0])
    else $error("fft_ecc_psos: FFTs or checks out of step");

endmodule
