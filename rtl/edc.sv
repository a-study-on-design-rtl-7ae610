// edc: error detection and correction for the four protected FFTs.
//
// The three Parseval flags {P3, P2, P1} form a syndrome. Check 1 watches FFTs
// 1, 2, 3, check 2 watches 1, 2, 4 and check 3 watches 1, 3, 4, so a single
// faulty FFT lights a pattern of at least two flags that names it:
//     111 -> FFT1,  011 -> FFT2,  101 -> FFT3,  110 -> FFT4.
// The faulty output is then rebuilt from the parity FFT, whose input is
// x1 + x2 + x3 + x4, by linearity: e.g. X1c = X - X2 - X3 - X4. A syndrome
// with a single flag set points at a check (or its combined output) rather
// than at an FFT; the FFT outputs are passed on unchanged and check_alarm is
// raised. 000 passes everything unchanged.
//
// The flags of a frame are only known after its last output sample, so each
// frame of X1..X4 and X is stored in one of two banks while the other bank is
// read out. p_valid (one pulse per frame) selects the bank just filled; the
// corrected frame is then read out one sample per cycle and registered.
// Timing: y_valid rises two cycles after p_valid, and the N samples follow on
// consecutive cycles; err_* hold the frame's diagnosis while it is streamed.
// Back-to-back frames need N >= 4.
//
// Locating by flag pattern and correcting through the parity FFT follow the
// scheme; the double buffer, the status outputs and the handling of one-flag
// syndromes are this design's choices.
module edc
  import fft_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned OW = 14,        // width of X1..X4
  parameter int unsigned PW = OW + 2     // width of the parity FFT output X
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // FFT output streams, in lockstep
  input  logic                    in_valid,
  input  logic                    in_last,
  input  logic [$clog2(N)-1:0]    in_idx,
  input  logic signed [OW-1:0]    x_re [K_FFT],
  input  logic signed [OW-1:0]    x_im [K_FFT],
  input  logic signed [PW-1:0]    par_re,
  input  logic signed [PW-1:0]    par_im,
  // Parseval flags of the frame, {P3, P2, P1}
  input  logic                    p_valid,
  input  logic [2:0]              p,
  // corrected output stream
  output logic                    y_valid,
  output logic                    y_last,
  output logic [$clog2(N)-1:0]    y_idx,
  output logic signed [OW-1:0]    y_re [K_FFT],
  output logic signed [OW-1:0]    y_im [K_FFT],
  output logic                    err_detected,   // syndrome not 000
  output logic                    err_corrected,  // an FFT was located and rebuilt
  output logic [1:0]              err_loc,        // which FFT (0 = FFT1)
  output logic                    check_alarm     // one flag only: a check is at fault
);

  localparam int unsigned LOGN = $clog2(N);

  initial begin
    assert (N >= 4) else $error("edc: N must be at least 4");
  end

  // Frame store: two banks of N entries holding X1..X4 and X.
  logic signed [OW-1:0] mem_re [2][N][K_FFT];
  logic signed [OW-1:0] mem_im [2][N][K_FFT];
  logic signed [PW-1:0] mpar_re [2][N];
  logic signed [PW-1:0] mpar_im [2][N];

  logic            wr_bank, done_bank, rd_bank;
  logic            rd_act;
  logic [LOGN-1:0] rd_cnt;
  syndrome_e       syn;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int i = 0; i < K_FFT; i++) begin
        mem_re[wr_bank][in_idx][i] <= x_re[i];
        mem_im[wr_bank][in_idx][i] <= x_im[i];
      end
      mpar_re[wr_bank][in_idx] <= par_re;
      mpar_im[wr_bank][in_idx] <= par_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank   <= 1'b0;
      done_bank <= 1'b0;
      rd_bank   <= 1'b0;
      rd_act    <= 1'b0;
      rd_cnt    <= '0;
      syn       <= SYN_NONE;
    end else begin
      if (in_valid && in_last) begin
        done_bank <= wr_bank;
        wr_bank   <= ~wr_bank;
      end
      if (p_valid) begin
        syn     <= syndrome_e'(p);
        rd_bank <= done_bank;
        rd_act  <= 1'b1;
        rd_cnt  <= '0;
      end else if (rd_act) begin
        rd_cnt <= rd_cnt + 1'b1;
        if (rd_cnt == LOGN'(N - 1)) rd_act <= 1'b0;
      end
    end
  end

  // Decode the syndrome.
  logic       fix;
  logic [1:0] loc;
  always_comb begin
    fix = 1'b1;
    loc = 2'd0;
    case (syn)
      SYN_FFT1: loc = 2'd0;
      SYN_FFT2: loc = 2'd1;
      SYN_FFT3: loc = 2'd2;
      SYN_FFT4: loc = 2'd3;
      default:  fix = 1'b0;
    endcase
  end

  // Rebuild the located output: X_loc = X - sum of the other three.
  logic signed [OW-1:0] fix_re [K_FFT];
  logic signed [OW-1:0] fix_im [K_FFT];
  always_comb begin
    logic signed [PW+1:0] acc_re, acc_im;
    acc_re = (PW+2)'(mpar_re[rd_bank][rd_cnt]);
    acc_im = (PW+2)'(mpar_im[rd_bank][rd_cnt]);
    for (int i = 0; i < K_FFT; i++) begin
      if (!(fix && loc == 2'(i))) begin
        acc_re = acc_re - (PW+2)'(mem_re[rd_bank][rd_cnt][i]);
        acc_im = acc_im - (PW+2)'(mem_im[rd_bank][rd_cnt][i]);
      end
    end
    for (int i = 0; i < K_FFT; i++) begin
      if (fix && loc == 2'(i)) begin
        fix_re[i] = acc_re[OW-1:0];
        fix_im[i] = acc_im[OW-1:0];
      end else begin
        fix_re[i] = mem_re[rd_bank][rd_cnt][i];
        fix_im[i] = mem_im[rd_bank][rd_cnt][i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid       <= 1'b0;
      y_last        <= 1'b0;
      y_idx         <= '0;
      err_detected  <= 1'b0;
      err_corrected <= 1'b0;
      err_loc       <= '0;
      check_alarm   <= 1'b0;
      for (int i = 0; i < K_FFT; i++) begin
        y_re[i] <= '0;
        y_im[i] <= '0;
      end
    end else begin
      y_valid <= rd_act;
      y_last  <= rd_act && (rd_cnt == LOGN'(N - 1));
      if (rd_act) begin
        y_idx         <= rd_cnt;
        y_re          <= fix_re;
        y_im          <= fix_im;
        err_detected  <= (syn != SYN_NONE);
        err_corrected <= fix;
        err_loc       <= loc;
        check_alarm   <= (syn != SYN_NONE) && !fix;
      end
    end
  end

  a_no_early_flags: assert property (@(posedge clk) disable iff (!rst_n)
    p_valid |-> (!rd_act || rd_cnt == LOGN'(N - 1)))
    else $error("edc: flags of a new frame arrived while the previous frame was being read");

endmodule
