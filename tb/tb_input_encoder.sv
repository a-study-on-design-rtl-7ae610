// tb_input_encoder: self-checking testbench of the input encoder: x5 = x1+x2+x3, x6 = x1+x2+x4, x7 = x1+x3+x4 and the parity sum x = x1+x2+x3+x4.
//
// Applies random and extreme (all most-negative, all most-positive) samples
// and compares every sum with the same sum written out term by term here.
module tb_input_encoder;
  localparam int unsigned W = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [W-1:0] a_re [4], a_im [4];
  logic signed [W+1:0] c_re [3], c_im [3];
  logic signed [W+1:0] par_re, par_im;
  int checks = 0, failures = 0;

  input_encoder #(.W(W)) dut (.x_re(a_re), .x_im(a_im), .c_re, .c_im, .par_re, .par_im);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic signed [W+1:0] s3(input logic signed [W-1:0] a, b, c);
    return (W+2)'(a) + (W+2)'(b) + (W+2)'(c);
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 4; i++) begin
        a_re[i] = (t == 0) ? {1'b1, {(W-1){1'b0}}} : (t == 1) ? {1'b0, {(W-1){1'b1}}} : W'($urandom);
        a_im[i] = (t == 0) ? {1'b0, {(W-1){1'b1}}} : (t == 1) ? {1'b1, {(W-1){1'b0}}} : W'($urandom);
      end
      @(posedge clk);
      check(c_re[0] == s3(a_re[0], a_re[1], a_re[2]), "5 re");
      check(c_im[0] == s3(a_im[0], a_im[1], a_im[2]), "5 im");
      check(c_re[1] == s3(a_re[0], a_re[1], a_re[3]), "6 re");
      check(c_im[1] == s3(a_im[0], a_im[1], a_im[3]), "6 im");
      check(c_re[2] == s3(a_re[0], a_re[2], a_re[3]), "7 re");
      check(c_im[2] == s3(a_im[0], a_im[2], a_im[3]), "7 im");
      check(par_re == $signed((W+2)'(a_re[0]) + (W+2)'(a_re[1]) + (W+2)'(a_re[2]) + (W+2)'(a_re[3])), "x re");
      check(par_im == $signed((W+2)'(a_im[0]) + (W+2)'(a_im[1]) + (W+2)'(a_im[2]) + (W+2)'(a_im[3])), "x im");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
