// tb_output_combiner: self-checking testbench of the output combiner: X5 = X1+X2+X3, X6 = X1+X2+X4, X7 = X1+X3+X4.
//
// Applies random and extreme (all most-negative, all most-positive) samples
// and compares every sum with the same sum written out term by term here.
module tb_output_combiner;
  localparam int unsigned W = 14;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [W-1:0] a_re [4], a_im [4];
  logic signed [W+1:0] c_re [3], c_im [3];

  int checks = 0, failures = 0;

  output_combiner #(.W(W)) dut (.y_re(a_re), .y_im(a_im), .c_re, .c_im);

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
