// tb_cplx_mult_conj: checks the registered product a*conj(b) against a
// reference computed with 64-bit integers, for random operands and for the
// full-scale corner values (including the most negative one, whose negation
// does not fit), and checks the one-cycle latency of out_valid.
module tb_cplx_mult_conj;
  localparam int A_W = 16, B_W = 16, P_W = A_W + B_W + 1;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [A_W-1:0] a_re = 0, a_im = 0;
  logic signed [B_W-1:0] b_re = 0, b_im = 0;
  logic signed [P_W-1:0] p_re, p_im;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  cplx_mult_conj #(.A_W(A_W), .B_W(B_W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input longint ar, ai, br, bi);
    longint er, ei;
    @(negedge clk);
    a_re = A_W'(ar); a_im = A_W'(ai); b_re = B_W'(br); b_im = B_W'(bi);
    in_valid = 1;
    er = ar * br + ai * bi;
    ei = ai * br - ar * bi;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || longint'(p_re) != er || longint'(p_im) != ei) begin
      failures++;
      $display("FAIL a=(%0d,%0d) b=(%0d,%0d) got (%0d,%0d) v=%b exp (%0d,%0d)",
               ar, ai, br, bi, p_re, p_im, out_valid, er, ei);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid held"); end
  endtask

  initial begin
    longint c [4] = '{-32768, 32767, 0, -1};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (c[x]) foreach (c[y]) begin
      apply(c[x], c[y], c[y], c[x]);
      apply(c[x], c[x], c[y], c[y]);
    end
    repeat (2000) begin
      apply(longint'($signed(16'($urandom))), longint'($signed(16'($urandom))),
            longint'($signed(16'($urandom))), longint'($signed(16'($urandom))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
