// tb_sample_summation: feeds two blocks of random samples (5 and 4 samples,
// full-scale corners included) straight into the bank inputs and checks every
// running sum the engine emits against sums kept by the testbench: channel
// order, the restart from zero on a block's first sample, the sum_last flag,
// and that one sample takes exactly N_ANT = 12 cycles.
module tb_sample_summation;
  localparam int N_ANT = 12, SAMPLE_W = 16, LOG2_NSAMP = 10;
  localparam int SUM_W = SAMPLE_W + LOG2_NSAMP;

  logic clk = 0, rst_n = 0, start = 0, first = 0, last = 0;
  logic signed [SAMPLE_W-1:0] bank_re [N_ANT], bank_im [N_ANT];
  logic busy, sum_valid, sum_last;
  logic [3:0] sum_idx;
  logic signed [SUM_W-1:0] sum_re, sum_im;
  longint ref_re [N_ANT], ref_im [N_ANT];
  int checks = 0, failures = 0, outs = 0, busy_cycles = 0;
  logic exp_last;

  always #2 clk = ~clk;

  sample_summation #(.N_ANT(N_ANT), .SAMPLE_W(SAMPLE_W), .LOG2_NSAMP(LOG2_NSAMP)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker: sums of one sample arrive in channel order
  always @(posedge clk) begin
    if (busy) busy_cycles++;
    if (rst_n && sum_valid) begin
      int a;
      a = outs % N_ANT;
      checks++;
      if (sum_idx != a || longint'(sum_re) != ref_re[a] || longint'(sum_im) != ref_im[a]
          || sum_last != exp_last) begin
        failures++;
        $display("FAIL ch %0d idx %0d got (%0d,%0d) exp (%0d,%0d) last %b/%b",
                 a, sum_idx, sum_re, sum_im, ref_re[a], ref_im[a], sum_last, exp_last);
      end
      outs++;
    end
  end

  task automatic do_sample(input bit f, input bit l, input bit corner);
    int b0;
    @(negedge clk);
    for (int a = 0; a < N_ANT; a++) begin
      bank_re[a] = corner ? ((a % 2) ? 16'sh7fff : 16'sh8000) : SAMPLE_W'($urandom);
      bank_im[a] = corner ? ((a % 3) ? 16'sh8000 : 16'sh7fff) : SAMPLE_W'($urandom);
      if (f) begin ref_re[a] = 0; ref_im[a] = 0; end
      ref_re[a] += longint'(bank_re[a]);
      ref_im[a] += longint'(bank_im[a]);
    end
    start = 1; first = f; last = l; exp_last = l;
    b0 = busy_cycles;
    @(negedge clk);
    start = 0; first = 0; last = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (busy_cycles - b0 != N_ANT) begin
      failures++;
      $display("FAIL busy for %0d cycles, expected %0d", busy_cycles - b0, N_ANT);
    end
  endtask

  initial begin
    for (int a = 0; a < N_ANT; a++) begin bank_re[a] = 0; bank_im[a] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    do_sample(1, 0, 1);
    do_sample(0, 0, 0);
    do_sample(0, 0, 1);
    do_sample(0, 0, 0);
    do_sample(0, 1, 0);
    do_sample(1, 0, 0);
    do_sample(0, 0, 1);
    do_sample(0, 0, 0);
    do_sample(0, 1, 1);
    checks++;
    if (outs != 9 * N_ANT) begin failures++; $display("FAIL %0d sums emitted", outs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
