// tb_product_summation: feeds two blocks of random samples into the bank
// inputs and checks every running pair-product sum S_i*conj(S_j) the engine
// emits against 64-bit sums kept by the testbench: the row-major pair order
// (i <= j), the restart from zero on a block's first sample, psum_last, and
// that one sample takes exactly 78 cycles. Samples are also sent back to back
// (a new start in the cycle after the last pair is issued).
module tb_product_summation;
  localparam int N_ANT = 12, SAMPLE_W = 16, LOG2_NSAMP = 10;
  localparam int NPAIR = N_ANT * (N_ANT + 1) / 2;
  localparam int PSUM_W = 2 * SAMPLE_W + 1 + LOG2_NSAMP;

  logic clk = 0, rst_n = 0, start = 0, first = 0, last = 0;
  logic signed [SAMPLE_W-1:0] bank_re [N_ANT], bank_im [N_ANT];
  logic busy, psum_valid, psum_last;
  logic [6:0] psum_idx;
  logic [3:0] psum_i, psum_j;
  logic signed [PSUM_W-1:0] psum_re, psum_im;
  longint ref_re [NPAIR], ref_im [NPAIR];
  int pi_ [NPAIR], pj_ [NPAIR];
  longint exp_re [$], exp_im [$];
  bit exp_last [$];
  int checks = 0, failures = 0, outs = 0, busy_cycles = 0;

  always #2 clk = ~clk;

  product_summation #(.N_ANT(N_ANT), .SAMPLE_W(SAMPLE_W), .LOG2_NSAMP(LOG2_NSAMP)) dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (busy) busy_cycles++;
    if (rst_n && psum_valid) begin
      int k;
      k = outs % NPAIR;
      checks++;
      if (exp_re.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        longint er, ei; bit el;
        er = exp_re.pop_front(); ei = exp_im.pop_front(); el = exp_last.pop_front();
        if (psum_idx != k || psum_i != pi_[k] || psum_j != pj_[k] ||
            longint'(psum_re) != er || longint'(psum_im) != ei || psum_last != el) begin
          failures++;
          $display("FAIL k=%0d got idx %0d (%0d,%0d) (%0d,%0d) exp (%0d,%0d) (%0d,%0d)",
                   k, psum_idx, psum_i, psum_j, psum_re, psum_im, pi_[k], pj_[k], er, ei);
        end
      end
      outs++;
    end
  end

  // load a new random sample and queue the expected running sums
  task automatic load(input bit f, input bit l, input bit corner);
    for (int a = 0; a < N_ANT; a++) begin
      bank_re[a] = corner ? ((a % 2) ? 16'sh7fff : 16'sh8000) : SAMPLE_W'($urandom);
      bank_im[a] = corner ? ((a % 3) ? 16'sh8000 : 16'sh7fff) : SAMPLE_W'($urandom);
    end
    for (int k = 0; k < NPAIR; k++) begin
      longint ar, ai, br, bi;
      ar = bank_re[pi_[k]]; ai = bank_im[pi_[k]];
      br = bank_re[pj_[k]]; bi = bank_im[pj_[k]];
      if (f) begin ref_re[k] = 0; ref_im[k] = 0; end
      ref_re[k] += ar * br + ai * bi;
      ref_im[k] += ai * br - ar * bi;
      exp_re.push_back(ref_re[k]); exp_im.push_back(ref_im[k]); exp_last.push_back(l);
    end
    start = 1; first = f; last = l;
  endtask

  task automatic do_sample(input bit f, input bit l, input bit corner, input bit back2back);
    int b0;
    @(negedge clk);
    load(f, l, corner);
    b0 = busy_cycles;
    @(negedge clk);
    start = 0; first = 0; last = 0;
    if (back2back) begin
      // keep the bank until the last pair has been issued, then reload at once
      repeat (NPAIR - 2) @(negedge clk);
      checks++;
      if (busy_cycles - b0 != NPAIR - 1) begin
        failures++; $display("FAIL back-to-back timing %0d", busy_cycles - b0);
      end
    end else begin
      repeat (NPAIR + 10) @(negedge clk);
      checks++;
      if (busy_cycles - b0 != NPAIR) begin
        failures++;
        $display("FAIL busy for %0d cycles, expected %0d", busy_cycles - b0, NPAIR);
      end
    end
  endtask

  initial begin
    int k = 0;
    for (int i = 0; i < N_ANT; i++)
      for (int j = i; j < N_ANT; j++) begin pi_[k] = i; pj_[k] = j; k++; end
    for (int a = 0; a < N_ANT; a++) begin bank_re[a] = 0; bank_im[a] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    do_sample(1, 0, 1, 0);
    do_sample(0, 0, 0, 1);
    do_sample(0, 0, 0, 1);
    do_sample(0, 0, 1, 0);
    do_sample(0, 1, 0, 0);
    do_sample(1, 0, 0, 0);
    do_sample(0, 0, 0, 0);
    do_sample(0, 1, 1, 0);
    repeat (10) @(negedge clk);
    checks++;
    if (outs != 8 * NPAIR || exp_re.size() != 0) begin
      failures++; $display("FAIL %0d sums emitted", outs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
