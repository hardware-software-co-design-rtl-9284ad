// tb_cov_matrix_calc: drives the two input streams the way the summation
// engines do (channel sums first, then 78 pair-product sums, one per cycle)
// with random final sums, and checks every entry against a 64-bit reference:
//   C = P - s_i*conj(m_j) - m_i*conj(s_j) + 1024*m_i*conj(m_j),  m = floor(s/1024)
// It also checks the entry order, that streams without the last flag produce
// nothing, that the 78 entries come in 78 consecutive cycles with a single
// matrix_done pulse on the last, and the error bound of the truncated means
// against the exact N*covariance: 0 <= N*C - (N*P - s_i*conj(s_j)) < 2*N^2.
module tb_cov_matrix_calc;
  localparam int N_ANT = 12, SAMPLE_W = 16, LOG2_NSAMP = 10, COV_W = 44;
  localparam int NPAIR = N_ANT * (N_ANT + 1) / 2;
  localparam int SUM_W = SAMPLE_W + LOG2_NSAMP;
  localparam int PSUM_W = 2 * SAMPLE_W + 1 + LOG2_NSAMP;
  localparam longint N = 1 << LOG2_NSAMP;

  logic clk = 0, rst_n = 0;
  logic sum_valid = 0, sum_last = 0, psum_valid = 0, psum_last = 0;
  logic [3:0] sum_idx = 0, psum_i = 0, psum_j = 0;
  logic [6:0] psum_idx = 0;
  logic signed [SUM_W-1:0] sum_re = 0, sum_im = 0;
  logic signed [PSUM_W-1:0] psum_re = 0, psum_im = 0;
  logic cov_valid, matrix_done;
  logic [6:0] cov_addr;
  logic signed [COV_W-1:0] cov_re, cov_im;

  longint s_re [N_ANT], s_im [N_ANT], p_re [NPAIR], p_im [NPAIR];
  int pi_ [NPAIR], pj_ [NPAIR];
  int checks = 0, failures = 0, n_out = 0, n_done = 0, first_cyc = -1, last_cyc = -1, cyc = 0;
  bit expect_out = 0;

  always #2 clk = ~clk;

  cov_matrix_calc #(.N_ANT(N_ANT), .SAMPLE_W(SAMPLE_W), .LOG2_NSAMP(LOG2_NSAMP),
                    .COV_W(COV_W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint floor_div(input longint s);
    return s >>> LOG2_NSAMP;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n && matrix_done) begin
      n_done++;
      checks++;
      if (!(cov_valid && cov_addr == NPAIR - 1)) begin failures++; $display("FAIL done timing"); end
    end
    if (rst_n && cov_valid) begin
      int k, i, j;
      longint mir, mii, mjr, mji, er, ei, xr, xi;
      k = n_out % NPAIR; i = pi_[k]; j = pj_[k];
      if (n_out % NPAIR == 0) first_cyc = cyc;
      last_cyc = cyc;
      mir = floor_div(s_re[i]); mii = floor_div(s_im[i]);
      mjr = floor_div(s_re[j]); mji = floor_div(s_im[j]);
      er = p_re[k] - (s_re[i] * mjr + s_im[i] * mji) - (mir * s_re[j] + mii * s_im[j])
           + N * (mir * mjr + mii * mji);
      ei = p_im[k] - (s_im[i] * mjr - s_re[i] * mji) - (mii * s_re[j] - mir * s_im[j])
           + N * (mii * mjr - mir * mji);
      checks++;
      if (!expect_out || cov_addr != k || longint'(cov_re) != er || longint'(cov_im) != ei) begin
        failures++;
        $display("FAIL k=%0d addr %0d got (%0d,%0d) exp (%0d,%0d)", k, cov_addr, cov_re, cov_im, er, ei);
      end
      // bound against the exact value
      xr = N * longint'(cov_re) - (N * p_re[k] - (s_re[i] * s_re[j] + s_im[i] * s_im[j]));
      xi = N * longint'(cov_im) - (N * p_im[k] - (s_im[i] * s_re[j] - s_re[i] * s_im[j]));
      checks++;
      if (xr < 0 || xr >= 2 * N * N || xi <= -N * N || xi >= N * N) begin
        failures++; $display("FAIL bound k=%0d err (%0d,%0d)", k, xr, xi);
      end
      n_out++;
    end
  end

  // one block's worth of streams; 'last' marks the final sample
  task automatic run_block(input bit last_flag, input bit diag_pos);
    // random block sums, generated from a plausible data set so that the
    // products are consistent in size (|P| bounded by N * 2^31)
    for (int a = 0; a < N_ANT; a++) begin
      s_re[a] = longint'($signed(SUM_W'({$urandom, $urandom})));
      s_im[a] = longint'($signed(SUM_W'({$urandom, $urandom})));
    end
    for (int k = 0; k < NPAIR; k++) begin
      p_re[k] = longint'($signed(41'({$urandom, $urandom})));
      p_im[k] = (pi_[k] == pj_[k]) ? 0 : longint'($signed(41'({$urandom, $urandom})));
      if (diag_pos && pi_[k] == pj_[k] && p_re[k] < 0) p_re[k] = -p_re[k];
    end
    expect_out = last_flag;
    @(negedge clk);
    // channel sums come first (one per cycle), products follow two cycles later
    for (int t = 0; t < NPAIR + 2; t++) begin
      if (t < N_ANT) begin
        sum_valid = 1; sum_idx = 4'(t); sum_re = SUM_W'(s_re[t]); sum_im = SUM_W'(s_im[t]);
        sum_last = last_flag;
      end else sum_valid = 0;
      if (t >= 2) begin
        psum_valid = 1; psum_idx = 7'(t - 2); psum_i = 4'(pi_[t - 2]); psum_j = 4'(pj_[t - 2]);
        psum_re = PSUM_W'(p_re[t - 2]); psum_im = PSUM_W'(p_im[t - 2]); psum_last = last_flag;
      end
      @(negedge clk);
    end
    psum_valid = 0; sum_valid = 0;
    repeat (10) @(negedge clk);
  endtask

  initial begin
    int k = 0;
    for (int i = 0; i < N_ANT; i++)
      for (int j = i; j < N_ANT; j++) begin pi_[k] = i; pj_[k] = j; k++; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_block(0, 0);
    checks++;
    if (n_out != 0) begin failures++; $display("FAIL output without last"); end
    for (int b = 0; b < 6; b++) begin
      int n_before;
      n_before = n_out;
      run_block(1, b[0]);
      checks++;
      if (n_out - n_before != NPAIR || last_cyc - first_cyc != NPAIR - 1) begin
        failures++; $display("FAIL block %0d: %0d entries over %0d cycles", b, n_out - n_before,
                             last_cyc - first_cyc + 1);
      end
    end
    checks++;
    if (n_done != 6) begin failures++; $display("FAIL %0d matrix_done pulses", n_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
