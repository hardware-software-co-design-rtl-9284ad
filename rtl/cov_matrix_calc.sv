// cov_matrix_calc: turns the final block sums into covariance entries.
//
// For the pair (i, j) with channel sums s_i, s_j, product sum P_ij and block
// length N = 2^LOG2_NSAMP it computes the numerator of the sample covariance
//   C_ij = P_ij - s_i*conj(m_j) - m_i*conj(s_j) + N*m_i*conj(m_j)
// with the means m = s / N formed by an arithmetic right shift (rounding
// towards minus infinity on both the real and the imaginary part). The
// division by N-1 = 1023 is not done here; it is left to the consumer of the
// matrix, which works in floating point. Because of the truncated means C_ij
// differs from the exact N*cov value P_ij - s_i*conj(s_j)/N by N*e_i*conj(e_j),
// where e = s/N - m has parts in [0, 1): the real part of the error lies in
// [0, 2N) and the imaginary part in (-N, N).
//
// The final sums of the 12 channels are captured from sample_summation's
// stream when sum_last is set. The product stream of the last sample of a
// block then arrives from product_summation one pair per cycle; each pair
// passes through a three-stage pipeline (operand register, three registered
// cplx_mult_conj, final add) and leaves as one entry per cycle, so the 78
// entries take 78 consecutive cycles and are complete 5 cycles after the last
// product was issued. The four-term formula and the truncating division by a
// power of two follow the design; the pipeline and the 3-multiplier structure
// are this implementation's choice.
//
// COV_W = 44 bits holds the result for 16-bit samples and 1024 samples.
module cov_matrix_calc
  import cov_pkg::*;
#(
  parameter int unsigned N_ANT      = DEF_N_ANT,
  parameter int unsigned SAMPLE_W   = DEF_SAMPLE_W,
  parameter int unsigned LOG2_NSAMP = DEF_LOG2_NSAMP,
  parameter int unsigned COV_W      = DEF_COV_W,
  localparam int unsigned NPAIR     = num_pairs(N_ANT),
  localparam int unsigned SUM_W     = SAMPLE_W + LOG2_NSAMP,
  localparam int unsigned PSUM_W    = 2 * SAMPLE_W + 1 + LOG2_NSAMP,
  localparam int unsigned AW        = $clog2(N_ANT),
  localparam int unsigned KW        = $clog2(NPAIR)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // final channel sums
  input  logic                     sum_valid,
  input  logic [AW-1:0]            sum_idx,
  input  logic signed [SUM_W-1:0]  sum_re,
  input  logic signed [SUM_W-1:0]  sum_im,
  input  logic                     sum_last,
  // product sums
  input  logic                     psum_valid,
  input  logic [KW-1:0]            psum_idx,
  input  logic [AW-1:0]            psum_i,
  input  logic [AW-1:0]            psum_j,
  input  logic signed [PSUM_W-1:0] psum_re,
  input  logic signed [PSUM_W-1:0] psum_im,
  input  logic                     psum_last,
  // covariance entries
  output logic                     cov_valid,
  output logic [KW-1:0]            cov_addr,
  output logic signed [COV_W-1:0]  cov_re,
  output logic signed [COV_W-1:0]  cov_im,
  output logic                     matrix_done
);

  localparam int unsigned T_W   = SUM_W + SAMPLE_W + 1;        // s*conj(m)
  localparam int unsigned MM_W  = 2 * SAMPLE_W + 1;            // m*conj(m)
  // The final sum is formed modulo 2^COV_W: every term is narrower than
  // COV_W and the true result fits, so the wrap-around of the additions
  // cancels out.
  localparam int unsigned INT_W = COV_W;

  // ---- final channel sums ---------------------------------------------------
  logic signed [SUM_W-1:0] fs_re [N_ANT];
  logic signed [SUM_W-1:0] fs_im [N_ANT];

  always_ff @(posedge clk) begin
    if (sum_valid && sum_last) begin
      fs_re[sum_idx] <= sum_re;
      fs_im[sum_idx] <= sum_im;
    end
  end

  // ---- stage A: register the final product sum -----------------------------
  logic                     a_valid;
  logic [KW-1:0]            a_k;
  logic [AW-1:0]            a_i, a_j;
  logic signed [PSUM_W-1:0] a_p_re, a_p_im;

  always_ff @(posedge clk) begin
    if (!rst_n) a_valid <= 1'b0;
    else        a_valid <= psum_valid && psum_last;
    if (psum_valid && psum_last) begin
      a_k    <= psum_idx;
      a_i    <= psum_i;
      a_j    <= psum_j;
      a_p_re <= psum_re;
      a_p_im <= psum_im;
    end
  end

  // ---- stage B: means and the three cross products --------------------------
  logic signed [SUM_W-1:0]    si_re, si_im, sj_re, sj_im;
  logic signed [SAMPLE_W-1:0] mi_re, mi_im, mj_re, mj_im;

  always_comb begin
    si_re = fs_re[a_i];
    si_im = fs_im[a_i];
    sj_re = fs_re[a_j];
    sj_im = fs_im[a_j];
    mi_re = SAMPLE_W'(si_re >>> LOG2_NSAMP);
    mi_im = SAMPLE_W'(si_im >>> LOG2_NSAMP);
    mj_re = SAMPLE_W'(sj_re >>> LOG2_NSAMP);
    mj_im = SAMPLE_W'(sj_im >>> LOG2_NSAMP);
  end

  logic                     b_valid;
  logic [KW-1:0]            b_k;
  logic signed [PSUM_W-1:0] b_p_re, b_p_im;
  logic signed [T_W-1:0]    t1_re, t1_im, t2_re, t2_im;
  logic signed [MM_W-1:0]   mm_re, mm_im;
  logic                     v1_unused, v2_unused;

  // s_i * conj(m_j)
  cplx_mult_conj #(.A_W(SUM_W), .B_W(SAMPLE_W)) u_t1 (
    .clk(clk), .rst_n(rst_n), .in_valid(a_valid),
    .a_re(si_re), .a_im(si_im), .b_re(mj_re), .b_im(mj_im),
    .out_valid(b_valid), .p_re(t1_re), .p_im(t1_im)
  );
  // m_i * conj(s_j), computed as conj(s_j * conj(m_i))
  cplx_mult_conj #(.A_W(SUM_W), .B_W(SAMPLE_W)) u_t2 (
    .clk(clk), .rst_n(rst_n), .in_valid(a_valid),
    .a_re(sj_re), .a_im(sj_im), .b_re(mi_re), .b_im(mi_im),
    .out_valid(v1_unused), .p_re(t2_re), .p_im(t2_im)
  );
  // m_i * conj(m_j)
  cplx_mult_conj #(.A_W(SAMPLE_W), .B_W(SAMPLE_W)) u_mm (
    .clk(clk), .rst_n(rst_n), .in_valid(a_valid),
    .a_re(mi_re), .a_im(mi_im), .b_re(mj_re), .b_im(mj_im),
    .out_valid(v2_unused), .p_re(mm_re), .p_im(mm_im)
  );

  always_ff @(posedge clk) begin
    if (a_valid) begin
      b_k    <= a_k;
      b_p_re <= a_p_re;
      b_p_im <= a_p_im;
    end
  end

  // ---- stage C: combine ------------------------------------------------------
  logic signed [INT_W-1:0] c_re, c_im;

  always_comb begin
    // conj(t2) = (t2_re, -t2_im)
    c_re = INT_W'(b_p_re) - INT_W'(t1_re) - INT_W'(t2_re)
         + (INT_W'(mm_re) <<< LOG2_NSAMP);
    c_im = INT_W'(b_p_im) - INT_W'(t1_im) + INT_W'(t2_im)
         + (INT_W'(mm_im) <<< LOG2_NSAMP);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cov_valid   <= 1'b0;
      matrix_done <= 1'b0;
      cov_addr    <= '0;
      cov_re      <= '0;
      cov_im      <= '0;
    end else begin
      cov_valid   <= b_valid;
      matrix_done <= b_valid && (b_k == KW'(NPAIR - 1));
      if (b_valid) begin
        cov_addr <= b_k;
        cov_re   <= c_re;
        cov_im   <= c_im;
      end
    end
  end

endmodule
