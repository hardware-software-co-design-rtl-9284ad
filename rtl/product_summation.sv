// product_summation: running sums of the 78 antenna-pair products over a block.
//
// For every pair (i, j) with i <= j (the upper triangle of the Hermitian
// covariance matrix, diagonal included) it accumulates S_i * conj(S_j) over the
// samples of a block. A single cplx_mult_conj and a single complex adder are
// reused for all num_pairs(N_ANT) = 78 pairs, one pair per cycle, so a sample
// takes 78 cycles; at 240 MHz and 3 Msps there are 80 cycles per sample, which
// is why the clock was raised rather than the multiplier replicated. The
// running sum of each pair waits one sampling period in a 78-deep
// partial_sum_sreg between the adder's output and its input. On the first
// sample of a block the stored partial sum is replaced by zero.
//
// Pairs are issued row-major: (0,0), (0,1), ..., (0,N-1), (1,1), ... ; pair k is
// also the RAM address of the covariance entry (this order is this design's
// choice). It guarantees that when pair (i, j) is summed, channel j's sum has
// already been formed by sample_summation started in the same cycle.
//
// Width: PSUM_W = 2*SAMPLE_W + 1 + LOG2_NSAMP = 43 bits.
//
// Timing: start/first/last sampled in the start cycle; pair k is multiplied in
// cycle start+k, added in start+k+1 and shown on psum_* with psum_valid in
// start+k+2. The bank must stay unchanged during cycles start .. start+77.
module product_summation
  import cov_pkg::*;
#(
  parameter int unsigned N_ANT      = DEF_N_ANT,
  parameter int unsigned SAMPLE_W   = DEF_SAMPLE_W,
  parameter int unsigned LOG2_NSAMP = DEF_LOG2_NSAMP,
  localparam int unsigned NPAIR     = num_pairs(N_ANT),
  localparam int unsigned PROD_W    = 2 * SAMPLE_W + 1,
  localparam int unsigned PSUM_W    = PROD_W + LOG2_NSAMP,
  localparam int unsigned AW        = $clog2(N_ANT),
  localparam int unsigned KW        = $clog2(NPAIR)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       first,
  input  logic                       last,
  input  logic signed [SAMPLE_W-1:0] bank_re [N_ANT],
  input  logic signed [SAMPLE_W-1:0] bank_im [N_ANT],
  output logic                       busy,
  output logic                       psum_valid,
  output logic [KW-1:0]              psum_idx,
  output logic [AW-1:0]              psum_i,
  output logic [AW-1:0]              psum_j,
  output logic signed [PSUM_W-1:0]   psum_re,
  output logic signed [PSUM_W-1:0]   psum_im,
  output logic                       psum_last
);

  // ---- issue stage: pair counter -------------------------------------------
  logic [KW-1:0] k;
  logic [AW-1:0] i, j;
  logic          first_q, last_q, issue;

  assign issue = start || (k != '0);
  assign busy  = issue;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k       <= '0;
      i       <= '0;
      j       <= '0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
    end else begin
      if (start) begin
        first_q <= first;
        last_q  <= last;
      end
      if (issue) begin
        if (k == KW'(NPAIR - 1)) begin
          k <= '0;
          i <= '0;
          j <= '0;
        end else begin
          k <= k + 1'b1;
          if (j == AW'(N_ANT - 1)) begin
            i <= i + 1'b1;
            j <= i + 1'b1;
          end else begin
            j <= j + 1'b1;
          end
        end
      end
    end
  end

  // ---- multiply stage ------------------------------------------------------
  logic                     m_valid;
  logic signed [PROD_W-1:0] m_re, m_im;
  logic [KW-1:0]            m_k;
  logic [AW-1:0]            m_i, m_j;
  logic                     m_first, m_last;

  cplx_mult_conj #(.A_W(SAMPLE_W), .B_W(SAMPLE_W)) u_mult (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (issue),
    .a_re     (bank_re[i]),
    .a_im     (bank_im[i]),
    .b_re     (bank_re[j]),
    .b_im     (bank_im[j]),
    .out_valid(m_valid),
    .p_re     (m_re),
    .p_im     (m_im)
  );

  always_ff @(posedge clk) begin
    if (issue) begin
      m_k     <= k;
      m_i     <= i;
      m_j     <= j;
      m_first <= start ? first : first_q;
      m_last  <= start ? last : last_q;
    end
  end

  // ---- accumulate stage ----------------------------------------------------
  logic [2*PSUM_W-1:0]      head, acc;
  logic signed [PSUM_W-1:0] old_re, old_im, acc_re, acc_im;

  assign old_re = m_first ? '0 : signed'(head[2*PSUM_W-1:PSUM_W]);
  assign old_im = m_first ? '0 : signed'(head[PSUM_W-1:0]);

  always_comb begin
    acc_re = old_re + PSUM_W'(m_re);
    acc_im = old_im + PSUM_W'(m_im);
    acc    = {acc_re, acc_im};
  end

  partial_sum_sreg #(.DEPTH(NPAIR), .WIDTH(2 * PSUM_W)) u_sreg (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (m_valid),
    .din  (acc),
    .dout (head)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      psum_valid <= 1'b0;
      psum_idx   <= '0;
      psum_i     <= '0;
      psum_j     <= '0;
      psum_re    <= '0;
      psum_im    <= '0;
      psum_last  <= 1'b0;
    end else begin
      psum_valid <= m_valid;
      if (m_valid) begin
        psum_idx  <= m_k;
        psum_i    <= m_i;
        psum_j    <= m_j;
        psum_re   <= acc_re;
        psum_im   <= acc_im;
        psum_last <= m_last;
      end
    end
  end

  // The pair counter and the (i, j) counters must agree with the numbering
  // the rest of the design uses for RAM addresses.
  a_pair_index: assert property (@(posedge clk) disable iff (!rst_n)
    issue |-> (i <= j) && (32'(k) == pair_index(N_ANT, 32'(i), 32'(j))))
    else $error("pair counter out of step with (i, j)");

  // A new sample may only start once the previous one has issued all pairs.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> k == '0)
    else $error("product_summation restarted while issuing");

endmodule
