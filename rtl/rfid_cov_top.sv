// rfid_cov_top: real-time covariance engine for a 12-antenna RFID
// angle-of-arrival receiver.
//
// The MUSIC direction finder needs the covariance matrix of the antenna
// signals. The samples of all antennas arrive together at 3 Msps and are only
// valid until the next set arrives, so everything that touches them runs in
// hardware within one sampling period: cov_ctrl captures the set;
// sample_summation accumulates the 12 channel sums with one shared adder in 12
// cycles; product_summation accumulates the 78 upper-triangle products
// S_i*conj(S_j) with one shared complex multiplier and adder in 78 cycles. Both
// keep their running sums in partial-sum shift registers. After the block's
// 1024th sample, cov_matrix_calc forms the 78 covariance numerators (44-bit
// complex integers, to be divided by 1023 by the reader) and writes them into
// cov_result_ram, whose second port is read on the CPU's clock; frame_sync
// announces each new matrix in that clock domain. The eigendecomposition and
// the localization that follow run in software on the CPU and are not part of
// this RTL.
//
// Clocking: clk is the processing clock. At the design point of 240 MHz there
// are 80 cycles per 3 Msps sample, of which the product engine needs 78;
// sample_valid may come at most once every 78 cycles, earlier strobes are
// dropped and set overrun. rd_clk is any CPU-side clock.
//
// Latency: entries are written in cycles t+6 .. t+83 after the strobe (t) of
// a block's last sample; rd_matrix_ready follows 3-4 rd_clk edges later. The
// RAM read port returns an entry one rd_clk cycle after rd_en. Entry address
// k is the row-major upper-triangle index (see cov_pkg).
module rfid_cov_top
  import cov_pkg::*;
#(
  parameter int unsigned N_ANT      = DEF_N_ANT,
  parameter int unsigned SAMPLE_W   = DEF_SAMPLE_W,
  parameter int unsigned LOG2_NSAMP = DEF_LOG2_NSAMP,
  parameter int unsigned COV_W      = DEF_COV_W,
  localparam int unsigned NPAIR     = num_pairs(N_ANT),
  localparam int unsigned KW        = $clog2(NPAIR)
) (
  // processing domain
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       sample_valid,
  input  logic signed [SAMPLE_W-1:0] adc_re [N_ANT],
  input  logic signed [SAMPLE_W-1:0] adc_im [N_ANT],
  output logic                       overrun,
  output logic [15:0]                matrix_count,
  // CPU read domain
  input  logic                       rd_clk,
  input  logic                       rd_rst_n,
  input  logic                       rd_en,
  input  logic [KW-1:0]              rd_addr,
  output logic signed [COV_W-1:0]    rd_re,
  output logic signed [COV_W-1:0]    rd_im,
  output logic                       rd_matrix_ready,
  output logic [15:0]                rd_matrix_count
);

  localparam int unsigned SUM_W  = SAMPLE_W + LOG2_NSAMP;
  localparam int unsigned PSUM_W = 2 * SAMPLE_W + 1 + LOG2_NSAMP;
  localparam int unsigned AW     = $clog2(N_ANT);

  // ---- capture and sequencing ----------------------------------------------
  logic signed [SAMPLE_W-1:0] bank_re [N_ANT];
  logic signed [SAMPLE_W-1:0] bank_im [N_ANT];
  logic                       start, first, last, accept;

  cov_ctrl #(.N_ANT(N_ANT), .SAMPLE_W(SAMPLE_W), .LOG2_NSAMP(LOG2_NSAMP)) u_ctrl (
    .clk, .rst_n, .sample_valid, .adc_re, .adc_im,
    .bank_re, .bank_im, .start, .first, .last, .sample_idx(),
    .accept, .drop(), .overrun
  );

  // ---- channel sums ---------------------------------------------------------
  logic                    sum_valid, sum_last;
  logic [AW-1:0]           sum_idx;
  logic signed [SUM_W-1:0] sum_re, sum_im;

  sample_summation #(.N_ANT(N_ANT), .SAMPLE_W(SAMPLE_W), .LOG2_NSAMP(LOG2_NSAMP)) u_sum (
    .clk, .rst_n, .start, .first, .last, .bank_re, .bank_im,
    .busy(), .sum_valid, .sum_idx, .sum_re, .sum_im, .sum_last
  );

  // ---- product sums ---------------------------------------------------------
  logic                     psum_valid, psum_last, prod_busy;
  logic [KW-1:0]            psum_idx;
  logic [AW-1:0]            psum_i, psum_j;
  logic signed [PSUM_W-1:0] psum_re, psum_im;

  product_summation #(.N_ANT(N_ANT), .SAMPLE_W(SAMPLE_W), .LOG2_NSAMP(LOG2_NSAMP)) u_prod (
    .clk, .rst_n, .start, .first, .last, .bank_re, .bank_im,
    .busy(prod_busy), .psum_valid, .psum_idx, .psum_i, .psum_j,
    .psum_re, .psum_im, .psum_last
  );

  // ---- covariance entries ---------------------------------------------------
  logic                    cov_valid, matrix_done;
  logic [KW-1:0]           cov_addr;
  logic signed [COV_W-1:0] cov_re, cov_im;

  cov_matrix_calc #(.N_ANT(N_ANT), .SAMPLE_W(SAMPLE_W), .LOG2_NSAMP(LOG2_NSAMP),
                    .COV_W(COV_W)) u_cov (
    .clk, .rst_n,
    .sum_valid, .sum_idx, .sum_re, .sum_im, .sum_last,
    .psum_valid, .psum_idx, .psum_i, .psum_j, .psum_re, .psum_im, .psum_last,
    .cov_valid, .cov_addr, .cov_re, .cov_im, .matrix_done
  );

  always_ff @(posedge clk) begin
    if (!rst_n)           matrix_count <= '0;
    else if (matrix_done) matrix_count <= matrix_count + 1'b1;
  end

  // ---- storage and hand-over to the CPU clock domain ------------------------
  logic [2*COV_W-1:0] rd_word;

  cov_result_ram #(.DEPTH(NPAIR), .WIDTH(2 * COV_W)) u_ram (
    .wclk (clk),
    .we   (cov_valid),
    .waddr(cov_addr),
    .wdata({cov_re, cov_im}),
    .rclk (rd_clk),
    .re   (rd_en),
    .raddr(rd_addr),
    .rdata(rd_word)
  );

  assign rd_re = signed'(rd_word[2*COV_W-1:COV_W]);
  assign rd_im = signed'(rd_word[COV_W-1:0]);

  frame_sync #(.STAGES(2)) u_sync (
    .src_clk  (clk),
    .src_rst_n(rst_n),
    .src_pulse(matrix_done),
    .dst_clk  (rd_clk),
    .dst_rst_n(rd_rst_n),
    .dst_pulse(rd_matrix_ready)
  );

  always_ff @(posedge rd_clk) begin
    if (!rd_rst_n)            rd_matrix_count <= '0;
    else if (rd_matrix_ready) rd_matrix_count <= rd_matrix_count + 1'b1;
  end

  // ---- rules of the sequencing ---------------------------------------------
  // The bank only changes once the product engine has read its last pair.
  a_bank_stable: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> !prod_busy || (u_prod.k == KW'(NPAIR - 1)))
    else $error("sample bank overwritten during use");

endmodule
