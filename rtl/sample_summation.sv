// sample_summation: running sum of every antenna signal over a block.
//
// One complex adder is shared by all N_ANT channels. After start it takes one
// channel per cycle (N_ANT = 12 cycles per sample): it adds the channel's
// sample from the bank to that channel's partial sum, which comes back from a
// N_ANT-deep partial_sum_sreg, and pushes the result into the same shift
// register. On the first sample of a block the partial sum is replaced by zero,
// which restarts the accumulation without clearing the store.
//
// Width: SUM_W = SAMPLE_W + LOG2_NSAMP (26 bits for 16-bit samples and 1024
// samples), enough for 1024 full-scale samples.
//
// Interface/timing: start, first and last are sampled in the start cycle;
// channel a is added in cycle start+a and its new running sum appears on
// sum_re/sum_im with sum_valid in cycle start+a+1, tagged with sum_idx = a
// and sum_last (set on the block's last sample, when the sum is final).
// The bank must stay unchanged during the N_ANT adding cycles.
module sample_summation
  import cov_pkg::*;
#(
  parameter int unsigned N_ANT      = DEF_N_ANT,
  parameter int unsigned SAMPLE_W   = DEF_SAMPLE_W,
  parameter int unsigned LOG2_NSAMP = DEF_LOG2_NSAMP,
  localparam int unsigned SUM_W     = SAMPLE_W + LOG2_NSAMP,
  localparam int unsigned AW        = $clog2(N_ANT)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       first,
  input  logic                       last,
  input  logic signed [SAMPLE_W-1:0] bank_re [N_ANT],
  input  logic signed [SAMPLE_W-1:0] bank_im [N_ANT],
  output logic                       busy,
  output logic                       sum_valid,
  output logic [AW-1:0]              sum_idx,
  output logic signed [SUM_W-1:0]    sum_re,
  output logic signed [SUM_W-1:0]    sum_im,
  output logic                       sum_last
);

  logic [AW-1:0]           cnt;
  logic                    first_q, last_q;
  logic                    issue, f_now, l_now;
  logic [2*SUM_W-1:0]      head, acc;
  logic signed [SUM_W-1:0] acc_re, acc_im, old_re, old_im;

  assign issue = start || (cnt != '0);
  assign f_now = start ? first : first_q;
  assign l_now = start ? last  : last_q;
  assign busy  = issue;

  assign old_re = f_now ? '0 : signed'(head[2*SUM_W-1:SUM_W]);
  assign old_im = f_now ? '0 : signed'(head[SUM_W-1:0]);

  always_comb begin
    acc_re = old_re + SUM_W'(bank_re[cnt]);
    acc_im = old_im + SUM_W'(bank_im[cnt]);
    acc    = {acc_re, acc_im};
  end

  partial_sum_sreg #(.DEPTH(N_ANT), .WIDTH(2 * SUM_W)) u_sreg (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (issue),
    .din  (acc),
    .dout (head)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      first_q   <= 1'b0;
      last_q    <= 1'b0;
      sum_valid <= 1'b0;
      sum_idx   <= '0;
      sum_re    <= '0;
      sum_im    <= '0;
      sum_last  <= 1'b0;
    end else begin
      if (start) begin
        first_q <= first;
        last_q  <= last;
      end
      if (issue) cnt <= (cnt == AW'(N_ANT - 1)) ? '0 : cnt + 1'b1;
      sum_valid <= issue;
      if (issue) begin
        sum_idx  <= cnt;
        sum_re   <= acc_re;
        sum_im   <= acc_im;
        sum_last <= l_now;
      end
    end
  end

  // A new sample may only start once the previous one has been summed.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> cnt == '0)
    else $error("sample_summation restarted while summing");

endmodule
