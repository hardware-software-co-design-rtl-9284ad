// cov_ctrl: input register and block sequencer of the covariance engine.
//
// The ADC delivers one set of N_ANT simultaneous complex samples per sampling
// period (3 Msps, i.e. 80 cycles of a 240 MHz clock) and the set is only valid
// until the next one arrives. On a sample_valid strobe this block copies the
// set into the sample bank that the summation and product engines then read,
// one antenna or one antenna pair per cycle, and pulses start one cycle later.
// It counts the samples of the 2^LOG2_NSAMP-sample block and marks the first
// sample (the engines then start from zero instead of the stored partial sums)
// and the last one (the engines then hand their final sums on).
//
// The product engine reads the bank for num_pairs(N_ANT) = 78 cycles after
// start, so a new set may be taken no sooner than 78 cycles after the previous
// one. A strobe that comes earlier is dropped and sets the sticky overrun flag;
// the block is then completed by later samples. The document requires the
// processing to finish between two ADC samples but does not say what happens
// when it cannot; dropping and flagging is this design's choice.
//
// Timing: sample_valid in cycle t -> bank, first, last, sample_idx valid and
// start high in cycle t+1. first/last/sample_idx hold until the next accept.
module cov_ctrl
  import cov_pkg::*;
#(
  parameter int unsigned N_ANT      = DEF_N_ANT,
  parameter int unsigned SAMPLE_W   = DEF_SAMPLE_W,
  parameter int unsigned LOG2_NSAMP = DEF_LOG2_NSAMP
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       sample_valid,
  input  logic signed [SAMPLE_W-1:0] adc_re [N_ANT],
  input  logic signed [SAMPLE_W-1:0] adc_im [N_ANT],
  output logic signed [SAMPLE_W-1:0] bank_re [N_ANT],
  output logic signed [SAMPLE_W-1:0] bank_im [N_ANT],
  output logic                       start,
  output logic                       first,
  output logic                       last,
  output logic [LOG2_NSAMP-1:0]      sample_idx,
  output logic                       accept,
  output logic                       drop,
  output logic                       overrun
);

  localparam int unsigned NPAIR = num_pairs(N_ANT);
  localparam int unsigned HW    = $clog2(NPAIR + 1);

  logic [HW-1:0]         hold_cnt;   // cycles until the bank may be rewritten
  logic [LOG2_NSAMP-1:0] next_idx;   // index the next accepted sample gets

  assign accept = sample_valid && (hold_cnt == '0);
  assign drop   = sample_valid && (hold_cnt != '0);

  always_ff @(posedge clk) begin
    if (accept) begin
      bank_re <= adc_re;
      bank_im <= adc_im;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hold_cnt   <= '0;
      next_idx   <= '0;
      sample_idx <= '0;
      start      <= 1'b0;
      first      <= 1'b0;
      last       <= 1'b0;
      overrun    <= 1'b0;
    end else begin
      start <= accept;
      if (accept) begin
        hold_cnt   <= HW'(NPAIR - 1);
        sample_idx <= next_idx;
        first      <= (next_idx == '0);
        last       <= (next_idx == '1);
        next_idx   <= next_idx + 1'b1;
      end else if (hold_cnt != '0) begin
        hold_cnt <= hold_cnt - 1'b1;
      end
      if (drop) overrun <= 1'b1;
    end
  end

endmodule
