// cplx_mult_conj: registered complex product p = a * conj(b).
//
// The covariance needs products of one antenna signal with the complex
// conjugate of another, S_i * S_j^*. Building the conjugate into the
// multiplier avoids negating b's imaginary part, which would overflow for the
// most negative sample value:
//   p_re = a_re*b_re + a_im*b_im
//   p_im = a_im*b_re - a_re*b_im
// The result is one bit wider than a plain product (A_W + B_W + 1) so that
// the sum of two full-scale products cannot overflow; for 16-bit inputs this
// is the 31-bit magnitude plus sign plus one carry bit.
//
// Timing: one clock cycle from inputs to p_re/p_im, with in_valid delayed
// alongside as out_valid. The one-cycle latency follows the multiplier used
// in the reference implementation; the four-multiplier structure is this
// design's own choice.
module cplx_mult_conj #(
  parameter int unsigned A_W = 16,
  parameter int unsigned B_W = 16,
  localparam int unsigned P_W = A_W + B_W + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [A_W-1:0] a_re,
  input  logic signed [A_W-1:0] a_im,
  input  logic signed [B_W-1:0] b_re,
  input  logic signed [B_W-1:0] b_im,
  output logic                  out_valid,
  output logic signed [P_W-1:0] p_re,
  output logic signed [P_W-1:0] p_im
);

  logic signed [P_W-1:0] rr, ii, ir, ri;

  always_comb begin
    rr = P_W'(a_re) * P_W'(b_re);
    ii = P_W'(a_im) * P_W'(b_im);
    ir = P_W'(a_im) * P_W'(b_re);
    ri = P_W'(a_re) * P_W'(b_im);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p_re      <= '0;
      p_im      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        p_re <= rr + ii;
        p_im <= ir - ri;
      end
    end
  end

endmodule
