// frame_sync: passes a one-cycle event from one clock domain to another.
//
// Each src_pulse flips a toggle flip-flop in the source domain. The toggle is
// taken through STAGES synchronising flip-flops in the destination domain and
// every change seen at their output becomes a one-cycle dst_pulse. Used to
// tell the CPU-side clock domain that a new covariance matrix is in the RAM.
// Events must be separated by a few destination cycles (here they are one
// block, ~82,000 processing cycles, apart). The document only states that the
// two clock domains exist; the toggle synchroniser is this design's choice.
//
// Timing: dst_pulse rises STAGES+1 to STAGES+2 dst_clk edges after src_pulse.
module frame_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);

  logic              src_tgl;
  logic [STAGES-1:0] sync;
  logic              seen;

  always_ff @(posedge src_clk) begin
    if (!src_rst_n)     src_tgl <= 1'b0;
    else if (src_pulse) src_tgl <= ~src_tgl;
  end

  always_ff @(posedge dst_clk) begin
    if (!dst_rst_n) begin
      sync      <= '0;
      seen      <= 1'b0;
      dst_pulse <= 1'b0;
    end else begin
      sync      <= {sync[STAGES-2:0], src_tgl};
      seen      <= sync[STAGES-1];
      dst_pulse <= sync[STAGES-1] ^ seen;
    end
  end

endmodule
