// cov_result_ram: simple dual-port, dual-clock RAM for the covariance matrix.
//
// The processing side writes one entry per cycle on wclk; the CPU side reads
// on its own clock rclk. Using the two ports of a block RAM is what lets the
// fast processing clock and the slower CPU-side clock meet without a FIFO.
// A matrix is DEPTH = 78 entries of WIDTH = 2 x 44 bits ({re, im}).
//
// Timing: a write with we high takes effect at the wclk edge. A read with re
// high returns mem[raddr] on rdata after the next rclk edge (registered output,
// as in block RAM); rdata holds otherwise. Reading an address in the same
// moment it is written gives either the old or the new word. Coherence of a
// whole matrix is left to the reader: the processing side rewrites the RAM
// only during the last sample of the next block, about 82,000 clock cycles
// later, and announces each completed matrix through frame_sync.
module cov_result_ram #(
  parameter int unsigned DEPTH = 78,
  parameter int unsigned WIDTH = 88,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
