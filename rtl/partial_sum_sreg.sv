// partial_sum_sreg: partial-sum store between the output and the input of a
// shared accumulator adder.
//
// One adder is reused for DEPTH quantities per sampling period (78 products or
// 12 channel sums). The running sum of each quantity must wait one sampling
// period before it is added to again; this shift register holds it for exactly
// DEPTH shifts. Every cycle with en high pushes din and advances by one, and
// dout always shows the value pushed DEPTH shifts earlier, i.e. the running
// sum of the quantity whose turn it is. Without en the register holds still,
// so gaps between samples do not disturb the order (the clock-enable gating of
// the shift register is what the design describes).
//
// It is written as a circular buffer in a memory array with one pointer, which
// maps onto block RAM rather than DEPTH*WIDTH flip-flops. dout is read
// combinationally from the array; contents are not reset because the
// accumulator ignores dout on the first sample of a block.
module partial_sum_sreg #(
  parameter int unsigned DEPTH = 78,
  parameter int unsigned WIDTH = 86
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                      ptr <= '0;
    else if (en && ptr == PW'(DEPTH - 1)) ptr <= '0;
    else if (en)                     ptr <= ptr + 1'b1;
  end

endmodule
