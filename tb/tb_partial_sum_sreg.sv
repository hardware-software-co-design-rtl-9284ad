// tb_partial_sum_sreg: pushes random words with random gaps in the enable and
// checks that dout always shows the word pushed exactly DEPTH pushes earlier,
// and that it does not move while en is low.
module tb_partial_sum_sreg;
  localparam int DEPTH = 78, WIDTH = 86;

  logic clk = 0, rst_n = 0, en = 0;
  logic [WIDTH-1:0] din = '0, dout;
  logic [WIDTH-1:0] hist [$];
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  partial_sum_sreg #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] held;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) begin
        en = 0;
        held = dout;
        @(negedge clk);
        checks++;
        if (dout !== held) begin failures++; $display("FAIL moved without en"); end
      end
      din = {$urandom, $urandom, $urandom};
      en = 1;
      if (hist.size() >= DEPTH) begin
        checks++;
        if (dout !== hist[hist.size() - DEPTH]) begin
          failures++;
          $display("FAIL push %0d: dout %h exp %h", n, dout, hist[hist.size() - DEPTH]);
        end
      end
      hist.push_back(din);
      @(posedge clk);
      #1 en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
