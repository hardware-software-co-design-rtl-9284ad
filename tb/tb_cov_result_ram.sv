// tb_cov_result_ram: writes 78 random 88-bit words on a 240 MHz-like write
// clock and reads them back on an unrelated read clock, checking the data and
// the one-cycle registered read (rdata changes only after a read-enabled edge
// and holds otherwise); then overwrites part of the RAM and reads again.
module tb_cov_result_ram;
  localparam int DEPTH = 78, WIDTH = 88;

  logic wclk = 0, rclk = 0, we = 0, re = 0;
  logic [6:0] waddr = 0, raddr = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #2 wclk = ~wclk;
  always #5 rclk = ~rclk;

  cov_result_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_all(input int from, input int to);
    for (int a = from; a <= to; a++) begin
      @(negedge wclk);
      we = 1; waddr = 7'(a); wdata = {$urandom, $urandom, $urandom};
      model[a] = wdata;
    end
    @(negedge wclk) we = 0;
  endtask

  task automatic read_all();
    for (int a = DEPTH - 1; a >= 0; a--) begin
      logic [WIDTH-1:0] held;
      @(negedge rclk);
      re = 1; raddr = 7'(a);
      @(negedge rclk);
      re = 0;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d", a); end
      held = rdata;
      raddr = 7'((a + 1) % DEPTH);
      @(negedge rclk);
      checks++;
      if (rdata !== held) begin failures++; $display("FAIL rdata moved without re"); end
    end
  endtask

  initial begin
    write_all(0, DEPTH - 1);
    read_all();
    write_all(10, 40);
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
