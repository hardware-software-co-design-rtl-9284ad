// tb_frame_sync: sends single-cycle events from a fast source clock to a
// slower destination clock and from a slow source to a fast destination.
// Each event must give exactly one destination pulse, within STAGES+2
// destination cycles.
module tb_frame_sync;
  logic fclk = 0, sclk = 0, rst_n = 0;
  logic f_pulse = 0, s_pulse = 0, to_slow, to_fast;
  int checks = 0, failures = 0, n_slow = 0, n_fast = 0;

  always #2 fclk = ~fclk;
  always #7 sclk = ~sclk;

  frame_sync #(.STAGES(2)) u_f2s (.src_clk(fclk), .src_rst_n(rst_n), .src_pulse(f_pulse),
                                   .dst_clk(sclk), .dst_rst_n(rst_n), .dst_pulse(to_slow));
  frame_sync #(.STAGES(2)) u_s2f (.src_clk(sclk), .src_rst_n(rst_n), .src_pulse(s_pulse),
                                   .dst_clk(fclk), .dst_rst_n(rst_n), .dst_pulse(to_fast));

  always @(posedge sclk) if (rst_n && to_slow) n_slow++;
  always @(posedge fclk) if (rst_n && to_fast) n_fast++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge sclk);
    rst_n = 1;
    repeat (3) @(posedge sclk);
    for (int e = 0; e < 20; e++) begin
      int n0, m0, lat;
      // fast -> slow
      n0 = n_slow;
      @(negedge fclk) f_pulse = 1;
      @(negedge fclk) f_pulse = 0;
      lat = 0;
      while (n_slow == n0 && lat < 10) begin @(posedge sclk); #1; lat++; end
      repeat (6) @(posedge sclk);
      checks++;
      if (n_slow != n0 + 1 || lat > 4) begin
        failures++; $display("FAIL fast->slow event %0d: %0d pulses, latency %0d", e, n_slow - n0, lat);
      end
      // slow -> fast
      m0 = n_fast;
      @(negedge sclk) s_pulse = 1;
      @(negedge sclk) s_pulse = 0;
      lat = 0;
      while (n_fast == m0 && lat < 10) begin @(posedge fclk); #1; lat++; end
      repeat (6) @(posedge fclk);
      checks++;
      if (n_fast != m0 + 1 || lat > 4) begin
        failures++; $display("FAIL slow->fast event %0d: %0d pulses, latency %0d", e, n_fast - m0, lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
