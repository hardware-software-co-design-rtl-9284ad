// tb_cov_ctrl: sends sample strobes at the nominal 80-cycle spacing, at the
// minimum 78-cycle spacing and too early (77 cycles), with a 3-bit block
// counter (8-sample blocks) so several blocks pass. Checks that accepted
// samples land in the bank with start one cycle later, that first/last and
// sample_idx follow the block count, that an early strobe is dropped without
// touching the bank, and that overrun becomes and stays set.
module tb_cov_ctrl;
  localparam int N_ANT = 12, SAMPLE_W = 16, LOG2_NSAMP = 3;

  logic clk = 0, rst_n = 0, sample_valid = 0;
  logic signed [SAMPLE_W-1:0] adc_re [N_ANT], adc_im [N_ANT];
  logic signed [SAMPLE_W-1:0] bank_re [N_ANT], bank_im [N_ANT];
  logic start, first, last, accept, drop, overrun;
  logic [LOG2_NSAMP-1:0] sample_idx;
  int checks = 0, failures = 0, n_acc = 0, n_drop = 0;

  always #2 clk = ~clk;

  cov_ctrl #(.N_ANT(N_ANT), .SAMPLE_W(SAMPLE_W), .LOG2_NSAMP(LOG2_NSAMP)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // strobe after 'gap' cycles; expect accepted or dropped
  task automatic strobe(input int gap, input bit exp_accept);
    logic signed [SAMPLE_W-1:0] old_re0;
    repeat (gap - 1) @(negedge clk);
    old_re0 = bank_re[0];
    for (int a = 0; a < N_ANT; a++) begin
      adc_re[a] = SAMPLE_W'($urandom); adc_im[a] = SAMPLE_W'($urandom);
    end
    sample_valid = 1;
    @(negedge clk);
    sample_valid = 0;
    if (exp_accept) begin
      bit ok = 1;
      for (int a = 0; a < N_ANT; a++)
        if (bank_re[a] != adc_re[a] || bank_im[a] != adc_im[a]) ok = 0;
      check(ok, "bank not captured");
      check(start, "no start");
      check(sample_idx == LOG2_NSAMP'(n_acc), $sformatf("sample_idx %0d exp %0d", sample_idx, n_acc % 8));
      check(first == (n_acc % 8 == 0), "first flag");
      check(last == (n_acc % 8 == 7), "last flag");
      n_acc++;
    end else begin
      check(!start && bank_re[0] == old_re0, "early sample not dropped");
      check(overrun, "overrun not set");
      n_drop++;
    end
    for (int a = 0; a < N_ANT; a++) begin adc_re[a] = 0; adc_im[a] = 0; end
  endtask

  initial begin
    for (int a = 0; a < N_ANT; a++) begin adc_re[a] = 0; adc_im[a] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    strobe(5, 1);
    check(!overrun, "overrun after reset");
    repeat (10) strobe(80, 1);
    check(!overrun, "overrun at 80-cycle spacing");
    repeat (5) strobe(78, 1);
    check(!overrun, "overrun at 78-cycle spacing");
    strobe(77, 0);          // 77 cycles after the last accept: dropped
    strobe(1, 1);           // one cycle later (78 after): accepted
    repeat (4) strobe(80, 1);
    strobe(40, 0);
    strobe(38, 1);
    check(overrun, "overrun not sticky");
    check(n_drop == 2 && n_acc == 22, "counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
