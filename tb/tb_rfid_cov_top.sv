// tb_rfid_cov_top: end-to-end test of the covariance engine at its default
// size (12 antennas, 16-bit samples, 1024-sample blocks, 44-bit results).
//
// Three blocks are sent, each followed by a read-out of all 78 entries on a
// separate, slower read clock when rd_matrix_ready announces the matrix:
//   block 0: full-scale random samples (every value from -32768 to 32767), one
//            strobe every 80 cycles (240 MHz clock, 3 Msps);
//   block 1: a simulated tag reply: a +/-1 backscatter symbol seen by every
//            antenna with its own phase, plus a DC offset and noise; strobes at
//            the minimum spacing of 78 cycles, with one strobe sent too early
//            (dropped by the engine, so also left out of the reference);
//   block 2: the tag reply again with random spacing of 78..100 cycles.
// Every entry is compared with a reference computed here from the accepted
// samples with 64-bit integers, and with the exact N*covariance within the
// error bound of the truncated means. Also checked: the 78 entries are written
// in 78 consecutive cycles; the whole block takes no more than 82,000 cycles
// at the nominal spacing; matrix counters in both clock domains. Each
// mechanism (restart of the partial sums at a block's first sample, dropped
// early strobe and overrun flag, back-to-back samples at 78 cycles, hand-over
// of a matrix to the read clock) is counted and must occur.
module tb_rfid_cov_top;
  import cov_pkg::*;
  localparam int N_ANT = DEF_N_ANT, SAMPLE_W = DEF_SAMPLE_W, LOG2_NSAMP = DEF_LOG2_NSAMP;
  localparam int COV_W = DEF_COV_W;
  localparam int NSAMP = 1 << LOG2_NSAMP;
  localparam int NPAIR = N_ANT * (N_ANT + 1) / 2;
  localparam longint N = NSAMP;
  localparam int NBLK = 3;

  logic clk = 0, rst_n = 0, sample_valid = 0, overrun;
  logic signed [SAMPLE_W-1:0] adc_re [N_ANT], adc_im [N_ANT];
  logic [15:0] matrix_count, rd_matrix_count;
  logic rd_clk = 0, rd_rst_n = 0, rd_en = 0, rd_matrix_ready;
  logic [6:0] rd_addr = 0;
  logic signed [COV_W-1:0] rd_re, rd_im;

  always #2 clk = ~clk;       // processing clock
  always #5 rd_clk = ~rd_clk; // CPU-side clock

  rfid_cov_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  // reference
  longint acc_s_re [N_ANT], acc_s_im [N_ANT], acc_p_re [NPAIR], acc_p_im [NPAIR];
  longint exp_re [NBLK][NPAIR], exp_im [NBLK][NPAIR];
  longint exa_re [NBLK][NPAIR], exa_im [NBLK][NPAIR];  // exact N*cov numerators * N
  int pi_ [NPAIR], pj_ [NPAIR];
  int n_blk_done = 0;
  // mechanism counters
  int n_first_seen = 0, n_restart = 0, n_drop = 0, n_tight = 0, n_handover = 0;
  int blk_first_cyc [NBLK], done_cyc [NBLK];
  int cov_first = -1, cov_n = 0;

  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stimulus ----------------------------------------------------------
  int last_acc_cyc = -1000;
  int acc_in_blk = 0;
  int blk = 0;

  function automatic logic signed [SAMPLE_W-1:0] clamp16(input real v);
    if (v > 32767.0) return 16'sh7fff;
    if (v < -32768.0) return 16'sh8000;
    return SAMPLE_W'($rtoi(v));
  endfunction

  task automatic make_sample(input int kind);
    if (kind == 0) begin
      for (int a = 0; a < N_ANT; a++) begin
        adc_re[a] = SAMPLE_W'($urandom); adc_im[a] = SAMPLE_W'($urandom);
        if ($urandom_range(15) == 0) adc_re[a] = 16'sh8000;
        if ($urandom_range(15) == 0) adc_im[a] = 16'sh7fff;
      end
    end else begin
      real sym, ph, noise_r, noise_i;
      sym = ($urandom_range(1) == 1) ? 1.0 : -1.0;
      for (int a = 0; a < N_ANT; a++) begin
        ph = 0.9 * a + 0.3;
        noise_r = real'($urandom_range(2000)) - 1000.0;
        noise_i = real'($urandom_range(2000)) - 1000.0;
        adc_re[a] = clamp16(3000.0 + 9000.0 * sym * $cos(ph) + noise_r);
        adc_im[a] = clamp16(-1500.0 + 9000.0 * sym * $sin(ph) + noise_i);
      end
    end
  endtask

  // a strobe 'gap' cycles after the previous one; the reference follows the
  // engine's rule that a strobe less than 78 cycles after the last accepted
  // one is dropped
  task automatic strobe(input int gap, input int kind);
    bit acc;
    repeat (gap - 1) @(negedge clk);
    make_sample(kind);
    acc = (cyc + 1 - last_acc_cyc) >= NPAIR;  // cyc counts edges so far; the strobe is taken at the next
    sample_valid = 1;
    @(negedge clk);
    sample_valid = 0;
    if (!acc) begin
      n_drop++;
      check(overrun, "overrun not raised by an early strobe");
      return;
    end
    if (cyc - last_acc_cyc == NPAIR) n_tight++;
    last_acc_cyc = cyc;
    if (acc_in_blk == 0) begin
      blk_first_cyc[blk] = cyc;
      for (int a = 0; a < N_ANT; a++) begin acc_s_re[a] = 0; acc_s_im[a] = 0; end
      for (int k = 0; k < NPAIR; k++) begin acc_p_re[k] = 0; acc_p_im[k] = 0; end
    end
    for (int a = 0; a < N_ANT; a++) begin
      acc_s_re[a] += longint'(adc_re[a]);
      acc_s_im[a] += longint'(adc_im[a]);
    end
    for (int k = 0; k < NPAIR; k++) begin
      longint ar, ai, br, bi;
      ar = adc_re[pi_[k]]; ai = adc_im[pi_[k]]; br = adc_re[pj_[k]]; bi = adc_im[pj_[k]];
      acc_p_re[k] += ar * br + ai * bi;
      acc_p_im[k] += ai * br - ar * bi;
    end
    acc_in_blk++;
    if (acc_in_blk == NSAMP) begin
      for (int k = 0; k < NPAIR; k++) begin
        int i, j;
        longint mir, mii, mjr, mji;
        i = pi_[k]; j = pj_[k];
        mir = acc_s_re[i] >>> LOG2_NSAMP; mii = acc_s_im[i] >>> LOG2_NSAMP;
        mjr = acc_s_re[j] >>> LOG2_NSAMP; mji = acc_s_im[j] >>> LOG2_NSAMP;
        exp_re[blk][k] = acc_p_re[k] - (acc_s_re[i] * mjr + acc_s_im[i] * mji)
                       - (mir * acc_s_re[j] + mii * acc_s_im[j]) + N * (mir * mjr + mii * mji);
        exp_im[blk][k] = acc_p_im[k] - (acc_s_im[i] * mjr - acc_s_re[i] * mji)
                       - (mii * acc_s_re[j] - mir * acc_s_im[j]) + N * (mii * mjr - mir * mji);
        exa_re[blk][k] = N * acc_p_re[k] - (acc_s_re[i] * acc_s_re[j] + acc_s_im[i] * acc_s_im[j]);
        exa_im[blk][k] = N * acc_p_im[k] - (acc_s_im[i] * acc_s_re[j] - acc_s_re[i] * acc_s_im[j]);
      end
      acc_in_blk = 0;
      blk++;
    end
  endtask

  // ---- observe the engine -----------------------------------------------
  always @(posedge clk) begin
    if (rst_n) begin
      // a block's first sample restarts partial sums that hold an earlier block
      if (dut.start && dut.first && n_first_seen > 0) n_restart++;
      if (dut.start && dut.first) n_first_seen++;
      if (dut.cov_valid) begin
        if (cov_n % NPAIR == 0) cov_first = cyc;
        cov_n++;
        if (cov_n % NPAIR == 0)
          check(cyc - cov_first == NPAIR - 1,
                $sformatf("78 entries took %0d cycles", cyc - cov_first + 1));
      end
      if (dut.matrix_done && n_blk_done < NBLK) begin
        done_cyc[n_blk_done] = cyc;
        n_blk_done++;
      end
    end
  end

  // ---- CPU-side reader ---------------------------------------------------
  int n_read = 0;
  initial begin
    wait (rd_rst_n);
    forever begin
      @(posedge rd_clk);
      if (rd_matrix_ready) begin
        int b;
        b = n_read;
        n_handover++;
        for (int k = 0; k < NPAIR; k++) begin
          longint gr, gi, xr, xi;
          @(negedge rd_clk);
          rd_en = 1; rd_addr = 7'(k);
          @(negedge rd_clk);
          rd_en = 0;
          gr = longint'(rd_re); gi = longint'(rd_im);
          checks++;
          if (b >= NBLK || gr != exp_re[b][k] || gi != exp_im[b][k]) begin
            failures++;
            $display("FAIL block %0d entry %0d (%0d,%0d): got (%0d,%0d) exp (%0d,%0d)",
                     b, k, pi_[k], pj_[k], gr, gi, exp_re[b][k], exp_im[b][k]);
          end
          xr = N * gr - exa_re[b][k];
          xi = N * gi - exa_im[b][k];
          check(xr >= 0 && xr < 2 * N * N && xi > -N * N && xi < N * N,
                $sformatf("block %0d entry %0d outside truncation bound", b, k));
          if (pi_[k] == pj_[k]) check(gi == 0 && gr >= 0, "diagonal not real and non-negative");
        end
        n_read++;
      end
    end
  end

  initial begin
    int k = 0;
    for (int i = 0; i < N_ANT; i++)
      for (int j = i; j < N_ANT; j++) begin pi_[k] = i; pj_[k] = j; k++; end
    for (int a = 0; a < N_ANT; a++) begin adc_re[a] = 0; adc_im[a] = 0; end
    repeat (4) @(posedge rd_clk);
    rst_n = 1; rd_rst_n = 1;
    repeat (5) @(negedge clk);
    // block 0: full-scale random, nominal spacing
    for (int n = 0; n < NSAMP; n++) strobe(80, 0);
    check(!overrun, "overrun at nominal spacing");
    // block 1: tag reply, minimum spacing, one early strobe
    for (int n = 0; n < NSAMP; n++) begin
      if (n == 500) strobe(50, 1);          // dropped
      strobe((n == 500) ? 28 : NPAIR, 1);   // 78 cycles after the last accepted one
    end
    // block 2: tag reply, random spacing
    for (int n = 0; n < NSAMP; n++) strobe(NPAIR + $urandom_range(22), 1);
    repeat (600) @(negedge clk);
    check(blk == NBLK, "blocks sent");
    check(n_read == NBLK && rd_matrix_count == 16'(NBLK) && matrix_count == 16'(NBLK),
          $sformatf("matrices: read %0d, counters %0d/%0d", n_read, matrix_count, rd_matrix_count));
    check(done_cyc[0] - blk_first_cyc[0] <= 82000,
          $sformatf("block 0 took %0d cycles", done_cyc[0] - blk_first_cyc[0]));
    check(n_restart >= NBLK - 1, $sformatf("partial-sum restarts: %0d", n_restart));
    check(n_drop >= 1 && overrun, $sformatf("dropped strobes: %0d", n_drop));
    check(n_tight >= 1, $sformatf("78-cycle spacings: %0d", n_tight));
    check(n_handover == NBLK, $sformatf("hand-overs: %0d", n_handover));
    $display("mechanisms: restarts=%0d drops=%0d min_spacing=%0d handovers=%0d block0_cycles=%0d",
             n_restart, n_drop, n_tight, n_handover, done_cyc[0] - blk_first_cyc[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
