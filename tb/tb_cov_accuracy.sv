// tb_cov_accuracy: accuracy of the covariance engine on a simulated tag reply,
// measured the way the receiver software uses it.
//
// Two 1024-sample blocks of a simulated reply are sent: a +/-1 backscatter
// symbol with an antenna-dependent phase (a plane wave across the array),
// a DC offset per antenna and uniform noise. The first block is sent at 80
// cycles per sample (240 MHz clock, 3 Msps), the second at 133 cycles per
// sample (400 MHz clock). Each returned entry is divided by N-1 = 1023, as the
// software does, and compared with the sample covariance computed here in
// double precision from the same samples (mean-subtracted, Bessel-corrected).
// The integer means may only move the result by the truncation bound: less
// than 2N/1023 (about 2.0) in the real part and N/1023 (about 1.0) in the
// imaginary part. The largest deviations seen are printed.
module tb_cov_accuracy;
  import cov_pkg::*;
  localparam int N_ANT = DEF_N_ANT, LOG2_NSAMP = DEF_LOG2_NSAMP, COV_W = DEF_COV_W;
  localparam int NSAMP = 1 << LOG2_NSAMP;
  localparam int NPAIR = N_ANT * (N_ANT + 1) / 2;

  logic clk = 0, rst_n = 0, sample_valid = 0, overrun;
  logic signed [15:0] adc_re [N_ANT], adc_im [N_ANT];
  logic [15:0] matrix_count, rd_matrix_count;
  logic rd_clk = 0, rd_rst_n = 0, rd_en = 0, rd_matrix_ready;
  logic [6:0] rd_addr = 0;
  logic signed [COV_W-1:0] rd_re, rd_im;

  always #2 clk = ~clk;
  always #5 rd_clk = ~rd_clk;

  rfid_cov_top dut (.*);

  int checks = 0, failures = 0;
  real xr [NSAMP][N_ANT], xi [NSAMP][N_ANT];
  real cov_re [NPAIR], cov_im [NPAIR];
  int pi_ [NPAIR], pj_ [NPAIR];
  real max_dre = 0.0, max_dim = 0.0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic send_block(input int spacing, input real angle);
    real mr [N_ANT], mi [N_ANT];
    for (int a = 0; a < N_ANT; a++) begin mr[a] = 0.0; mi[a] = 0.0; end
    for (int n = 0; n < NSAMP; n++) begin
      real sym, ph;
      sym = ($urandom_range(1) == 1) ? 1.0 : -1.0;
      repeat (spacing - 1) @(negedge clk);
      for (int a = 0; a < N_ANT; a++) begin
        ph = angle * a;
        adc_re[a] = 16'($rtoi(1200.0 * a - 4000.0 + 12000.0 * sym * $cos(ph)
                            + real'($urandom_range(3000)) - 1500.0));
        adc_im[a] = 16'($rtoi(700.0 - 300.0 * a + 12000.0 * sym * $sin(ph)
                            + real'($urandom_range(3000)) - 1500.0));
        xr[n][a] = real'(adc_re[a]);
        xi[n][a] = real'(adc_im[a]);
        mr[a] += xr[n][a] / NSAMP;
        mi[a] += xi[n][a] / NSAMP;
      end
      sample_valid = 1;
      @(negedge clk);
      sample_valid = 0;
    end
    for (int k = 0; k < NPAIR; k++) begin
      real sr, si;
      int i, j;
      i = pi_[k]; j = pj_[k];
      sr = 0.0; si = 0.0;
      for (int n = 0; n < NSAMP; n++) begin
        real ar, ai, br, bi;
        ar = xr[n][i] - mr[i]; ai = xi[n][i] - mi[i];
        br = xr[n][j] - mr[j]; bi = xi[n][j] - mi[j];
        sr += ar * br + ai * bi;
        si += ai * br - ar * bi;
      end
      cov_re[k] = sr / (NSAMP - 1);
      cov_im[k] = si / (NSAMP - 1);
    end
  endtask

  task automatic read_and_compare(input int blk);
    real dre, dim, bre, bim;
    bre = 2.0 * NSAMP / (NSAMP - 1) + 1e-6;
    bim = 1.0 * NSAMP / (NSAMP - 1) + 1e-6;
    @(posedge rd_clk iff rd_matrix_ready);
    for (int k = 0; k < NPAIR; k++) begin
      @(negedge rd_clk);
      rd_en = 1; rd_addr = 7'(k);
      @(negedge rd_clk);
      rd_en = 0;
      dre = real'(rd_re) / (NSAMP - 1) - cov_re[k];
      dim = real'(rd_im) / (NSAMP - 1) - cov_im[k];
      if (rabs(dre) > max_dre) max_dre = rabs(dre);
      if (rabs(dim) > max_dim) max_dim = rabs(dim);
      checks++;
      if (rabs(dre) > bre || rabs(dim) > bim) begin
        failures++;
        $display("FAIL block %0d entry (%0d,%0d): (%f, %f) vs (%f, %f)", blk, pi_[k], pj_[k],
                 real'(rd_re) / (NSAMP - 1), real'(rd_im) / (NSAMP - 1), cov_re[k], cov_im[k]);
      end
    end
  endtask

  initial begin
    int k = 0;
    for (int i = 0; i < N_ANT; i++)
      for (int j = i; j < N_ANT; j++) begin pi_[k] = i; pj_[k] = j; k++; end
    for (int a = 0; a < N_ANT; a++) begin adc_re[a] = 0; adc_im[a] = 0; end
    repeat (4) @(posedge rd_clk);
    rst_n = 1; rd_rst_n = 1;
    send_block(80, 0.7);
    read_and_compare(0);
    send_block(133, -1.9);
    read_and_compare(1);
    checks++;
    if (overrun || matrix_count != 2) begin
      failures++; $display("FAIL overrun %b, %0d matrices", overrun, matrix_count);
    end
    $display("largest deviation after /1023: real %f, imaginary %f", max_dre, max_dim);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
