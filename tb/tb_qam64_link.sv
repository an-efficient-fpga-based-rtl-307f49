// tb_qam64_link: 64-QAM detection over random 4x4 Rayleigh channels.
//
// The workload the detector is built for: four spatial streams of 64-QAM
// symbols (unit average energy per stream) sent over a 4x4 channel with
// independent CN(0,1) entries, plus white Gaussian noise of variance N0 at
// receive SNRs of 24, 28, 32 and 36 dB (SNR = NT / N0 per receive antenna).
// Every instance goes through the detector at full rate. The testbench
// computes floating-point MMSE from the same quantised H, y and sqrt(N0)
// (modified Gram-Schmidt of [H ; sqrt(N0) I], W = Q2 Q1^* / sqrt(N0)), removes
// the MMSE bias (divides y_hat_m by the real part of (W H)_mm, taken from the
// floating-point W for both) and slices to the nearest 64-QAM point. Per SNR
// it counts symbol errors of the detector and of floating point and requires
// the detector's count to stay within 25% (plus 3 symbols) of the
// floating-point count, i.e. a fixed-point loss well below 1 dB.
// It also checks the output latency of every instance.
module tb_qam64_link;
  import mmse_pkg::*;

  localparam int NSNR = 4, NPER = 250, NINST = NSNR * NPER;
  localparam real SNR_DB [NSNR] = '{24.0, 28.0, 32.0, 36.0};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid;
  cv_t  h_i [NR][NT];
  logic [DW-1:0] sqrt_n0_i;
  cv_t  y_i [NR];
  cw_t  w_o [NT][NR];
  cy_t  yhat_o [NT];

  mmse_detector dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NINST * GAMMA * 2 + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real A64 = 0.154303349962;   // 1/sqrt(42)

  function automatic real gauss();
    real u1, u2;
    u1 = $itor($urandom_range(1, 1000000)) / 1000000.0;
    u2 = $itor($urandom_range(0, 999999)) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic int q12(real x);
    int v;
    v = $rtoi(x * 4096.0 + (x >= 0 ? 0.5 : -0.5));
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  // Nearest 64-QAM level index (-7, -5, ..., 7) for one dimension.
  function automatic int slice(real x);
    int l;
    l = 2 * $rtoi($floor(x / A64 / 2.0)) + 1;
    if (l > 7) l = 7;
    if (l < -7) l = -7;
    return l;
  endfunction

  int  txr [NINST][NT], txi [NINST][NT];       // transmitted level indices
  int  fdr [NINST][NT], fdi [NINST][NT];       // floating-point decisions
  real beta [NINST][NT];                       // MMSE bias (W H)_mm
  int  t_in [NINST];

  task automatic make_instance(int n);
    real hr[NR][NT], hi[NR][NT], n0, n0s, yr[NR], yi[NR];
    real ar[ROWS][NT], ai[ROWS][NT], nrm, rr, ri, tr, ti;
    real wr[NT][NR], wi[NT][NR], er, ei;
    n0 = $itor(NT) / (10.0 ** (SNR_DB[n / NPER] / 10.0));
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NT; c++) begin
        h_i[r][c].re = DW'(q12(gauss() * 0.7071067811865476));
        h_i[r][c].im = DW'(q12(gauss() * 0.7071067811865476));
        hr[r][c] = $itor(h_i[r][c].re) / 4096.0;
        hi[r][c] = $itor(h_i[r][c].im) / 4096.0;
      end
    sqrt_n0_i = DW'(q12($sqrt(n0)));
    n0s = $itor(sqrt_n0_i) / 4096.0;
    for (int c = 0; c < NT; c++) begin
      txr[n][c] = 2 * int'($urandom_range(0, 7)) - 7;
      txi[n][c] = 2 * int'($urandom_range(0, 7)) - 7;
    end
    for (int r = 0; r < NR; r++) begin
      yr[r] = gauss() * $sqrt(n0 / 2.0);
      yi[r] = gauss() * $sqrt(n0 / 2.0);
      for (int c = 0; c < NT; c++) begin
        yr[r] += A64 * (hr[r][c] * txr[n][c] - hi[r][c] * txi[n][c]);
        yi[r] += A64 * (hr[r][c] * txi[n][c] + hi[r][c] * txr[n][c]);
      end
      y_i[r].re = DW'(q12(yr[r]));
      y_i[r].im = DW'(q12(yi[r]));
      yr[r] = $itor(y_i[r].re) / 4096.0;
      yi[r] = $itor(y_i[r].im) / 4096.0;
    end
    // Floating-point square-root MMSE from the quantised inputs.
    for (int k = 0; k < ROWS; k++)
      for (int c = 0; c < NT; c++) begin
        ar[k][c] = (k < NR) ? hr[k][c] : ((k - NR == c) ? n0s : 0.0);
        ai[k][c] = (k < NR) ? hi[k][c] : 0.0;
      end
    for (int i = 0; i < NT; i++) begin
      nrm = 0.0;
      for (int k = 0; k < ROWS; k++) nrm += ar[k][i] * ar[k][i] + ai[k][i] * ai[k][i];
      nrm = $sqrt(nrm);
      for (int k = 0; k < ROWS; k++) begin ar[k][i] /= nrm; ai[k][i] /= nrm; end
      for (int j = i + 1; j < NT; j++) begin
        rr = 0.0; ri = 0.0;
        for (int k = 0; k < ROWS; k++) begin
          rr += ar[k][i] * ar[k][j] + ai[k][i] * ai[k][j];
          ri += ar[k][i] * ai[k][j] - ai[k][i] * ar[k][j];
        end
        for (int k = 0; k < ROWS; k++) begin
          ar[k][j] -= rr * ar[k][i] - ri * ai[k][i];
          ai[k][j] -= rr * ai[k][i] + ri * ar[k][i];
        end
      end
    end
    for (int m = 0; m < NT; m++)
      for (int c = 0; c < NR; c++) begin
        tr = 0.0; ti = 0.0;
        for (int i = 0; i < NT; i++) begin
          tr += ar[NR+m][i] * ar[c][i] + ai[NR+m][i] * ai[c][i];
          ti += ai[NR+m][i] * ar[c][i] - ar[NR+m][i] * ai[c][i];
        end
        wr[m][c] = tr / n0s;
        wi[m][c] = ti / n0s;
      end
    for (int m = 0; m < NT; m++) begin
      beta[n][m] = 0.0;
      for (int c = 0; c < NR; c++) beta[n][m] += wr[m][c] * hr[c][m] - wi[m][c] * hi[c][m];
      er = 0.0; ei = 0.0;
      for (int c = 0; c < NR; c++) begin
        er += wr[m][c] * yr[c] - wi[m][c] * yi[c];
        ei += wr[m][c] * yi[c] + wi[m][c] * yr[c];
      end
      fdr[n][m] = slice(er / beta[n][m]);
      fdi[n][m] = slice(ei / beta[n][m]);
    end
  endtask

  // Driver: back to back at the full rate.
  int sent = 0;
  initial begin
    in_valid = 1'b0;
    for (int r = 0; r < NR; r++) begin
      y_i[r] = '0;
      for (int c = 0; c < NT; c++) h_i[r][c] = '0;
    end
    sqrt_n0_i = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    while (sent < NINST) begin
      @(negedge clk);
      if (in_ready) begin
        make_instance(sent);
        in_valid = 1'b1;
        t_in[sent] = cyc;
        sent++;
      end else in_valid = 1'b0;
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  // Monitor: slice the detector's y_hat and count symbol errors.
  int got = 0;
  int err_rtl [NSNR], err_flt [NSNR], differ [NSNR];
  initial for (int s = 0; s < NSNR; s++) begin err_rtl[s] = 0; err_flt[s] = 0; differ[s] = 0; end
  always @(posedge clk) if (rst_n && out_valid) begin
    int s, dr, di;
    #1;
    if (got < NINST) begin
      s = got / NPER;
      checks++;
      if (cyc - 1 - t_in[got] != LATENCY) begin
        failures++;
        $display("inst %0d latency %0d, expected %0d", got, cyc - 1 - t_in[got], LATENCY);
      end
      for (int m = 0; m < NT; m++) begin
        dr = slice($itor(yhat_o[m].re) / 4096.0 / beta[got][m]);
        di = slice($itor(yhat_o[m].im) / 4096.0 / beta[got][m]);
        if (dr != txr[got][m] || di != txi[got][m]) err_rtl[s]++;
        if (fdr[got][m] != txr[got][m] || fdi[got][m] != txi[got][m]) err_flt[s]++;
        if (dr != fdr[got][m] || di != fdi[got][m]) differ[s]++;
      end
    end
    got++;
  end

  initial begin
    wait (got == NINST);
    repeat (20) @(posedge clk);
    for (int s = 0; s < NSNR; s++) begin
      $display("SNR %4.1f dB: symbol errors detector %0d, floating point %0d of %0d; decisions differ %0d",
               SNR_DB[s], err_rtl[s], err_flt[s], NPER * NT, differ[s]);
      checks++;
      if (real'(err_rtl[s]) > 1.25 * real'(err_flt[s]) + 3.0) begin
        failures++;
        $display("SNR %4.1f dB: fixed-point loss too large", SNR_DB[s]);
      end
    end
    checks++;
    if (got != NINST) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
