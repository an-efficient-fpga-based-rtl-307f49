// tb_mmse_detector: end-to-end test of the 4x4 square-root MMSE detector at
// its default parameters.
//
// Random channel instances (H, sqrt(N0), y = H s + n) are fed back to back at
// the full rate of one per 8 clocks, with a few idle gaps. For each instance
// the testbench computes a floating-point reference: a modified Gram-Schmidt
// QR of [H ; sqrt(N0) I], W = Q2 Q1^* / sqrt(N0) and y_hat = W y. It first
// checks that this reference satisfies (H^*H + N0 I) W = H^* (the MMSE
// definition), then compares the detector's W and y_hat with it, and checks
// the latency (mmse_pkg::LATENCY) and the 8-clock output spacing. Channel
// magnitudes are drawn from several ranges so that the dynamic scaling both
// doubles (small columns) and halves (large columns); each mechanism
// (scaling up, down, rescaling after an update, back-to-back instances, idle
// frames, first-step updates on the shared norm multipliers) is counted and a
// failure is counted for one that never happened.
module tb_mmse_detector;
  import mmse_pkg::*;

  localparam int NINST = 48;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid;
  cv_t  h_i [NR][NT];
  logic [DW-1:0] sqrt_n0_i;
  cv_t  y_i [NR];
  cw_t  w_o [NT][NR];
  cy_t  yhat_o [NT];

  mmse_detector dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results per instance.
  real wr_e [NINST][NT][NR], wi_e [NINST][NT][NR];
  real yr_e [NINST][NT],     yi_e [NINST][NT];
  real wmax [NINST];
  int  t_in [NINST];

  function automatic real urand(real a);
    return a * (2.0 * $itor($urandom_range(0, 1000000)) / 1000000.0 - 1.0);
  endfunction

  function automatic int q12(real x);
    int v;
    v = $rtoi(x * 4096.0 + (x >= 0 ? 0.5 : -0.5));
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  // Build instance n, compute its reference and check the reference itself.
  task automatic make_instance(int n);
    real amp, hr[NR][NT], hi[NR][NT], n0s, sr[NT], si[NT], yr[NR], yi[NR];
    real ar[ROWS][NT], ai[ROWS][NT], nrm, rr, ri, tr, ti;
    real gr[NT][NT], gi[NT][NT], er, ei, tol;
    int  cls;
    cls = n % 4;
    amp = (cls == 0) ? 0.08 : (cls == 1) ? 0.5 : (cls == 2) ? 1.0 : 1.8;
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NT; c++) begin
        h_i[r][c].re = DW'(q12(urand(amp)));
        h_i[r][c].im = DW'(q12(urand(amp)));
        hr[r][c] = $itor(h_i[r][c].re) / 4096.0;
        hi[r][c] = $itor(h_i[r][c].im) / 4096.0;
      end
    // Noise level: SNR between roughly 5 and 30 dB relative to the channel.
    n0s = amp * (0.03 + 0.5 * $itor($urandom_range(0, 1000)) / 1000.0);
    sqrt_n0_i = DW'(q12(n0s));
    if (sqrt_n0_i == 0) sqrt_n0_i = 1;
    n0s = $itor(sqrt_n0_i) / 4096.0;
    for (int c = 0; c < NT; c++) begin
      sr[c] = ($urandom_range(0, 1) != 0) ? 0.7071 : -0.7071;
      si[c] = ($urandom_range(0, 1) != 0) ? 0.7071 : -0.7071;
    end
    for (int r = 0; r < NR; r++) begin
      yr[r] = urand(n0s * 0.5); yi[r] = urand(n0s * 0.5);
      for (int c = 0; c < NT; c++) begin
        yr[r] += hr[r][c] * sr[c] - hi[r][c] * si[c];
        yi[r] += hr[r][c] * si[c] + hi[r][c] * sr[c];
      end
      y_i[r].re = DW'(q12(yr[r]));
      y_i[r].im = DW'(q12(yi[r]));
      yr[r] = $itor(y_i[r].re) / 4096.0;
      yi[r] = $itor(y_i[r].im) / 4096.0;
    end
    // Modified Gram-Schmidt of the compound matrix, in floating point.
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
    wmax[n] = 0.0;
    for (int m = 0; m < NT; m++)
      for (int c = 0; c < NR; c++) begin
        tr = 0.0; ti = 0.0;
        for (int i = 0; i < NT; i++) begin
          tr += ar[NR+m][i] * ar[c][i] + ai[NR+m][i] * ai[c][i];
          ti += ai[NR+m][i] * ar[c][i] - ar[NR+m][i] * ai[c][i];
        end
        wr_e[n][m][c] = tr / n0s;
        wi_e[n][m][c] = ti / n0s;
        if ($sqrt(tr * tr + ti * ti) / n0s > wmax[n]) wmax[n] = $sqrt(tr * tr + ti * ti) / n0s;
      end
    for (int m = 0; m < NT; m++) begin
      yr_e[n][m] = 0.0; yi_e[n][m] = 0.0;
      for (int c = 0; c < NR; c++) begin
        yr_e[n][m] += wr_e[n][m][c] * yr[c] - wi_e[n][m][c] * yi[c];
        yi_e[n][m] += wr_e[n][m][c] * yi[c] + wi_e[n][m][c] * yr[c];
      end
    end
    // Reference check: (H^*H + N0 I) W must equal H^*.
    for (int a = 0; a < NT; a++)
      for (int b = 0; b < NT; b++) begin
        gr[a][b] = (a == b) ? n0s * n0s : 0.0; gi[a][b] = 0.0;
        for (int k = 0; k < NR; k++) begin
          gr[a][b] += hr[k][a] * hr[k][b] + hi[k][a] * hi[k][b];
          gi[a][b] += hr[k][a] * hi[k][b] - hi[k][a] * hr[k][b];
        end
      end
    tol = 1e-6 * (1.0 + wmax[n]) * (1.0 + amp * amp * 16.0);
    for (int m = 0; m < NT; m++)
      for (int c = 0; c < NR; c++) begin
        er = 0.0; ei = 0.0;
        for (int k = 0; k < NT; k++) begin
          er += gr[m][k] * wr_e[n][k][c] - gi[m][k] * wi_e[n][k][c];
          ei += gr[m][k] * wi_e[n][k][c] + gi[m][k] * wr_e[n][k][c];
        end
        checks++;
        if ((er - hr[c][m]) > tol || (hr[c][m] - er) > tol ||
            (ei + hi[c][m]) > tol || (-hi[c][m] - ei) > tol) begin
          failures++;
          $display("reference check failed: inst %0d G*W[%0d][%0d] = (%g,%g) H* = (%g,%g)", n, m, c, er, ei, hr[c][m], -hi[c][m]);
        end
      end
  endtask

  // Mechanism counters.
  int n_scale_up = 0, n_scale_down = 0, n_stage_rescale = 0, n_gap = 0, n_b2b = 0, n_shared = 0;
  // Input scalers: sample the shift when each scaled column leaves.
  always @(posedge clk) if (rst_n && dut.sc_sof[0]) begin
    if (dut.g_in_scale[0].shift > 0) n_scale_up++;
    if (dut.g_in_scale[0].shift < 0) n_scale_down++;
    if (dut.g_in_scale[1].shift > 0) n_scale_up++;
    if (dut.g_in_scale[1].shift < 0) n_scale_down++;
  end
  // Rescaling after an orthogonalisation step.
  always @(posedge clk) if (rst_n &&
      dut.g_stage[1].g_gen.u_stage.g_upd.sc_sof[0] &&
      dut.g_stage[1].g_gen.u_stage.g_upd.g_col[0].u_scale.shift_o != 0)
    n_stage_rescale++;

  // First step: updated row NR of the first remaining column, which comes
  // from the norm multipliers' idle slots; counted when non-zero.
  int k_s1 = GAMMA;
  always @(posedge clk) if (rst_n) begin
    if (dut.g_stage[0].g_first.u_stage.sof_out_q[S1_EOFF]) k_s1 = 0;
    if (k_s1 == NR && dut.g_stage[0].g_first.u_stage.vout[0] != '0) n_shared++;
    if (k_s1 < GAMMA) k_s1++;
  end

  // Driver.
  int sent = 0, frames = 0;
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
        frames++;
        if (frames == 21 || frames == 35 || frames == 36) begin
          in_valid = 1'b0;           // idle frame
          n_gap++;
        end else begin
          make_instance(sent);
          in_valid = 1'b1;
          t_in[sent] = cyc;
          if (sent > 0 && t_in[sent] - t_in[sent-1] == GAMMA) n_b2b++;
          sent++;
        end
      end else in_valid = 1'b0;
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  // Monitor.
  int got = 0, last_out = -1, worst_w = 0;
  real maxerr = 0.0;
  always @(posedge clk) if (rst_n && out_valid) begin
    real er, ei, e, tol, wsc;
    #1;
    if (got < NINST) begin
      checks++;
      if (cyc - 1 - t_in[got] != LATENCY) begin
        failures++;
        $display("inst %0d latency %0d, expected %0d", got, cyc - 1 - t_in[got], LATENCY);
      end
      wsc = wmax[got];
      tol = 0.03 * wsc + 4.0 / 4096.0;
      for (int m = 0; m < NT; m++)
        for (int c = 0; c < NR; c++) begin
          er = $itor(w_o[m][c].re) / 4096.0 - wr_e[got][m][c];
          ei = $itor(w_o[m][c].im) / 4096.0 - wi_e[got][m][c];
          e = $sqrt(er * er + ei * ei);
          if (e / (wsc + 1e-9) > maxerr) maxerr = e / (wsc + 1e-9);
          checks++;
          if (e > tol) begin
            failures++;
            $display("inst %0d W[%0d][%0d] = (%f,%f) expected (%f,%f)", got, m, c,
                     $itor(w_o[m][c].re) / 4096.0, $itor(w_o[m][c].im) / 4096.0,
                     wr_e[got][m][c], wi_e[got][m][c]);
          end
        end
      for (int m = 0; m < NT; m++) begin
        er = $itor(yhat_o[m].re) / 4096.0 - yr_e[got][m];
        ei = $itor(yhat_o[m].im) / 4096.0 - yi_e[got][m];
        e = $sqrt(er * er + ei * ei);
        checks++;
        if (e > 0.05 * (1.0 + $sqrt(yr_e[got][m] ** 2 + yi_e[got][m] ** 2))) begin
          failures++;
          $display("inst %0d y_hat[%0d] = (%f,%f) expected (%f,%f)", got, m,
                   $itor(yhat_o[m].re) / 4096.0, $itor(yhat_o[m].im) / 4096.0,
                   yr_e[got][m], yi_e[got][m]);
        end
      end
    end
    got++;
  end

  initial begin
    wait (got == NINST);
    repeat (20) @(posedge clk);
    $display("latency %0d clocks, worst W error %f of max|W|", LATENCY, maxerr);
    $display("mechanisms: scale_up=%0d scale_down=%0d stage_rescale=%0d back_to_back=%0d idle_frames=%0d shared_slot_products=%0d",
             n_scale_up, n_scale_down, n_stage_rescale, n_b2b, n_gap, n_shared);
    checks += 6;
    if (n_shared == 0)        begin failures++; $display("no shared-slot product in step 1"); end
    if (n_scale_up == 0)      begin failures++; $display("scale up never happened"); end
    if (n_scale_down == 0)    begin failures++; $display("scale down never happened"); end
    if (n_stage_rescale == 0) begin failures++; $display("stage rescale never happened"); end
    if (n_b2b == 0)           begin failures++; $display("no back-to-back instances"); end
    if (n_gap == 0)           begin failures++; $display("no idle frame"); end
    checks++;
    if (got != NINST) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
