// tb_weight_detect: feeds random Q frames (row k of all four columns on
// clock k; Q2 upper triangular with a real diagonal, as a QR of the compound
// matrix gives, with random values driven on the entries that are known to
// be zero, which must not affect the result), reciprocal noise values and y vectors back to back, and checks
// W = (Q2 / sqrt(N0)) Q1^* and y_hat = W y against a floating-point
// computation, plus the LAT_WDET latency of out_valid_o.
module tb_weight_detect;
  import mmse_pkg::*;

  localparam int NF_ = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          sof_i, out_valid_o;
  cq_t           q_i [NT];
  logic [RW-1:0] recip_n0_i;
  cv_t           y_i [NR];
  cw_t           w_o [NT][NR];
  cy_t           yhat_o [NT];

  weight_detect dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  qr [NF_][ROWS][NT], qi [NF_][ROWS][NT], yr [NF_][NR], yi [NF_][NR];
  longint rc [NF_];
  real wr [NF_][NT][NR], wi [NF_][NT][NR], hr [NF_][NT], hi [NF_][NT];
  int  t_sof [NF_];

  task automatic make(int n);
    real q2r, q2i, s;
    int t;
    for (int k = 0; k < ROWS; k++)
      for (int c = 0; c < NT; c++) begin
        t = int'($urandom_range(0, 4096)) - 2048; qr[n][k][c] = t;
        t = int'($urandom_range(0, 4096)) - 2048; qi[n][k][c] = t;
        // Q2 is upper triangular with a real diagonal.
        if (k >= NR && c < k - NR) qr[n][k][c] = 0;
        if (k >= NR && c <= k - NR) qi[n][k][c] = 0;
      end
    t = $urandom_range(512, 8192);
    rc[n] = (64'd1 << RF) / t;
    for (int r = 0; r < NR; r++) begin
      t = int'($urandom_range(0, 3276)) - 1638; yr[n][r] = t;
      t = int'($urandom_range(0, 3276)) - 1638; yi[n][r] = t;
    end
    s = $itor(rc[n]) * (2.0 ** (real'(HF) - real'(RF)));
    for (int m = 0; m < NT; m++)
      for (int c = 0; c < NR; c++) begin
        wr[n][m][c] = 0.0; wi[n][m][c] = 0.0;
        for (int i = 0; i < NT; i++) begin
          q2r = $itor(qr[n][NR+m][i]) / 4096.0 * s;
          q2i = $itor(qi[n][NR+m][i]) / 4096.0 * s;
          wr[n][m][c] += q2r * qr[n][c][i] / 4096.0 + q2i * qi[n][c][i] / 4096.0;
          wi[n][m][c] += q2i * qr[n][c][i] / 4096.0 - q2r * qi[n][c][i] / 4096.0;
        end
      end
    for (int m = 0; m < NT; m++) begin
      hr[n][m] = 0.0; hi[n][m] = 0.0;
      for (int c = 0; c < NR; c++) begin
        hr[n][m] += wr[n][m][c] * yr[n][c] / 4096.0 - wi[n][m][c] * yi[n][c] / 4096.0;
        hi[n][m] += wr[n][m][c] * yi[n][c] / 4096.0 + wi[n][m][c] * yr[n][c] / 4096.0;
      end
    end
  endtask

  initial begin
    sof_i = 1'b0; recip_n0_i = '0;
    for (int c = 0; c < NT; c++) q_i[c] = '0;
    for (int r = 0; r < NR; r++) y_i[r] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NF_; n++) begin
      make(n);
      if (n % 13 == 4) repeat ($urandom_range(1, 9)) @(negedge clk);
      for (int k = 0; k < GAMMA; k++) begin
        @(negedge clk);
        sof_i = (k == 0);
        for (int c = 0; c < NT; c++) begin
          q_i[c].re = QW'(qr[n][k][c]); q_i[c].im = QW'(qi[n][k][c]);
          // Entries known to be zero are not to be read: drive noise there.
          if (k >= NR && c < k - NR) q_i[c].re = QW'($urandom);
          if (k >= NR && c <= k - NR) q_i[c].im = QW'($urandom);
        end
        // recip and y are only guaranteed near the end of the frame.
        recip_n0_i = (k >= 4) ? RW'(rc[n]) : RW'($urandom);
        for (int r = 0; r < NR; r++) begin
          y_i[r].re = (k >= 4) ? DW'(yr[n][r]) : DW'($urandom);
          y_i[r].im = (k >= 4) ? DW'(yi[n][r]) : DW'($urandom);
        end
        if (k == 0) t_sof[n] = cyc;
      end
    end
    @(negedge clk);
    sof_i = 1'b0;
  end

  int got = 0;
  always @(posedge clk) if (rst_n && out_valid_o) begin
    #1;
    checks++;
    if (cyc - 1 - t_sof[got] != LAT_WDET) begin
      failures++; $display("frame %0d latency %0d", got, cyc - 1 - t_sof[got]);
    end
    for (int m = 0; m < NT; m++) begin
      for (int c = 0; c < NR; c++) begin
        real d;
        d = $sqrt(($itor(w_o[m][c].re) / 4096.0 - wr[got][m][c]) ** 2 +
                  ($itor(w_o[m][c].im) / 4096.0 - wi[got][m][c]) ** 2);
        checks++;
        if (d > 8.0 / 4096.0) begin
          failures++;
          $display("frame %0d W[%0d][%0d] got (%f,%f) expected (%f,%f)", got, m, c,
                   $itor(w_o[m][c].re) / 4096.0, $itor(w_o[m][c].im) / 4096.0,
                   wr[got][m][c], wi[got][m][c]);
        end
      end
      begin
        real d;
        d = $sqrt(($itor(yhat_o[m].re) / 4096.0 - hr[got][m]) ** 2 +
                  ($itor(yhat_o[m].im) / 4096.0 - hi[got][m]) ** 2);
        checks++;
        if (d > 12.0 / 4096.0) begin
          failures++;
          $display("frame %0d y_hat[%0d] got (%f,%f) expected (%f,%f)", got, m,
                   $itor(yhat_o[m].re) / 4096.0, $itor(yhat_o[m].im) / 4096.0, hr[got][m], hi[got][m]);
        end
      end
    end
    got++;
  end

  initial begin
    wait (got == NF_);
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
