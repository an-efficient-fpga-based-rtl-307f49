// tb_proj_update: streams pairs (u, v) with u a quantised unit vector and v a
// random column, back to back, and checks v - (u^* v) u against a
// floating-point computation (within 3 LSB) and the LAT_PROJ latency. It
// also checks that the result is orthogonal to u.
module tb_proj_update;
  import mmse_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic sof_i, sof_o;
  cq_t  u_i;
  cv_t  v_i, v_o;

  proj_update dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NCOL = 120;
  int   ur [NCOL][GAMMA], ui [NCOL][GAMMA], vr [NCOL][GAMMA], vi [NCOL][GAMMA];
  real  er [NCOL][GAMMA], ei [NCOL][GAMMA];
  int   t_sof [NCOL];

  task automatic make(int n);
    real fr [GAMMA];
    real fi [GAMMA];
    real nrm, rr, ri, uq_r, uq_i;
    int  t;
    nrm = 0.0;
    for (int k = 0; k < GAMMA; k++) begin
      t = int'($urandom_range(0, 2000)) - 1000;
      fr[k] = $itor(t);
      t = int'($urandom_range(0, 2000)) - 1000;
      fi[k] = $itor(t);
      nrm += fr[k] * fr[k] + fi[k] * fi[k];
    end
    nrm = $sqrt(nrm);
    for (int k = 0; k < GAMMA; k++) begin
      ur[n][k] = $rtoi(fr[k] / nrm * 4096.0);
      ui[n][k] = $rtoi(fi[k] / nrm * 4096.0);
      vr[n][k] = int'($urandom_range(0, 8192)) - 4096;
      vi[n][k] = int'($urandom_range(0, 8192)) - 4096;
    end
    rr = 0.0; ri = 0.0;
    for (int k = 0; k < GAMMA; k++) begin
      uq_r = $itor(ur[n][k]) / 4096.0; uq_i = $itor(ui[n][k]) / 4096.0;
      rr += uq_r * vr[n][k] + uq_i * vi[n][k];
      ri += uq_r * vi[n][k] - uq_i * vr[n][k];
    end
    for (int k = 0; k < GAMMA; k++) begin
      uq_r = $itor(ur[n][k]) / 4096.0; uq_i = $itor(ui[n][k]) / 4096.0;
      er[n][k] = vr[n][k] - (rr * uq_r - ri * uq_i);
      ei[n][k] = vi[n][k] - (rr * uq_i + ri * uq_r);
    end
  endtask

  initial begin
    sof_i = 1'b0; u_i = '0; v_i = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCOL; n++) begin
      make(n);
      if (n % 11 == 6) repeat ($urandom_range(1, 4)) @(negedge clk);
      for (int k = 0; k < GAMMA; k++) begin
        @(negedge clk);
        sof_i = (k == 0);
        u_i.re = QW'(ur[n][k]); u_i.im = QW'(ui[n][k]);
        v_i.re = DW'(vr[n][k]); v_i.im = DW'(vi[n][k]);
        if (k == 0) t_sof[n] = cyc;
      end
    end
    @(negedge clk);
    sof_i = 1'b0;
  end

  int got = 0, k_out = GAMMA;
  real dot_r, dot_i;
  always @(posedge clk) if (rst_n) begin
    if (sof_o) begin
      checks++;
      if (cyc - t_sof[got] != LAT_PROJ) begin
        failures++; $display("column %0d latency %0d", got, cyc - t_sof[got]);
      end
      k_out = 0; dot_r = 0.0; dot_i = 0.0;
    end
    if (sof_o || k_out < GAMMA) begin
      real dr, di;
      dr = $itor(v_o.re) - er[got][k_out];
      di = $itor(v_o.im) - ei[got][k_out];
      dot_r += $itor(ur[got][k_out]) / 4096.0 * v_o.re + $itor(ui[got][k_out]) / 4096.0 * v_o.im;
      dot_i += $itor(ur[got][k_out]) / 4096.0 * v_o.im - $itor(ui[got][k_out]) / 4096.0 * v_o.re;
      checks++;
      if (dr > 3.0 || dr < -3.0 || di > 3.0 || di < -3.0) begin
        failures++;
        if (failures < 10) $display("column %0d elem %0d: got (%0d,%0d) expected (%f,%f)",
                                    got, k_out, v_o.re, v_o.im, er[got][k_out], ei[got][k_out]);
      end
      k_out++;
      if (k_out == GAMMA) begin
        checks++;
        if ($sqrt(dot_r * dot_r + dot_i * dot_i) > 20.0) begin
          failures++; $display("column %0d not orthogonal to u: %f", got, $sqrt(dot_r * dot_r + dot_i * dot_i));
        end
        got++;
      end
    end
  end

  initial begin
    wait (got == NCOL);
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
