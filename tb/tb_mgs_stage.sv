// tb_mgs_stage: tests one Gram-Schmidt column step with three columns left.
//
// The testbench plays the shared square-root/reciprocal unit: when the stage
// reports ||v_i||^2 it answers, LAT_R clocks after the column started, with
// floor(2^RF / floor(sqrt(||v_i||^2 * 2^(2 SF)))). It checks u_i against
// v_i / ||v_i|| computed in floating point, and each updated column against
// v_j - (u_i^* v_j) u_i up to the power of two chosen by the rescaling, whose
// result must have its largest part in [2^L, 2^U]. Latencies of u_i
// (LAT_R + 1) and of the updated columns (STAGE_P) are checked too.
module tb_mgs_stage;
  import mmse_pkg::*;

  localparam int NV = 3, NCOL = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           sof_i, norm_valid_o, u_sof_o, vj_sof_o;
  cv_t            vi_i, vj_i [NV], vj_o [NV];
  logic [NSW-1:0] norm_o;
  logic [RW-1:0]  recip_i;
  cq_t            u_o;

  mgs_stage #(.NV(NV)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  xr [NCOL][NV+1][GAMMA], xi [NCOL][NV+1][GAMMA];   // column 0 is v_i
  real ur [NCOL][GAMMA], ui [NCOL][GAMMA];
  real er [NCOL][NV][GAMMA], ei [NCOL][NV][GAMMA];
  int  t_sof [NCOL];

  task automatic make(int n);
    real nrm, rr, ri;
    int a, t;
    for (int c = 0; c <= NV; c++) begin
      a = $urandom_range(1 << SCALE_L, 1 << SCALE_U);
      for (int k = 0; k < GAMMA; k++) begin
        t = int'($urandom_range(0, 2 * a)) - a; xr[n][c][k] = t;
        t = int'($urandom_range(0, 2 * a)) - a; xi[n][c][k] = t;
      end
    end
    nrm = 0.0;
    for (int k = 0; k < GAMMA; k++) nrm += $itor(xr[n][0][k]) ** 2 + $itor(xi[n][0][k]) ** 2;
    nrm = $sqrt(nrm);
    for (int k = 0; k < GAMMA; k++) begin
      ur[n][k] = $itor(xr[n][0][k]) / nrm;
      ui[n][k] = $itor(xi[n][0][k]) / nrm;
    end
    for (int j = 0; j < NV; j++) begin
      rr = 0.0; ri = 0.0;
      for (int k = 0; k < GAMMA; k++) begin
        rr += ur[n][k] * xr[n][j+1][k] + ui[n][k] * xi[n][j+1][k];
        ri += ur[n][k] * xi[n][j+1][k] - ui[n][k] * xr[n][j+1][k];
      end
      for (int k = 0; k < GAMMA; k++) begin
        er[n][j][k] = xr[n][j+1][k] - (rr * ur[n][k] - ri * ui[n][k]);
        ei[n][j][k] = xi[n][j+1][k] - (rr * ui[n][k] + ri * ur[n][k]);
      end
    end
  endtask

  initial begin
    sof_i = 1'b0; vi_i = '0;
    for (int j = 0; j < NV; j++) vj_i[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCOL; n++) begin
      make(n);
      if (n % 9 == 5) repeat ($urandom_range(1, 4)) @(negedge clk);
      for (int k = 0; k < GAMMA; k++) begin
        @(negedge clk);
        sof_i = (k == 0);
        vi_i.re = DW'(xr[n][0][k]); vi_i.im = DW'(xi[n][0][k]);
        for (int j = 0; j < NV; j++) begin
          vj_i[j].re = DW'(xr[n][j+1][k]); vj_i[j].im = DW'(xi[n][j+1][k]);
        end
        if (k == 0) t_sof[n] = cyc;
      end
    end
    @(negedge clk);
    sof_i = 1'b0;
  end

  // Model of the shared square-root / reciprocal unit.
  int rq_t [$];
  longint rq_v [$];
  initial recip_i = '0;
  always @(posedge clk) if (rst_n) begin
    if (norm_valid_o) begin
      longint x, r, q;
      x = longint'(norm_o) << (2 * SF);
      r = longint'($floor($sqrt($itor(x))));
      while (r * r > x) r--;
      while ((r + 1) * (r + 1) <= x) r++;
      q = (64'd1 << RF) / r;
      if (q > 64'hFFFF_FFFF) q = 64'hFFFF_FFFF;
      rq_t.push_back(cyc + (LAT_R - LAT_NORM) - 1);
      rq_v.push_back(q);
    end
    if (rq_t.size() > 0 && rq_t[0] == cyc) begin
      recip_i <= RW'(rq_v[0]);
      void'(rq_t.pop_front());
      void'(rq_v.pop_front());
    end
  end

  // u_i checker.
  int gu = 0, ku = GAMMA;
  always @(posedge clk) if (rst_n) begin
    if (u_sof_o) begin
      checks++;
      if (cyc - t_sof[gu] != LAT_R + 1) begin
        failures++; $display("u %0d latency %0d", gu, cyc - t_sof[gu]);
      end
      ku = 0;
    end
    if (u_sof_o || ku < GAMMA) begin
      real dr, di;
      dr = $itor(u_o.re) / 4096.0 - ur[gu][ku];
      di = $itor(u_o.im) / 4096.0 - ui[gu][ku];
      checks++;
      if ($sqrt(dr * dr + di * di) > 3.0 / 4096.0) begin
        failures++;
        if (failures < 10) $display("u %0d elem %0d: got (%0d,%0d) expected (%f,%f)", gu, ku,
                                    u_o.re, u_o.im, ur[gu][ku] * 4096.0, ui[gu][ku] * 4096.0);
      end
      ku++;
      if (ku == GAMMA) gu++;
    end
  end

  // Updated-column checker: collect a whole column, then compare.
  int gv = 0, kv = GAMMA;
  int orr [NV][GAMMA], oii [NV][GAMMA];
  always @(posedge clk) if (rst_n) begin
    if (vj_sof_o) begin
      checks++;
      if (cyc - t_sof[gv] != STAGE_P) begin
        failures++; $display("v %0d latency %0d", gv, cyc - t_sof[gv]);
      end
      kv = 0;
    end
    if (vj_sof_o || kv < GAMMA) begin
      for (int j = 0; j < NV; j++) begin orr[j][kv] = vj_o[j].re; oii[j][kv] = vj_o[j].im; end
      kv++;
      if (kv == GAMMA) begin
        for (int j = 0; j < NV; j++) begin
          real mo, me, sc, d;
          int  mx;
          mo = 0.0; me = 0.0; mx = 0;
          for (int k = 0; k < GAMMA; k++) begin
            if ($sqrt($itor(orr[j][k]) ** 2 + $itor(oii[j][k]) ** 2) > mo) mo = $sqrt($itor(orr[j][k]) ** 2 + $itor(oii[j][k]) ** 2);
            if ($sqrt(er[gv][j][k] ** 2 + ei[gv][j][k] ** 2) > me) me = $sqrt(er[gv][j][k] ** 2 + ei[gv][j][k] ** 2);
            if ((orr[j][k] < 0 ? -orr[j][k] : orr[j][k]) > mx) mx = (orr[j][k] < 0 ? -orr[j][k] : orr[j][k]);
            if ((oii[j][k] < 0 ? -oii[j][k] : oii[j][k]) > mx) mx = (oii[j][k] < 0 ? -oii[j][k] : oii[j][k]);
          end
          sc = 2.0 ** $rtoi($floor($ln(mo / me) / $ln(2.0) + 0.5));
          checks += 2;
          if (mx < (1 << SCALE_L) || mx > (1 << SCALE_U)) begin
            failures++; $display("v %0d col %0d max %0d outside scaling bounds", gv, j, mx);
          end
          for (int k = 0; k < GAMMA; k++) begin
            d = $sqrt(($itor(orr[j][k]) - sc * er[gv][j][k]) ** 2 + ($itor(oii[j][k]) - sc * ei[gv][j][k]) ** 2);
            if (d > 0.01 * mo + 4.0 * sc + 4.0) begin
              failures++;
              $display("v %0d col %0d elem %0d: got (%0d,%0d) expected (%f,%f)", gv, j, k,
                       orr[j][k], oii[j][k], sc * er[gv][j][k], sc * ei[gv][j][k]);
              break;
            end
          end
        end
        gv++;
      end
    end
  end

  initial begin
    wait (gv == NCOL && gu == NCOL);
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
