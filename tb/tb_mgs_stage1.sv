// tb_mgs_stage1: tests the multiplier-sharing first column step.
//
// The inputs have the structure of the first step of the compound matrix
// [H ; sqrt(N0) I] after input scaling: v_1 is random in rows 0..3, real and
// positive in row 4 and zero below; column j (j = 2..4) is random in rows
// 0..3, real and positive in row 3+j and zero elsewhere. The same columns go
// to the generic mgs_stage, which is checked against a floating-point model
// by its own testbench. For such inputs the two must agree bit for bit: the
// norm, every element of u_1 and every element of the updated, rescaled
// columns are compared. Latencies (LAT_NORM, LAT_R + 1, STAGE1_P) are checked,
// and columns arrive back to back and with idle gaps on the 8-clock grid.
// The testbench plays the shared square-root/reciprocal unit for both.
module tb_mgs_stage1;
  import mmse_pkg::*;

  localparam int NV = NT - 1, NCOL = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           sof_i;
  cv_t            vi_i, vj_i [NV];
  logic [RW-1:0]  recip_i;
  // device under test
  logic           norm_valid_o, u_sof_o, vj_sof_o;
  logic [NSW-1:0] norm_o;
  cq_t            u_o;
  cv_t            vj_o [NV];
  // generic reference stage
  logic           r_norm_valid, r_u_sof, r_vj_sof;
  logic [NSW-1:0] r_norm;
  cq_t            r_u;
  cv_t            r_vj [NV];

  mgs_stage1 dut (.*);

  mgs_stage #(.NV(NV)) u_ref (
    .clk, .rst_n, .sof_i, .vi_i, .vj_i, .norm_valid_o(r_norm_valid), .norm_o(r_norm),
    .recip_i, .u_sof_o(r_u_sof), .u_o(r_u), .vj_sof_o(r_vj_sof), .vj_o(r_vj)
  );

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_sof [NCOL];
  int sent = 0;

  function automatic cv_t rnd(int a);
    cv_t v;
    v.re = DW'(int'($urandom_range(0, 2 * a)) - a);
    v.im = DW'(int'($urandom_range(0, 2 * a)) - a);
    return v;
  endfunction

  initial begin
    int a [NV+1];
    sof_i = 1'b0; vi_i = '0;
    for (int j = 0; j < NV; j++) vj_i[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCOL; n++) begin
      for (int c = 0; c <= NV; c++) a[c] = $urandom_range(1 << SCALE_L, 1 << SCALE_U);
      if (n % 7 == 3) repeat (GAMMA * $urandom_range(1, 3)) @(negedge clk);
      for (int k = 0; k < GAMMA; k++) begin
        @(negedge clk);
        sof_i = (k == 0);
        if (k == 0) t_sof[n] = cyc;
        if (k < NR) vi_i = rnd(a[0]);
        else if (k == NR) begin vi_i.re = DW'($urandom_range(1, a[0])); vi_i.im = '0; end
        else vi_i = '0;
        for (int j = 0; j < NV; j++) begin
          if (k < NR) vj_i[j] = rnd(a[j+1]);
          else if (k == NR + 1 + j) begin
            vj_i[j].re = DW'($urandom_range(1, a[j+1])); vj_i[j].im = '0;
          end else vj_i[j] = '0;
        end
      end
      sent++;
    end
    @(negedge clk);
    sof_i = 1'b0;
  end

  // Model of the shared square-root / reciprocal unit (answers both stages).
  int rq_t [$];
  longint rq_v [$];
  initial recip_i = '0;
  always @(posedge clk) if (rst_n) begin
    if (r_norm_valid) begin
      longint x, r, q;
      x = longint'(r_norm) << (2 * SF);
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

  // Norm and u_1: same timing as the generic stage, compared directly.
  int gn = 0, gu = 0, ku = GAMMA;
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (norm_valid_o !== r_norm_valid || (norm_valid_o && norm_o !== r_norm)) begin
      failures++;
      if (failures < 10) $display("norm mismatch at %0d: %0d/%0d vs %0d/%0d", cyc,
                                  norm_valid_o, norm_o, r_norm_valid, r_norm);
    end
    if (norm_valid_o) begin
      checks++;
      if (cyc - t_sof[gn] != LAT_NORM) begin
        failures++; $display("norm %0d latency %0d", gn, cyc - t_sof[gn]);
      end
      gn++;
    end
    if (u_sof_o !== r_u_sof) begin
      failures++; $display("u sof mismatch at %0d", cyc);
    end
    if (u_sof_o) begin
      checks++;
      if (cyc - t_sof[gu] != LAT_R + 1) begin
        failures++; $display("u %0d latency %0d", gu, cyc - t_sof[gu]);
      end
      ku = 0;
    end
    if (u_sof_o || ku < GAMMA) begin
      checks++;
      if (u_o !== r_u) begin
        failures++;
        if (failures < 10) $display("u %0d elem %0d: (%0d,%0d) vs (%0d,%0d)", gu, ku,
                                    u_o.re, u_o.im, r_u.re, r_u.im);
      end
      ku++;
      if (ku == GAMMA) gu++;
    end
  end

  // Updated columns: the reference stream is queued, the device's compared.
  cv_t rq [$][NV];
  int  rk = GAMMA, gv = 0, kv = GAMMA;
  always @(posedge clk) if (rst_n) begin
    if (r_vj_sof) rk = 0;
    if (r_vj_sof || rk < GAMMA) begin
      cv_t e [NV];
      for (int j = 0; j < NV; j++) e[j] = r_vj[j];
      rq.push_back(e);
      rk++;
    end
    if (vj_sof_o) begin
      checks++;
      if (cyc - t_sof[gv] != STAGE1_P) begin
        failures++; $display("v %0d latency %0d", gv, cyc - t_sof[gv]);
      end
      kv = 0;
    end
    if (vj_sof_o || kv < GAMMA) begin
      if (rq.size() == 0) begin
        failures++; $display("v %0d elem %0d has no reference", gv, kv);
      end else begin
        for (int j = 0; j < NV; j++) begin
          checks++;
          if (vj_o[j] !== rq[0][j]) begin
            failures++;
            if (failures < 10) $display("v %0d col %0d elem %0d: (%0d,%0d) vs (%0d,%0d)", gv, j, kv,
                                        vj_o[j].re, vj_o[j].im, rq[0][j].re, rq[0][j].im);
          end
        end
        void'(rq.pop_front());
      end
      kv++;
      if (kv == GAMMA) gv++;
    end
  end

  initial begin
    wait (gv == NCOL && gu == NCOL && gn == NCOL);
    repeat (STAGE_P + 3) @(posedge clk);
    checks++;
    if (rq.size() != 0) begin
      failures++; $display("%0d reference elements left over", rq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
