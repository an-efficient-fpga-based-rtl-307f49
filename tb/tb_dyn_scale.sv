// tb_dyn_scale: checks the dynamic column scaling against a direct model of
// the doubling/halving loops (double while max < 2^L, halve while max > 2^U),
// over columns of very different magnitudes sent back to back and with gaps,
// and checks the GAMMA+1 clock latency of sof_o.
module tb_dyn_scale;
  import mmse_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic sof_i, sof_o;
  cv_t  d_i, d_o;
  logic signed [5:0] shift_o;

  dyn_scale dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NCOL = 200;
  int exp_re [NCOL][GAMMA], exp_im [NCOL][GAMMA];
  int t_sof [NCOL];
  int n_up = 0, n_down = 0;


  int vin_re [NCOL][GAMMA], vin_im [NCOL][GAMMA];

  initial begin
    sof_i = 1'b0; d_i = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCOL; n++) begin
      // Build the raw column and its expected scaled version.
      int bits, a, mx;
      bits = $urandom_range(0, 15);
      if (n % 17 == 5) bits = 0;
      a = (bits == 0) ? 0 : (1 << bits) - 1;
      for (int k = 0; k < GAMMA; k++) begin
        vin_re[n][k] = int'($urandom_range(0, 2 * a)) - a;
        vin_im[n][k] = int'($urandom_range(0, 2 * a)) - a;
      end
      begin
        int vr [GAMMA], vi [GAMMA];
        mx = 0;
        for (int k = 0; k < GAMMA; k++) begin
          vr[k] = vin_re[n][k]; vi[k] = vin_im[n][k];
          if ((vr[k] < 0 ? -vr[k] : vr[k]) > mx) mx = (vr[k] < 0 ? -vr[k] : vr[k]);
          if ((vi[k] < 0 ? -vi[k] : vi[k]) > mx) mx = (vi[k] < 0 ? -vi[k] : vi[k]);
        end
        if (mx != 0) begin
          while (mx < (1 << SCALE_L)) begin
            mx *= 2; n_up++;
            for (int k = 0; k < GAMMA; k++) begin vr[k] *= 2; vi[k] *= 2; end
          end
          while (mx > (1 << SCALE_U)) begin
            mx = mx >>> 1; n_down++;
            for (int k = 0; k < GAMMA; k++) begin vr[k] = vr[k] >>> 1; vi[k] = vi[k] >>> 1; end
          end
        end
        for (int k = 0; k < GAMMA; k++) begin exp_re[n][k] = vr[k]; exp_im[n][k] = vi[k]; end
      end
      if (n % 7 == 3) begin               // an idle gap now and then
        repeat ($urandom_range(1, 5)) @(negedge clk);
      end
      for (int k = 0; k < GAMMA; k++) begin
        @(negedge clk);
        sof_i = (k == 0);
        d_i.re = DW'(vin_re[n][k]);
        d_i.im = DW'(vin_im[n][k]);
        if (k == 0) t_sof[n] = cyc;
      end
    end
    @(negedge clk);
    sof_i = 1'b0;
  end

  // Output checker.
  int got = 0, k_out = GAMMA;
  always @(posedge clk) if (rst_n) begin
    if (sof_o) begin
      checks++;
      if (cyc - t_sof[got] != LAT_SCALE) begin
        failures++;
        $display("column %0d latency %0d", got, cyc - t_sof[got]);
      end
      k_out = 0;
    end
    if (sof_o || k_out < GAMMA) begin
      checks++;
      if (int'(d_o.re) != exp_re[got][k_out] || int'(d_o.im) != exp_im[got][k_out]) begin
        failures++;
        if (failures < 10)
          $display("column %0d elem %0d: got (%0d,%0d) expected (%0d,%0d)", got, k_out,
                   d_o.re, d_o.im, exp_re[got][k_out], exp_im[got][k_out]);
      end
      k_out++;
      if (k_out == GAMMA) got++;
    end
  end

  initial begin
    wait (got == NCOL);
    repeat (5) @(posedge clk);
    checks += 2;
    if (n_up == 0) failures++;
    if (n_down == 0) failures++;
    $display("scale-ups %0d scale-downs %0d", n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
