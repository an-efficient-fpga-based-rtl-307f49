// tb_norm_sq: feeds random scaled columns (back to back and with gaps) and
// checks each ||v||^2 against a sum computed in the testbench, and that the
// result pulse comes LAT_NORM clocks after the column's first element.
module tb_norm_sq;
  import mmse_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic sof_i, valid_o;
  cv_t  d_i;
  logic [NSW-1:0] nsq_o;

  norm_sq dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NCOL = 150;
  longint exp_sum [NCOL];
  int t_sof [NCOL];

  initial begin
    sof_i = 1'b0; d_i = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCOL; n++) begin
      int a, vr, vi;
      a = (n % 5 == 0) ? 4096 : $urandom_range(1, 4096);
      exp_sum[n] = 0;
      if (n % 9 == 4) repeat ($urandom_range(1, 6)) @(negedge clk);
      for (int k = 0; k < GAMMA; k++) begin
        vr = int'($urandom_range(0, 2 * a)) - a;
        vi = int'($urandom_range(0, 2 * a)) - a;
        exp_sum[n] += longint'(vr) * vr + longint'(vi) * vi;
        @(negedge clk);
        sof_i = (k == 0);
        d_i.re = DW'(vr);
        d_i.im = DW'(vi);
        if (k == 0) t_sof[n] = cyc;
      end
    end
    @(negedge clk);
    sof_i = 1'b0;
  end

  int got = 0;
  always @(posedge clk) if (rst_n && valid_o) begin
    checks += 2;
    if (cyc - t_sof[got] != LAT_NORM) begin
      failures++;
      $display("column %0d latency %0d", got, cyc - t_sof[got]);
    end
    if (longint'(nsq_o) != exp_sum[got]) begin
      failures++;
      $display("column %0d: got %0d expected %0d", got, nsq_o, exp_sum[got]);
    end
    got++;
  end

  initial begin
    wait (got == NCOL);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
