// proj_update: one orthogonalisation step v := v - (u^* v) u of the modified
// Gram-Schmidt QR decomposition (steps (k)-(l) of the algorithm).
//
// A unit-norm column u and a column v stream in together, one element per
// clock, element 0 flagged by sof_i. During the first GAMMA clocks the inner
// product r = u^* v is accumulated with one complex multiplier; both columns
// wait in an 8-deep buffer meanwhile. During the next GAMMA clocks r*u_k is
// subtracted from each buffered v_k with a second complex multiplier. The
// updated column leaves LAT_PROJ = GAMMA+1 clocks after it entered, with
// sof_o on element 0; columns may follow back to back. As in the source
// design the two complex products take 3 real multipliers each (cmul3), 6 in
// all. Results are rounded and saturated to DW.
module proj_update
  import mmse_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sof_i,
  input  cq_t  u_i,
  input  cv_t  v_i,
  output logic sof_o,
  output cv_t  v_o
);

  localparam int unsigned CW = $clog2(GAMMA);
  localparam int unsigned RWD = DW + 2;           // width of r

  logic [CW-1:0] cnt_q;
  logic          busy_q;
  logic signed [63:0] acc_re_q, acc_im_q, acc_re_in, acc_im_in;
  logic signed [RWD-1:0] r_re_q, r_im_q;
  cq_t  ubuf_q [GAMMA];
  cv_t  vbuf_q [GAMMA];
  logic [GAMMA-1:0] sof_dly_q;

  always_comb begin
    logic signed [63:0] pre, pim;
    cmul3(64'(u_i.re), -64'(u_i.im), 64'(v_i.re), 64'(v_i.im), pre, pim);
    acc_re_in = ((sof_i || !busy_q) ? 64'sd0 : acc_re_q) + pre;
    acc_im_in = ((sof_i || !busy_q) ? 64'sd0 : acc_im_q) + pim;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      busy_q    <= 1'b0;
      acc_re_q  <= '0;
      acc_im_q  <= '0;
      r_re_q    <= '0;
      r_im_q    <= '0;
      sof_dly_q <= '0;
      sof_o     <= 1'b0;
      v_o       <= '0;
    end else begin
      if (sof_i) begin
        cnt_q  <= CW'(1);
        busy_q <= 1'b1;
      end else if (busy_q) begin
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == CW'(GAMMA - 1)) busy_q <= 1'b0;
      end
      acc_re_q <= acc_re_in;
      acc_im_q <= acc_im_in;
      if (busy_q && cnt_q == CW'(GAMMA - 1)) begin
        r_re_q <= RWD'(sat(rshr(acc_re_in, QF), RWD));
        r_im_q <= RWD'(sat(rshr(acc_im_in, QF), RWD));
      end
      sof_dly_q <= {sof_dly_q[GAMMA-2:0], sof_i};
      sof_o     <= sof_dly_q[GAMMA-1];
      begin
        logic signed [63:0] ur, ui, pr, pi;
        ur = 64'(ubuf_q[GAMMA-1].re);
        ui = 64'(ubuf_q[GAMMA-1].im);
        cmul3(64'(r_re_q), 64'(r_im_q), ur, ui, pr, pi);
        v_o.re <= DW'(sat(64'(vbuf_q[GAMMA-1].re) - rshr(pr, QF), DW));
        v_o.im <= DW'(sat(64'(vbuf_q[GAMMA-1].im) - rshr(pi, QF), DW));
      end
    end
  end

  always_ff @(posedge clk) begin
    ubuf_q[0] <= u_i;
    vbuf_q[0] <= v_i;
    for (int k = 1; k < GAMMA; k++) begin
      ubuf_q[k] <= ubuf_q[k-1];
      vbuf_q[k] <= vbuf_q[k-1];
    end
  end

endmodule
