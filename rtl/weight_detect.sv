// weight_detect: MMSE weight matrix and detection from the Q factor.
//
// Given Q = [Q1 ; Q2] of the compound matrix and 1/sqrt(N0), computes
//   Q2n   = Q2 / sqrt(N0)          (= R^-1, scalar-matrix product)
//   W     = Q2n * Q1^*             (MMSE weight matrix, matrix-matrix product)
//   y_hat = W * y                  (detected symbols, matrix-vector product)
// Each product is time-shared over GAMMA = 8 clocks, so a new instance can be
// handled every 8 clocks, in three pipeline phases after an 8-clock capture:
//   capture : the four columns of Q arrive in step, row k of all columns at
//             clock k after sof_i; 1/sqrt(N0) and y are sampled with row 7
//   phase A : Q2n, 2 real multipliers
//   phase B : W, 13 real multipliers
//   phase C : half of one y_hat entry per clock (2 complex multipliers)
// Q2 is upper triangular with a real diagonal (R^-1 is), so of its 16 entries
// only 6 complex and 4 real ones are computed and used, as in the source
// design, which needs 2 and 13 real multipliers for phases A and B:
//   phase A, clock c: c = 0..5 scales complex entry c of (01 02 03 12 13 23),
//            c = 6 the diagonal entries 00, 11 and c = 7 the entries 22, 33:
//            16 real products in 8 clocks.
//   phase B, clock c: half of column n = c/2 of W. Even c: W[0][n] (one real
//            and three complex terms) and W[3][n] (one real term); odd c:
//            W[1][n] (one real, two complex) and W[2][n] (one real, one
//            complex). Each clock: 2 real-by-complex products (2 real
//            multipliers each) and 3 complex products (3 each) = 13.
// Complex products use the 3-multiplier form. Sums are exact, so the results
// equal those of the plain 4-term dot products bit for bit. The input must
// have that structure: entries of Q2 below the diagonal and the imaginary
// parts of its diagonal are not read.
// out_valid_o pulses, with W and y_hat on the outputs, LAT_WDET = 32 clocks
// after sof_i; outputs hold until the next instance. The fixed schedule
// assumes NT = NR = 4 and GAMMA = 8. Products are rounded and saturated to
// the formats in mmse_pkg.
module weight_detect
  import mmse_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sof_i,
  input  cq_t           q_i [NT],          // row k of u_1..u_NT
  input  logic [RW-1:0] recip_n0_i,
  input  cv_t           y_i [NR],
  output logic          out_valid_o,
  output cw_t           w_o [NT][NR],
  output cy_t           yhat_o [NT]
);

  localparam int unsigned CW = $clog2(GAMMA);

  if (NT != 4 || NR != 4 || GAMMA != 8) begin : g_bad_size
    $error("weight_detect: the schedule is written for NT = NR = 4, GAMMA = 8");
  end


  // ---------------- capture ----------------
  logic [CW-1:0] cap_cnt_q;
  logic          cap_busy_q;
  cq_t           qbuf_q [ROWS-1][NT];
  logic          cap_last;
  assign cap_last = cap_busy_q && cap_cnt_q == CW'(GAMMA - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_cnt_q  <= '0;
      cap_busy_q <= 1'b0;
    end else if (sof_i) begin
      cap_cnt_q  <= CW'(1);
      cap_busy_q <= 1'b1;
    end else if (cap_busy_q) begin
      cap_cnt_q <= cap_cnt_q + 1'b1;
      if (cap_last) cap_busy_q <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < ROWS - 1; k++)
      if ((sof_i && k == 0) || (cap_busy_q && cap_cnt_q == CW'(k)))
        qbuf_q[k] <= q_i;
  end

  // ---------------- phase A: Q2n = Q2 * 1/sqrt(N0) ----------------
  logic          a_act_q;
  logic [CW-1:0] a_cnt_q;
  cq_t           qa_q [ROWS][NT];
  logic [RW-1:0] ra_q;
  cv_t           ya_q [NR];
  cn_t           q2n_q [NT][NT], q2n_next [NT][NT];

  // Upper-triangle entries (row, column) of Q2 in scheduling order.
  localparam int unsigned OFF_M [6] = '{0, 0, 0, 1, 1, 2};
  localparam int unsigned OFF_I [6] = '{1, 2, 3, 2, 3, 3};

  always_comb begin
    logic signed [63:0] op0, op1, p0, p1;
    int m0, i0, m1, i1;
    q2n_next = q2n_q;
    if (int'(a_cnt_q) < 6) begin                 // one complex entry
      m0 = OFF_M[a_cnt_q]; i0 = OFF_I[a_cnt_q]; m1 = m0; i1 = i0;
      op0 = 64'(qa_q[NR+m0][i0].re);
      op1 = 64'(qa_q[NR+m0][i0].im);
    end else begin                               // two real diagonal entries
      m0 = 2 * (int'(a_cnt_q) - 6); i0 = m0; m1 = m0 + 1; i1 = m1;
      op0 = 64'(qa_q[NR+m0][i0].re);
      op1 = 64'(qa_q[NR+m1][i1].re);
    end
    p0 = op0 * 64'({1'b0, ra_q});
    p1 = op1 * 64'({1'b0, ra_q});
    if (int'(a_cnt_q) < 6) begin
      q2n_next[m0][i0].re = NW'(sat(rshr(p0, N0_SHIFT), NW));
      q2n_next[m0][i0].im = NW'(sat(rshr(p1, N0_SHIFT), NW));
    end else begin
      q2n_next[m0][i0].re = NW'(sat(rshr(p0, N0_SHIFT), NW));
      q2n_next[m0][i0].im = '0;
      q2n_next[m1][i1].re = NW'(sat(rshr(p1, N0_SHIFT), NW));
      q2n_next[m1][i1].im = '0;
    end
  end

  // ---------------- phase B: W = Q2n * Q1^* ----------------
  logic          b_act_q;
  logic [CW-1:0] b_cnt_q;
  cq_t           q1b_q [NR][NT];
  cn_t           q2nb_q [NT][NT];
  cv_t           yb_q [NR];
  cw_t           wb_q [NT][NR], w_next [NT][NR];

  // Operands per half column: two real diagonal terms (rm, ri) and three
  // complex terms (cm, ci), as (row of Q2n, column index i); the Q1 factor is
  // always conj(Q1[n][i]). Even clocks: rows 0 and 3, odd clocks: rows 1, 2.
  localparam int unsigned RM [2][2] = '{'{0, 3}, '{1, 2}};
  localparam int unsigned CM [2][3] = '{'{0, 0, 0}, '{1, 1, 2}};
  localparam int unsigned CI [2][3] = '{'{1, 2, 3}, '{2, 3, 3}};

  always_comb begin
    int n, h;
    logic signed [63:0] rr [2], rim [2], cr [3], ci [3];
    logic signed [63:0] s0r, s0i, s1r, s1i;
    w_next = wb_q;
    n = int'(b_cnt_q) >> 1;
    h = int'(b_cnt_q[0]);
    for (int t = 0; t < 2; t++) begin           // real d times conj(q)
      rr[t]  =  64'(q2nb_q[RM[h][t]][RM[h][t]].re) * 64'(q1b_q[n][RM[h][t]].re);
      rim[t] = -64'(q2nb_q[RM[h][t]][RM[h][t]].re) * 64'(q1b_q[n][RM[h][t]].im);
    end
    for (int t = 0; t < 3; t++)                 // complex a times conj(q)
      cmul3(64'(q2nb_q[CM[h][t]][CI[h][t]].re), 64'(q2nb_q[CM[h][t]][CI[h][t]].im),
            64'(q1b_q[n][CI[h][t]].re), -64'(q1b_q[n][CI[h][t]].im), cr[t], ci[t]);
    if (h == 0) begin
      s0r = rr[0] + cr[0] + cr[1] + cr[2];  s0i = rim[0] + ci[0] + ci[1] + ci[2];
      s1r = rr[1];                          s1i = rim[1];
    end else begin
      s0r = rr[0] + cr[0] + cr[1];          s0i = rim[0] + ci[0] + ci[1];
      s1r = rr[1] + cr[2];                  s1i = rim[1] + ci[2];
    end
    w_next[RM[h][0]][n].re = WW'(sat(rshr(s0r, W_SHIFT), WW));
    w_next[RM[h][0]][n].im = WW'(sat(rshr(s0i, W_SHIFT), WW));
    w_next[RM[h][1]][n].re = WW'(sat(rshr(s1r, W_SHIFT), WW));
    w_next[RM[h][1]][n].im = WW'(sat(rshr(s1i, W_SHIFT), WW));
  end

  // ---------------- phase C: y_hat = W * y ----------------
  logic          c_act_q;
  logic [CW-1:0] c_cnt_q;
  cw_t           wc_q [NT][NR];
  cv_t           yc_q [NR];
  logic signed [63:0] acc_re_q, acc_im_q;
  logic signed [63:0] yacc_re, yacc_im;
  cy_t           yh_q [NT], yh_next [NT];

  always_comb begin
    int m, n;
    logic signed [63:0] pr, pi;
    m = int'(c_cnt_q) >> 1;
    yacc_re = c_cnt_q[0] ? acc_re_q : 64'sd0;
    yacc_im = c_cnt_q[0] ? acc_im_q : 64'sd0;
    for (int t = 0; t < 2; t++) begin
      n = 2 * int'(c_cnt_q[0]) + t;
      cmul3(64'(wc_q[m][n].re), 64'(wc_q[m][n].im), 64'(yc_q[n].re), 64'(yc_q[n].im), pr, pi);
      yacc_re += pr;
      yacc_im += pi;
    end
    yh_next = yh_q;
    yh_next[m].re = YW'(sat(rshr(yacc_re, Y_SHIFT), YW));
    yh_next[m].im = YW'(sat(rshr(yacc_im, Y_SHIFT), YW));
  end

  // ---------------- phase sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_act_q <= 1'b0; a_cnt_q <= '0;
      b_act_q <= 1'b0; b_cnt_q <= '0;
      c_act_q <= 1'b0; c_cnt_q <= '0;
      out_valid_o <= 1'b0;
    end else begin
      out_valid_o <= 1'b0;
      if (cap_last) begin
        a_act_q <= 1'b1; a_cnt_q <= '0;
      end else if (a_act_q) begin
        a_cnt_q <= a_cnt_q + 1'b1;
        if (a_cnt_q == CW'(GAMMA - 1)) a_act_q <= 1'b0;
      end
      if (a_act_q && a_cnt_q == CW'(GAMMA - 1)) begin
        b_act_q <= 1'b1; b_cnt_q <= '0;
      end else if (b_act_q) begin
        b_cnt_q <= b_cnt_q + 1'b1;
        if (b_cnt_q == CW'(GAMMA - 1)) b_act_q <= 1'b0;
      end
      if (b_act_q && b_cnt_q == CW'(GAMMA - 1)) begin
        c_act_q <= 1'b1; c_cnt_q <= '0;
      end else if (c_act_q) begin
        c_cnt_q <= c_cnt_q + 1'b1;
        if (c_cnt_q == CW'(GAMMA - 1)) c_act_q <= 1'b0;
      end
      if (c_act_q && c_cnt_q == CW'(GAMMA - 1)) out_valid_o <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (cap_last) begin
      for (int k = 0; k < ROWS - 1; k++) qa_q[k] <= qbuf_q[k];
      qa_q[ROWS-1] <= q_i;
      ra_q <= recip_n0_i;
      ya_q <= y_i;
    end
    if (a_act_q) q2n_q <= q2n_next;
    if (a_act_q && a_cnt_q == CW'(GAMMA - 1)) begin
      for (int k = 0; k < NR; k++) q1b_q[k] <= qa_q[k];
      q2nb_q <= q2n_next;
      yb_q   <= ya_q;
    end
    if (b_act_q) wb_q <= w_next;
    if (b_act_q && b_cnt_q == CW'(GAMMA - 1)) begin
      wc_q <= w_next;
      yc_q <= yb_q;
    end
    if (c_act_q) begin
      acc_re_q <= yacc_re;
      acc_im_q <= yacc_im;
      yh_q     <= yh_next;
    end
    if (c_act_q && c_cnt_q == CW'(GAMMA - 1)) begin
      w_o    <= wc_q;
      yhat_o <= yh_next;
    end
  end

endmodule
