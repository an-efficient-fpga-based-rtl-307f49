// mmse_detector: fully pipelined 4x4 square-root linear MMSE MIMO detector.
//
// For each channel instance (H, sqrt(N0), y) it computes the MMSE weight
// matrix W = (H^*H + N0 I)^-1 H^* and the detected vector y_hat = W y without
// any matrix inversion: the 8x4 compound matrix A = [H ; sqrt(N0) I] is
// QR-decomposed by a dynamically scaled modified Gram-Schmidt, and because
// R^-1 = Q2 / sqrt(N0), W = (Q2 / sqrt(N0)) Q1^*.
//
// Structure (following the source design's block diagram):
//   formatter      builds the columns of A and streams each as 8 elements on
//                  8 consecutive clocks; one instance per GAMMA = 8 clocks
//   dyn_scale x4   scales the input columns
//   mgs_stage1     column step 1 with shared multipliers (sparse A)
//   mgs_stage x3   column steps 2..4: norm, u_i, updates v_j, rescaling
//   sqrt_pipe      one square root shared by the four norms (tagged)
//   recip_pipe     one reciprocal shared by the four norms and sqrt(N0)
//   recip_q        demultiplexed reciprocal registers, one per consumer
//   delay_line     delays that line up u_1..u_4, y and sqrt(N0)
//   weight_detect  Q2/sqrt(N0), W and y_hat
// Because every unit has a fixed latency and instances may only start on an
// 8-clock boundary, the shared units never see two requests in one clock;
// assertions check this.
//
// Interface: in_ready is high one clock in eight; an instance is taken when
// in_valid and in_ready are both high. h_i[r][c] is row r, column c of H.
// All of H, y and sqrt(N0) use 16-bit two's complement with 12 fraction bits
// (sqrt(N0) must be positive). out_valid pulses LATENCY clocks after the
// instance was taken (see mmse_pkg), with W (18-bit, 12 fraction bits) and
// y_hat (18-bit, 12 fraction bits) held on the outputs until the next result.
// Throughput is one instance per 8 clocks, as in the source design; the exact
// latency differs from it because the internal cores are this design's own.
module mmse_detector
  import mmse_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  cv_t           h_i [NR][NT],
  input  logic [DW-1:0] sqrt_n0_i,
  input  cv_t           y_i [NR],
  output logic          out_valid,
  output cw_t           w_o [NT][NR],
  output cy_t           yhat_o [NT]
);

  localparam int unsigned CW = $clog2(GAMMA);

  // ---------------- formatter: columns of [H ; sqrt(N0) I] ----------------
  logic [CW-1:0] slot_q;
  logic          act_q;
  cv_t           h_q [NR][NT];
  logic [DW-1:0] n0_q;
  cv_t           y_q [NR];
  logic          f_sof;
  cv_t           f_col [NT];

  assign in_ready = (slot_q == CW'(GAMMA - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q <= '0;
      act_q  <= 1'b0;
    end else begin
      slot_q <= slot_q + 1'b1;
      if (in_ready) act_q <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (in_ready && in_valid) begin
      h_q  <= h_i;
      n0_q <= sqrt_n0_i;
      y_q  <= y_i;
    end
  end

  always_comb begin
    f_sof = act_q && slot_q == '0;
    for (int c = 0; c < NT; c++) begin
      if (int'(slot_q) < NR)
        f_col[c] = h_q[slot_q[$clog2(NR)-1:0]][c];
      else if (int'(slot_q) - NR == c)
        f_col[c] = '{re: n0_q, im: '0};
      else
        f_col[c] = '0;
    end
  end

  // ---------------- input scaling ----------------
  logic sc_sof [NT];
  cv_t  col_s  [NT][NT];     // col_s[i][j]: column j entering stage i
  logic sof_s  [NT];

  for (genvar c = 0; c < NT; c++) begin : g_in_scale
    logic signed [5:0] shift;
    dyn_scale u_scale (
      .clk, .rst_n, .sof_i(f_sof), .d_i(f_col[c]),
      .sof_o(sc_sof[c]), .d_o(col_s[0][c]), .shift_o(shift)
    );
  end
  assign sof_s[0] = sc_sof[0];

  // ---------------- Gram-Schmidt stages ----------------
  logic           norm_vld [NT];
  logic [NSW-1:0] norm     [NT];
  logic [RW-1:0]  recip_q  [NT+1];
  logic           u_sof    [NT];
  cq_t            u        [NT];

  for (genvar i = 0; i < NT; i++) begin : g_stage
    localparam int unsigned NV = NT - 1 - i;
    cv_t  vj_in  [NV > 0 ? NV : 1];
    cv_t  vj_out [NV > 0 ? NV : 1];
    logic vj_sof;
    for (genvar j = 0; j < (NV > 0 ? NV : 1); j++) begin : g_in
      if (NV > 0) begin : g_real
        assign vj_in[j] = col_s[i][i+1+j];
      end else begin : g_none
        assign vj_in[j] = '0;
      end
    end
    if (i == 0) begin : g_first
      // The first step sees the sparse lower half of A and shares multipliers.
      mgs_stage1 u_stage (
        .clk, .rst_n, .sof_i(sof_s[i]), .vi_i(col_s[i][i]), .vj_i(vj_in),
        .norm_valid_o(norm_vld[i]), .norm_o(norm[i]), .recip_i(recip_q[i]),
        .u_sof_o(u_sof[i]), .u_o(u[i]), .vj_sof_o(vj_sof), .vj_o(vj_out)
      );
    end else begin : g_gen
      mgs_stage #(.NV(NV)) u_stage (
        .clk, .rst_n, .sof_i(sof_s[i]), .vi_i(col_s[i][i]), .vj_i(vj_in),
        .norm_valid_o(norm_vld[i]), .norm_o(norm[i]), .recip_i(recip_q[i]),
        .u_sof_o(u_sof[i]), .u_o(u[i]), .vj_sof_o(vj_sof), .vj_o(vj_out)
      );
    end
    if (i < NT - 1) begin : g_fwd
      assign sof_s[i+1] = vj_sof;
      for (genvar j = 0; j < NT; j++) begin : g_col
        if (j > i) begin : g_used
          assign col_s[i+1][j] = vj_out[j-i-1];
        end else begin : g_zero
          assign col_s[i+1][j] = '0;
        end
      end
    end
  end

  // ---------------- shared square root and reciprocal ----------------
  logic            sq_vld;
  logic [TAGW-1:0] sq_tag;
  logic [NSW-1:0]  sq_x;
  logic            rt_vld;
  logic [TAGW-1:0] rt_tag;
  logic [RTW-1:0]  rt;

  always_comb begin
    sq_vld = 1'b0;
    sq_tag = '0;
    sq_x   = '0;
    for (int i = 0; i < NT; i++)
      if (norm_vld[i]) begin
        sq_vld = 1'b1;
        sq_tag = TAGW'(i);
        sq_x   = norm[i];
      end
  end

  sqrt_pipe #(.IW(SIW), .TW(TAGW)) u_sqrt (
    .clk, .rst_n, .valid_i(sq_vld), .tag_i(sq_tag), .x_i({sq_x, {(2*SF){1'b0}}}),
    .valid_o(rt_vld), .tag_o(rt_tag), .root_o(rt)
  );

  // sqrt(N0) reaches the divider in a slot that no norm uses.
  logic          n0_vld;
  logic [DW-1:0] n0_d;
  delay_line #(.W(DW), .DEPTH(T_N0)) u_n0_dly (
    .clk, .rst_n, .valid_i(f_sof), .d_i(n0_q), .valid_o(n0_vld), .d_o(n0_d)
  );

  logic            dv_vld;
  logic [TAGW-1:0] dv_tag;
  logic [RTW-1:0]  dv_x;
  always_comb begin
    dv_vld = rt_vld | n0_vld;
    dv_tag = rt_vld ? rt_tag : TAG_N0;
    dv_x   = rt_vld ? rt : RTW'(n0_d);
  end

  logic            rc_vld;
  logic [TAGW-1:0] rc_tag;
  logic [RW-1:0]   rc;
  recip_pipe #(.XW(RTW), .RFB(RF), .OW(RW), .TW(TAGW)) u_recip (
    .clk, .rst_n, .valid_i(dv_vld), .tag_i(dv_tag), .x_i(dv_x),
    .valid_o(rc_vld), .tag_o(rc_tag), .q_o(rc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= NT; k++) recip_q[k] <= '0;
    end else if (rc_vld) begin
      recip_q[rc_tag] <= rc;
    end
  end

  // ---------------- alignment of u_1..u_4 and y ----------------
  cq_t ua [NT];
  for (genvar i = 0; i < NT - 1; i++) begin : g_ualign
    logic unused_vld;
    delay_line #(.W($bits(cq_t)), .DEPTH(T_U4 - t_u(i))) u_dly (
      .clk, .rst_n, .valid_i(u_sof[i]), .d_i(u[i]), .valid_o(unused_vld), .d_o(ua[i])
    );
  end
  assign ua[NT-1] = u[NT-1];

  logic yd_vld;
  logic [NR*$bits(cv_t)-1:0] yd_flat;
  cv_t  yd [NR];
  delay_line #(.W(NR * $bits(cv_t)), .DEPTH(T_U4)) u_y_dly (
    .clk, .rst_n, .valid_i(f_sof), .d_i({>>{y_q}}), .valid_o(yd_vld), .d_o(yd_flat)
  );
  assign yd = {>>{yd_flat}};

  // ---------------- W_MMSE and detection ----------------
  weight_detect u_wdet (
    .clk, .rst_n, .sof_i(u_sof[NT-1]), .q_i(ua), .recip_n0_i(recip_q[NT]),
    .y_i(yd), .out_valid_o(out_valid), .w_o, .yhat_o
  );

  // ---------------- rules of the shared units ----------------
  a_norm_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({norm_vld[3], norm_vld[2], norm_vld[1], norm_vld[0]}))
    else $error("two norms reached the shared square root in one clock");
  a_div_free: assert property (@(posedge clk) disable iff (!rst_n)
    !(rt_vld && n0_vld))
    else $error("sqrt(N0) collided with a norm at the shared divider");

endmodule
