// mgs_stage1: first Gram-Schmidt column step with the multiplier-saving
// schedule that the sparse compound matrix allows.
//
// In the first step the lower half of A = [H ; sqrt(N0) I] is still a scaled
// identity: v1 has non-zeros only in rows 0..NR (row NR real), and each v_j,
// j = 2..4, is zero in rows NR..ROWS-1 except row NR+j-1. Hence
//   * ||v1||^2 needs the two norm multipliers in only NR+1 = 5 of 8 slots,
//   * u1 = v1/||v1|| is zero below row NR and real in row NR,
//   * r_j = u1^* v_j needs rows 0..NR-1 only: 4 of 8 slots of one complex
//     multiplier per column,
//   * the update v_j - r_j u1 changes rows 0..NR only.
// So the same complex multiplier that forms r_j in slots 0..3 (counted from
// u1's first element) computes r_j * u1[0..3] in slots 4..7, and the products
// r_j * u1[NR] (real u1[NR], 2 real products each) run on the norm
// multipliers in their three idle slots NR+1..ROWS-1. Compared with the
// generic mgs_stage this removes three complex multipliers, the saving the
// source design describes for this step. Rows NR+1..ROWS-1 of v_j pass
// through unchanged. The result is the same as mgs_stage's for inputs with
// this structure, and wrong for any other input: use this module for the
// first step only.
//
// Interface as mgs_stage with NV = NT-1. Timing: norm pulse LAT_NORM clocks
// after sof_i (held back to match the generic stages), u1 from LAT_R+1 clocks
// after sof_i, updated and rescaled columns STAGE1_P clocks after sof_i.
// The slot assignment (S1_PU, s1_row4_slot, S1_EOFF) is derived in mmse_pkg.
// Column streams must start on an 8-clock grid, as the top guarantees.
module mgs_stage1
  import mmse_pkg::*;
#(
  parameter int unsigned PAD = STAGE1_PAD  // extra clocks on the updated columns
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sof_i,
  input  cv_t            vi_i,
  input  cv_t            vj_i [NT-1],
  output logic           norm_valid_o,
  output logic [NSW-1:0] norm_o,
  input  logic [RW-1:0]  recip_i,
  output logic           u_sof_o,
  output cq_t            u_o,
  output logic           vj_sof_o,
  output cv_t            vj_o [NT-1]
);

  localparam int unsigned NV  = NT - 1;
  localparam int unsigned CW  = $clog2(GAMMA);
  localparam int unsigned RWD = DW + 2;

  // The schedule needs two uses of each complex multiplier per frame and one
  // idle norm-multiplier slot per remaining column.
  if (2 * NR > GAMMA || GAMMA - NR - 1 < NV) begin : g_bad_size
    $error("mgs_stage1: schedule needs 2*NR <= GAMMA and GAMMA-NR-1 >= NT-1");
  end

  // ---------------- slot counter, 0 at the first element of a column -------
  logic [CW-1:0] ph_q, ph;
  logic          frame_q;       // a column is in its 8 input slots
  assign ph = sof_i ? '0 : ph_q;

  // Slot relative to u1's first element, and to the output stream.
  logic [CW-1:0] q, e;
  assign q = ph - CW'(S1_PU);
  assign e = ph - CW'(S1_PU) - CW'(S1_EOFF);

  // ---------------- shared norm multipliers (2 real) ----------------
  logic signed [63:0] ma, mb;
  logic signed [63:0] ma_a, ma_b, mb_a, mb_b;
  logic signed [63:0] nacc_q;
  logic [NSW-1:0]     nsum_q;
  logic signed [RWD-1:0] rh_re_q [NV], rh_im_q [NV];   // r_j held for row NR
  logic signed [QW-1:0]  u4_q;                          // real u1[NR]
  cv_t                rw4_q [NV];                      // updated row NR

  always_comb begin
    if (int'(ph) <= int'(NR)) begin
      ma_a = 64'(vi_i.re); ma_b = 64'(vi_i.re);
      mb_a = 64'(vi_i.im); mb_b = 64'(vi_i.im);
    end else begin
      ma_a = 64'(rh_re_q[int'(ph) - NR - 1]); ma_b = 64'(u4_q);
      mb_a = 64'(rh_im_q[int'(ph) - NR - 1]); mb_b = 64'(u4_q);
    end
    ma = ma_a * ma_b;
    mb = mb_a * mb_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q         <= '0;
      frame_q      <= 1'b0;
      nacc_q       <= '0;
      nsum_q       <= '0;
      norm_valid_o <= 1'b0;
      norm_o       <= '0;
    end else begin
      ph_q <= ph + 1'b1;
      if (sof_i) frame_q <= 1'b1;
      else if (ph == CW'(GAMMA - 1)) frame_q <= 1'b0;
      if (int'(ph) <= int'(NR)) begin
        nacc_q <= ((ph == '0) ? 64'sd0 : nacc_q) + ma + mb;
        if (int'(ph) == int'(NR)) nsum_q <= NSW'(nacc_q + ma + mb);
      end
      norm_valid_o <= frame_q && ph == CW'(GAMMA - 1);
      if (ph == CW'(GAMMA - 1)) norm_o <= nsum_q;
    end
  end

  always_ff @(posedge clk) begin
    if (int'(ph) > int'(NR)) begin
      rw4_q[int'(ph) - NR - 1].re <= DW'(sat(-rshr(ma, QF), DW));
      rw4_q[int'(ph) - NR - 1].im <= DW'(sat(-rshr(mb, QF), DW));
    end
  end

  // ---------------- u1 = v1 / ||v1|| (2 real multipliers) ----------------
  logic vi_sof_d;
  cv_t  vi_d;
  delay_line #(.W($bits(cv_t)), .DEPTH(LAT_R)) u_vi_dly (
    .clk, .rst_n, .valid_i(sof_i), .d_i(vi_i), .valid_o(vi_sof_d), .d_o(vi_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_sof_o <= 1'b0;
      u_o     <= '0;
    end else begin
      u_sof_o <= vi_sof_d;
      u_o.re  <= QW'(sat(rshr(64'(vi_d.re) * 64'({1'b0, recip_i}), U_SHIFT), QW));
      u_o.im  <= QW'(sat(rshr(64'(vi_d.im) * 64'({1'b0, recip_i}), U_SHIFT), QW));
    end
  end

  // u1[0..NR-1] wait NR clocks for the second use of the complex multipliers.
  cq_t ubuf_q [NR];
  always_ff @(posedge clk) begin
    ubuf_q[0] <= u_o;
    for (int k = 1; k < NR; k++) ubuf_q[k] <= ubuf_q[k-1];
    if (q == CW'(NR)) u4_q <= u_o.re;
  end

  // ---------------- per column: one shared complex multiplier ------------
  localparam int unsigned PBW = S1_EOFF + GAMMA;   // pass-through taps
  logic sof_out_q [S1_EOFF + 1];
  cv_t  vout [NV];

  for (genvar j = 0; j < NV; j++) begin : g_col
    cv_t  vj_d;
    delay_line #(.W($bits(cv_t)), .DEPTH(LAT_R + 1)) u_vj_dly (
      .clk, .rst_n, .valid_i(sof_i), .d_i(vj_i[j]), .valid_o(), .d_o(vj_d)
    );

    cv_t vbuf_q [PBW];
    always_ff @(posedge clk) begin
      vbuf_q[0] <= vj_d;
      for (int k = 1; k < PBW; k++) vbuf_q[k] <= vbuf_q[k-1];
    end

    // Slots 0..NR-1: conj(u1[k]) * v_j[k]; slots NR..2NR-1: r_j * u1[k].
    logic signed [63:0] ar, ai, br, bi, pr, pi;
    logic signed [63:0] racc_q;
    logic signed [63:0] racc_i_q;
    logic signed [RWD-1:0] r_re_q, r_im_q;
    cv_t res_q [NR];

    always_comb begin
      if (int'(q) < int'(NR)) begin
        ar = 64'(u_o.re);  ai = -64'(u_o.im);
        br = 64'(vj_d.re); bi = 64'(vj_d.im);
      end else begin
        ar = 64'(r_re_q);  ai = 64'(r_im_q);
        br = 64'(ubuf_q[NR-1].re); bi = 64'(ubuf_q[NR-1].im);
      end
      cmul3(ar, ai, br, bi, pr, pi);
    end

    always_ff @(posedge clk) begin
      if (int'(q) < int'(NR)) begin
        racc_q   <= ((q == '0) ? 64'sd0 : racc_q) + pr;
        racc_i_q <= ((q == '0) ? 64'sd0 : racc_i_q) + pi;
        if (int'(q) == int'(NR) - 1) begin
          r_re_q <= RWD'(sat(rshr(racc_q + pr, QF), RWD));
          r_im_q <= RWD'(sat(rshr(racc_i_q + pi, QF), RWD));
        end
      end else if (int'(q) < 2 * int'(NR)) begin
        // v_j[k] entered the pass-through buffer NR clocks ago.
        res_q[int'(q) - NR].re <= DW'(sat(64'(vbuf_q[NR-1].re) - rshr(pr, QF), DW));
        res_q[int'(q) - NR].im <= DW'(sat(64'(vbuf_q[NR-1].im) - rshr(pi, QF), DW));
      end
      // r_j is held for the row-NR product in the norm multipliers' idle slots.
      if (q == CW'(NR)) begin
        rh_re_q[j] <= r_re_q;
        rh_im_q[j] <= r_im_q;
      end
    end

    // Output stream: element k leaves S1_EOFF + k clocks after u1[0] arrived.
    always_ff @(posedge clk) begin
      if (int'(e) < int'(NR))       vout[j] <= res_q[int'(e)];
      else if (int'(e) == int'(NR)) vout[j] <= rw4_q[j];
      else                          vout[j] <= vbuf_q[S1_EOFF - 1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= S1_EOFF; k++) sof_out_q[k] <= 1'b0;
    end else begin
      sof_out_q[0] <= u_sof_o;
      for (int k = 1; k <= S1_EOFF; k++) sof_out_q[k] <= sof_out_q[k-1];
    end
  end

  // ---------------- rescaling and pad ----------------
  logic sc_sof [NV];
  cv_t  sc     [NV];
  for (genvar j = 0; j < NV; j++) begin : g_scale
    dyn_scale u_scale (
      .clk, .rst_n, .sof_i(sof_out_q[S1_EOFF]), .d_i(vout[j]),
      .sof_o(sc_sof[j]), .d_o(sc[j]), .shift_o()
    );
  end

  if (PAD > 0) begin : g_pad
    cv_t  pipe_q [PAD][NV];
    logic psof_q [PAD];
    always_ff @(posedge clk) begin
      pipe_q[0] <= sc;
      for (int s = 1; s < PAD; s++) pipe_q[s] <= pipe_q[s-1];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < PAD; s++) psof_q[s] <= 1'b0;
      end else begin
        psof_q[0] <= sc_sof[0];
        for (int s = 1; s < PAD; s++) psof_q[s] <= psof_q[s-1];
      end
    end
    assign vj_o     = pipe_q[PAD-1];
    assign vj_sof_o = psof_q[PAD-1];
  end else begin : g_nopad
    assign vj_o     = sc;
    assign vj_sof_o = sc_sof[0];
  end

endmodule
