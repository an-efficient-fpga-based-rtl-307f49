// mgs_stage: one column step i of the scaled modified Gram-Schmidt QR.
//
// Takes the (already scaled) column v_i and the NV columns still to be
// orthogonalised, v_{i+1}..v_{NT}, all streaming in step, one element per
// clock. It
//   * computes ||v_i||^2 (norm_sq) and hands it to the shared square-root /
//     reciprocal unit outside (norm_valid_o / norm_o),
//   * delays v_i until 1/||v_i|| comes back on recip_i (held constant for the
//     GAMMA clocks of the column) and forms u_i = v_i / ||v_i|| with two real
//     multipliers,
//   * updates every remaining column, v_j := v_j - (u_i^* v_j) u_i
//     (proj_update), and rescales the result (dyn_scale), as in the figure of
//     the source design where each update output passes a "Scale" block.
// Timing: u_i leaves LAT_R+1 clocks after sof_i, the updated columns leave
// STAGE_P clocks after sof_i, which is exactly when the next stage expects
// them (STAGE_P = the generic stage period). PAD adds clocks when needed to
// keep the norm results of the four stages in different clock slots of the
// shared unit. The detector uses this module for steps 2..NT; step 1, whose
// input is sparse, uses mgs_stage1, which needs fewer multipliers.
module mgs_stage
  import mmse_pkg::*;
#(
  parameter int unsigned NV  = 3,          // columns left after this one
  parameter int unsigned PAD = STAGE_PAD   // extra clocks on the updated columns
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sof_i,
  input  cv_t            vi_i,
  input  cv_t            vj_i [NV > 0 ? NV : 1],
  output logic           norm_valid_o,
  output logic [NSW-1:0] norm_o,
  input  logic [RW-1:0]  recip_i,
  output logic           u_sof_o,
  output cq_t            u_o,
  output logic           vj_sof_o,
  output cv_t            vj_o [NV > 0 ? NV : 1]
);

  // ||v_i||^2 to the shared unit.
  norm_sq u_norm (
    .clk, .rst_n, .sof_i, .d_i(vi_i), .valid_o(norm_valid_o), .nsq_o(norm_o)
  );

  // v_i waits for its reciprocal norm.
  logic vi_sof_d;
  cv_t  vi_d;
  delay_line #(.W($bits(cv_t)), .DEPTH(LAT_R)) u_vi_dly (
    .clk, .rst_n, .valid_i(sof_i), .d_i(vi_i), .valid_o(vi_sof_d), .d_o(vi_d)
  );

  // u_i = v_i * (2^RF / (||v_i|| * 2^SF)) >> U_SHIFT.
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

  if (NV > 0) begin : g_upd
    logic vj_sof_d [NV];
    cv_t  vj_d     [NV];
    logic pj_sof   [NV];
    cv_t  pj       [NV];
    logic sc_sof   [NV];
    cv_t  sc       [NV];
    for (genvar j = 0; j < NV; j++) begin : g_col
      delay_line #(.W($bits(cv_t)), .DEPTH(LAT_R + 1)) u_vj_dly (
        .clk, .rst_n, .valid_i(sof_i), .d_i(vj_i[j]), .valid_o(vj_sof_d[j]), .d_o(vj_d[j])
      );
      proj_update u_proj (
        .clk, .rst_n, .sof_i(vj_sof_d[j]), .u_i(u_o), .v_i(vj_d[j]),
        .sof_o(pj_sof[j]), .v_o(pj[j])
      );
      dyn_scale u_scale (
        .clk, .rst_n, .sof_i(pj_sof[j]), .d_i(pj[j]),
        .sof_o(sc_sof[j]), .d_o(sc[j]), .shift_o()
      );
    end
    // Optional pad clocks (see STAGE_PAD in mmse_pkg).
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
  end else begin : g_last
    assign vj_sof_o = 1'b0;
    assign vj_o[0]  = '0;
    logic unused;
    assign unused = ^vj_i[0];
  end

endmodule
