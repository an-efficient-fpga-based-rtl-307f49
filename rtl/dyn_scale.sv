// dyn_scale: dynamic power-of-two scaling of one column of the compound matrix.
//
// Implements steps (d)-(g) of the scaled modified Gram-Schmidt algorithm: a
// column is doubled while its largest |Re| or |Im| is below 2^SCALE_L and
// halved while it is above 2^SCALE_U. Scaling a column by any constant leaves
// Q unchanged, so the factor is not needed downstream; it is still exported as
// shift_o for observation. The loop is replaced by one shift whose amount is
// found from the column maximum, which gives the same result as the iterative
// doubling/halving of the algorithm. An all-zero column is passed unchanged.
//
// Interface: a column streams in as GAMMA elements on consecutive clocks,
// element 0 flagged by sof_i. The scaled column streams out LAT_SCALE = GAMMA+1
// clocks later with sof_o on its element 0. Back-to-back columns are allowed.
// Halving is an arithmetic shift (round toward minus infinity), as a hardware
// "v/2" would be; the bounds themselves are this design's choice (the source
// leaves L and U open).
module dyn_scale
  import mmse_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sof_i,
  input  cv_t         d_i,
  output logic        sof_o,
  output cv_t         d_o,
  output logic signed [5:0] shift_o   // +n: scaled by 2^n, -n: by 2^-n
);

  localparam int unsigned CW = $clog2(GAMMA);

  logic [CW-1:0]  cnt_q;
  logic           busy_q;
  logic [DW-1:0]  max_q;
  logic [DW-1:0]  max_now;
  cv_t            buf_q [GAMMA];
  logic [GAMMA-1:0] sof_dly_q;
  logic signed [5:0] shift_q;

  function automatic logic [DW-1:0] absv(input logic signed [DW-1:0] x);
    logic signed [DW:0] t;
    t = (x < 0) ? -{x[DW-1], x} : {x[DW-1], x};
    return t[DW-1:0] | {DW{t[DW]}};
  endfunction

  // Shift that brings m into [2^L, 2^U] following steps (d)-(g).
  function automatic logic signed [5:0] shift_for(input logic [DW-1:0] m);
    logic [DW+DW-1:0] t;
    int s;
    s = 0;
    t = {{DW{1'b0}}, m};
    if (m == '0) return '0;
    for (int k = 0; k < DW; k++)
      if (t < (1 << SCALE_L)) begin t = t << 1; s++; end
    for (int k = 0; k < DW; k++)
      if (t > (1 << SCALE_U)) begin t = t >> 1; s--; end
    return 6'(s);
  endfunction

  always_comb begin
    max_now = (sof_i || !busy_q) ? '0 : max_q;
    if (absv(d_i.re) > max_now) max_now = absv(d_i.re);
    if (absv(d_i.im) > max_now) max_now = absv(d_i.im);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      busy_q    <= 1'b0;
      max_q     <= '0;
      shift_q   <= '0;
      sof_dly_q <= '0;
      sof_o     <= 1'b0;
      d_o       <= '0;
    end else begin
      if (sof_i) begin
        cnt_q  <= CW'(1);
        busy_q <= 1'b1;
      end else if (busy_q) begin
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == CW'(GAMMA - 1)) busy_q <= 1'b0;
      end
      max_q <= max_now;
      if (busy_q && cnt_q == CW'(GAMMA - 1)) shift_q <= shift_for(max_now);
      sof_dly_q <= {sof_dly_q[GAMMA-2:0], sof_i};
      sof_o     <= sof_dly_q[GAMMA-1];
      if (shift_q >= 0) begin
        d_o.re <= buf_q[GAMMA-1].re <<< shift_q;
        d_o.im <= buf_q[GAMMA-1].im <<< shift_q;
      end else begin
        d_o.re <= buf_q[GAMMA-1].re >>> (-shift_q);
        d_o.im <= buf_q[GAMMA-1].im >>> (-shift_q);
      end
    end
  end

  // Data buffer: a plain shift chain without reset.
  always_ff @(posedge clk) begin
    buf_q[0] <= d_i;
    for (int k = 1; k < GAMMA; k++) buf_q[k] <= buf_q[k-1];
  end

  assign shift_o = shift_q;

endmodule
