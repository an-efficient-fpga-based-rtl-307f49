// norm_sq: squared Euclidean norm ||v||^2 of one 8-element complex column.
//
// Time-shared over GAMMA clocks: each clock one element arrives and its
// Re^2 + Im^2 is added to an accumulator, so the unit needs two real
// multipliers, as in the source design. The sum of a column is presented on
// nsq_o with a one-clock valid_o pulse LAT_NORM = GAMMA clocks after sof_i.
// Columns may follow back to back. The input is expected to be scaled by
// dyn_scale, so the sum fits NSW bits without overflow.
module norm_sq
  import mmse_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sof_i,
  input  cv_t            d_i,
  output logic           valid_o,
  output logic [NSW-1:0] nsq_o
);

  localparam int unsigned CW = $clog2(GAMMA);

  logic [CW-1:0]  cnt_q;
  logic           busy_q;
  logic [NSW-1:0] acc_q;
  logic [NSW-1:0] sq, acc_in;
  logic signed [2*DW-1:0] pre, pim;

  always_comb begin
    pre    = d_i.re * d_i.re;
    pim    = d_i.im * d_i.im;
    sq     = NSW'(unsigned'(pre)) + NSW'(unsigned'(pim));
    acc_in = (sof_i ? '0 : acc_q) + sq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      busy_q  <= 1'b0;
      acc_q   <= '0;
      valid_o <= 1'b0;
      nsq_o   <= '0;
    end else begin
      valid_o <= 1'b0;
      if (sof_i) begin
        cnt_q  <= CW'(1);
        busy_q <= 1'b1;
        acc_q  <= acc_in;
      end else if (busy_q) begin
        cnt_q <= cnt_q + 1'b1;
        acc_q <= acc_in;
        if (cnt_q == CW'(GAMMA - 1)) begin
          busy_q  <= 1'b0;
          valid_o <= 1'b1;
          nsq_o   <= acc_in;
        end
      end
    end
  end

endmodule
