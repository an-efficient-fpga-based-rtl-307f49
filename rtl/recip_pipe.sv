// recip_pipe: fully pipelined reciprocal, q = floor(2^RFB / x), saturating.
//
// Stands in for the vendor divider core of the source design, whose insides
// are not given. It is a restoring long division of the constant 2^RFB by x,
// one quotient bit per stage, RFB+1 stages, so it accepts one operand per
// clock and answers RFB+1 clocks later with the tag that came in with x.
// Quotients above 2^OW-1, including x = 0, saturate to 2^OW-1.
module recip_pipe #(
  parameter int unsigned XW  = 18,  // divisor width
  parameter int unsigned RFB = 34,  // q = 2^RFB / x
  parameter int unsigned OW  = 32,  // quotient width after saturation
  parameter int unsigned TW  = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_i,
  input  logic [TW-1:0] tag_i,
  input  logic [XW-1:0] x_i,
  output logic          valid_o,
  output logic [TW-1:0] tag_o,
  output logic [OW-1:0] q_o
);

  localparam int unsigned NS = RFB + 1;     // quotient bits of 2^RFB / x, x >= 1

  logic [XW-1:0] x_q   [NS];
  logic [XW:0]   rem_q [NS];
  logic [NS-1:0] quo_q [NS];
  logic [TW-1:0] tag_q [NS];
  logic [NS-1:0] vld_q;

  // Dividend bit fed to stage s: 2^RFB has its single one in the first stage.
  function automatic void step(input logic [XW-1:0] x, input logic [XW:0] rem,
                               input logic [NS-1:0] quo, input logic dbit,
                               output logic [XW:0] remn, output logic [NS-1:0] quon);
    logic [XW+1:0] r2;
    r2 = {rem, dbit};
    if (x != '0 && r2 >= {2'b00, x}) begin
      remn = (XW+1)'(r2 - {2'b00, x});
      quon = {quo[NS-2:0], 1'b1};
    end else begin
      remn = (XW+1)'(r2);
      quon = {quo[NS-2:0], 1'b0};
    end
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[NS-2:0], valid_i};
  end

  always_ff @(posedge clk) begin
    logic [XW:0]   remn;
    logic [NS-1:0] quon;
    step(x_i, '0, '0, 1'b1, remn, quon);
    x_q[0] <= x_i; rem_q[0] <= remn; quo_q[0] <= quon; tag_q[0] <= tag_i;
    for (int s = 1; s < NS; s++) begin
      step(x_q[s-1], rem_q[s-1], quo_q[s-1], 1'b0, remn, quon);
      x_q[s] <= x_q[s-1]; rem_q[s] <= remn; quo_q[s] <= quon; tag_q[s] <= tag_q[s-1];
    end
  end

  always_comb begin
    if (x_q[NS-1] == '0 || quo_q[NS-1] > NS'({OW{1'b1}})) q_o = '1;
    else                                                q_o = OW'(quo_q[NS-1]);
  end
  assign valid_o = vld_q[NS-1];
  assign tag_o   = tag_q[NS-1];

endmodule
