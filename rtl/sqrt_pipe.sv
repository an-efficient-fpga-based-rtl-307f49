// sqrt_pipe: fully pipelined integer square root, floor(sqrt(x)).
//
// Stands in for the vendor square-root core of the source design, whose
// insides are not given; this is a plain digit-by-digit (restoring) square
// root with one result bit per pipeline stage. It accepts one operand per
// clock and returns floor(sqrt(x_i)) OW = IW/2 clocks later, together with
// the tag that entered with the operand (used to route shared results).
module sqrt_pipe #(
  parameter int unsigned IW   = 36,   // radicand width (even)
  parameter int unsigned TW   = 3     // tag width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_i,
  input  logic [TW-1:0] tag_i,
  input  logic [IW-1:0] x_i,
  output logic          valid_o,
  output logic [TW-1:0] tag_o,
  output logic [IW/2-1:0] root_o
);

  localparam int unsigned OW = IW / 2;

  // Per stage: remaining radicand bits, partial remainder and partial root.
  logic [IW-1:0]   x_q   [OW];
  logic [OW+1:0]   rem_q [OW];
  logic [OW-1:0]   root_q[OW];
  logic [OW-1:0]   vld_q;
  logic [TW-1:0]   tag_q [OW];

  // One step: bring down two radicand bits and try to subtract 4*root+1.
  function automatic void step(input  logic [IW-1:0] x, input logic [OW+1:0] rem,
                               input  logic [OW-1:0] root,
                               output logic [IW-1:0] xn, output logic [OW+1:0] remn,
                               output logic [OW-1:0] rootn);
    logic [OW+3:0] r2, trial;
    r2    = {rem, x[IW-1 -: 2]};
    trial = {2'b00, root, 2'b01};
    if (r2 >= trial) begin
      remn  = (OW+2)'(r2 - trial);
      rootn = {root[OW-2:0], 1'b1};
    end else begin
      remn  = (OW+2)'(r2);
      rootn = {root[OW-2:0], 1'b0};
    end
    xn = x << 2;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
    end else begin
      vld_q <= {vld_q[OW-2:0], valid_i};
    end
  end

  always_ff @(posedge clk) begin
    logic [IW-1:0] xn;
    logic [OW+1:0] remn;
    logic [OW-1:0] rootn;
    step(x_i, '0, '0, xn, remn, rootn);
    x_q[0] <= xn; rem_q[0] <= remn; root_q[0] <= rootn; tag_q[0] <= tag_i;
    for (int s = 1; s < OW; s++) begin
      step(x_q[s-1], rem_q[s-1], root_q[s-1], xn, remn, rootn);
      x_q[s] <= xn; rem_q[s] <= remn; root_q[s] <= rootn; tag_q[s] <= tag_q[s-1];
    end
  end

  assign valid_o = vld_q[OW-1];
  assign tag_o   = tag_q[OW-1];
  assign root_o  = root_q[OW-1];

endmodule
