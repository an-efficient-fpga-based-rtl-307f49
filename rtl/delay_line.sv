// delay_line: fixed delay of DEPTH clocks for a data word and its valid flag.
//
// The "delay chain or RAM" element of the detector, used to line columns up
// with results that take longer to compute. Data sits in a circular buffer
// (one read and one write per clock, so it maps onto a two-port block RAM);
// the valid flag runs through a reset shift register so that nothing is
// flagged valid before real data has reached the output. Output appears
// exactly DEPTH clocks after input. DEPTH must be at least 2.
module delay_line #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_i,
  input  logic [W-1:0] d_i,
  output logic         valid_o,
  output logic [W-1:0] d_o
);

  localparam int unsigned AW = (DEPTH > 2) ? $clog2(DEPTH - 1) : 1;

  logic [W-1:0]     mem [DEPTH-1];
  logic [AW-1:0]    ptr_q;
  logic [DEPTH-1:0] vld_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q <= '0;
      vld_q <= '0;
    end else begin
      ptr_q <= (ptr_q == AW'(DEPTH - 2)) ? '0 : ptr_q + 1'b1;
      vld_q <= {vld_q[DEPTH-2:0], valid_i};
    end
  end

  // DEPTH-1 clocks through the buffer plus the output register.
  always_ff @(posedge clk) begin
    mem[ptr_q] <= d_i;
    d_o        <= mem[ptr_q];
  end

  assign valid_o = vld_q[DEPTH-1];

endmodule
