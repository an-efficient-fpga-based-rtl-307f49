// tb_recip_pipe: streams one random divisor per clock into the pipelined
// reciprocal and checks q = floor(2^34 / x) with saturation to 32 bits
// (x = 0 and small x saturate), the tag and the RFB+1 clock latency.
module tb_recip_pipe;

  localparam int XW = 18, RFB = 34, OW = 32, TW = 3, N = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic valid_i, valid_o;
  logic [TW-1:0] tag_i, tag_o;
  logic [XW-1:0] x_i;
  logic [OW-1:0] q_o;

  recip_pipe #(.XW(XW), .RFB(RFB), .OW(OW), .TW(TW)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xs [N];
  int ts [N], tin [N];

  initial begin
    valid_i = 1'b0; tag_i = '0; x_i = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      longint x;
      case (n)
        0: x = 0;
        1: x = 1;
        2: x = 4;
        3: x = 5;
        4: x = (1 << XW) - 1;
        default: x = $urandom_range(1, (1 << XW) - 1) >> $urandom_range(0, XW - 1);
      endcase
      @(negedge clk);
      if (n % 40 == 9) begin valid_i = 1'b0; @(negedge clk); end
      valid_i = 1'b1;
      x_i = XW'(x);
      tag_i = TW'(n);
      xs[n] = x; ts[n] = n % (1 << TW); tin[n] = cyc;
    end
    @(negedge clk);
    valid_i = 1'b0;
  end

  int got = 0;
  always @(posedge clk) if (rst_n && valid_o) begin
    longint e;
    e = (xs[got] == 0) ? ((64'd1 << OW) - 1) : ((64'd1 << RFB) / xs[got]);
    if (e > (64'd1 << OW) - 1) e = (64'd1 << OW) - 1;
    checks += 3;
    if (longint'(q_o) != e) begin
      failures++;
      $display("2^%0d/%0d gave %0d expected %0d", RFB, xs[got], q_o, e);
    end
    if (int'(tag_o) != ts[got]) failures++;
    if (cyc - tin[got] != RFB + 1) begin
      failures++;
      $display("latency %0d", cyc - tin[got]);
    end
    got++;
  end

  initial begin
    wait (got == N);
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
