// tb_sqrt_pipe: streams one random radicand per clock (plus corner values)
// into the pipelined square root and checks r*r <= x < (r+1)*(r+1), the tag
// and the IW/2 clock latency.
module tb_sqrt_pipe;

  localparam int IW = 36, TW = 3, OW = IW / 2, N = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic valid_i, valid_o;
  logic [TW-1:0] tag_i, tag_o;
  logic [IW-1:0] x_i;
  logic [OW-1:0] root_o;

  sqrt_pipe #(.IW(IW), .TW(TW)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xs [N];
  int     ts [N];
  int     tin [N];

  initial begin
    valid_i = 1'b0; tag_i = '0; x_i = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      longint x;
      case (n)
        0: x = 0;
        1: x = 1;
        2: x = (64'd1 << IW) - 1;
        3: x = 64'd1 << (IW - 2);
        default: x = {$urandom, $urandom} & ((64'd1 << ($urandom_range(1, IW))) - 1);
      endcase
      @(negedge clk);
      if (n % 50 == 7) begin valid_i = 1'b0; @(negedge clk); end
      valid_i = 1'b1;
      x_i = IW'(x);
      tag_i = TW'(n);
      xs[n] = x; ts[n] = n % (1 << TW); tin[n] = cyc;
    end
    @(negedge clk);
    valid_i = 1'b0;
  end

  int got = 0;
  always @(posedge clk) if (rst_n && valid_o) begin
    longint r;
    r = longint'(root_o);
    checks += 3;
    if (!(r * r <= xs[got] && (r + 1) * (r + 1) > xs[got])) begin
      failures++;
      $display("sqrt(%0d) gave %0d", xs[got], r);
    end
    if (int'(tag_o) != ts[got]) failures++;
    if (cyc - tin[got] != OW) begin
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
