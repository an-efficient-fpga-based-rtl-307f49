// tb_delay_line: pushes a random word and a random valid flag every clock
// through delay lines of several depths and checks that each comes out
// exactly DEPTH clocks later, and that nothing is valid before that.
module tb_delay_line;

  localparam int W = 20, N = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         v_in;
  logic [W-1:0] d_in;
  logic         v2, v3, v9, v81;
  logic [W-1:0] d2, d3, d9, d81;

  delay_line #(.W(W), .DEPTH(2))  u2  (.clk, .rst_n, .valid_i(v_in), .d_i(d_in), .valid_o(v2),  .d_o(d2));
  delay_line #(.W(W), .DEPTH(3))  u3  (.clk, .rst_n, .valid_i(v_in), .d_i(d_in), .valid_o(v3),  .d_o(d3));
  delay_line #(.W(W), .DEPTH(9))  u9  (.clk, .rst_n, .valid_i(v_in), .d_i(d_in), .valid_o(v9),  .d_o(d9));
  delay_line #(.W(W), .DEPTH(81)) u81 (.clk, .rst_n, .valid_i(v_in), .d_i(d_in), .valid_o(v81), .d_o(d81));

  int checks = 0, failures = 0, cyc = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] hist_d [N];
  logic         hist_v [N];

  task automatic chk(int depth, logic v, logic [W-1:0] d);
    int idx;
    idx = cyc - depth;
    checks++;
    if (idx < 0) begin
      if (v) begin failures++; $display("depth %0d valid before data", depth); end
    end else begin
      if (v != hist_v[idx]) begin failures++; $display("depth %0d valid mismatch at %0d", depth, cyc); end
      else if (v && d != hist_d[idx]) begin
        failures++; $display("depth %0d data mismatch at %0d", depth, cyc);
      end
    end
  endtask

  initial begin
    v_in = 1'b0; d_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (cyc = 0; cyc < N; cyc++) begin
      v_in = ($urandom_range(0, 3) != 0);
      d_in = W'($urandom);
      hist_v[cyc] = v_in;
      hist_d[cyc] = d_in;
      @(posedge clk);
      #1;
      // Outputs now show what entered DEPTH-1 iterations earlier plus this edge.
      cyc++;
      chk(2, v2, d2); chk(3, v3, d3); chk(9, v9, d9); chk(81, v81, d81);
      cyc--;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
