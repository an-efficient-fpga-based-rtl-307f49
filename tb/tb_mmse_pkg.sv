// tb_mmse_pkg: checks the shared arithmetic helpers and the derived schedule
// of the detector package.
//
// Arithmetic: rshr (round half up) against floor(x / 2^sh + 0.5) in floating
// point, sat against explicit bounds, and cmul3 (3-multiplication complex
// product) against the 4-multiplication form, on random operands.
// Schedule: the four norm results of one instance reach the shared square
// root in distinct slots modulo GAMMA; the pads achieving this have the least
// added latency (brute force over all pad pairs); the sqrt(N0) request meets
// no norm at the divider and its result arrives in the capture frame of the
// weight stage; the first stage's output alignment S1_EOFF leaves every
// result row ready and none overwritten; the u alignment delays are valid
// delay-line depths; and the latency adds up.
module tb_mmse_pkg;
  import mmse_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint rnd(int bits);
    longint v;
    v = longint'({$urandom, $urandom});
    return v >>> (64 - bits);
  endfunction

  // Slots of the norm pulses for given pads, as the pipeline produces them.
  function automatic bit slots_ok(int unsigned p1, int unsigned p);
    int unsigned s [NT];
    s[0] = 0;
    for (int i = 1; i < NT; i++) s[i] = s[i-1] + ((i == 1) ? S1_RAW + p1 : STAGE_RAW + p);
    for (int a = 0; a < NT; a++)
      for (int b = a + 1; b < NT; b++)
        if (s[a] % GAMMA == s[b] % GAMMA) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    @(posedge clk);
    // ---- rshr ----
    for (int n = 0; n < 2000; n++) begin
      longint x;
      int sh;
      x  = rnd(40);
      sh = $urandom_range(1, 24);
      expect_eq("rshr", rshr(x, sh), longint'($floor($itor(x) / (2.0 ** sh) + 0.5)));
    end
    // ---- sat ----
    for (int n = 0; n < 2000; n++) begin
      longint x, e;
      int w;
      x = rnd(24);
      w = $urandom_range(8, 20);
      e = x;
      if (e > (longint'(1) << (w - 1)) - 1) e = (longint'(1) << (w - 1)) - 1;
      if (e < -(longint'(1) << (w - 1))) e = -(longint'(1) << (w - 1));
      expect_eq("sat", sat(x, w), e);
    end
    // ---- cmul3 ----
    for (int n = 0; n < 2000; n++) begin
      longint ar, ai, br, bi;
      logic signed [63:0] pr, pi;
      ar = rnd(20); ai = rnd(20); br = rnd(18); bi = rnd(18);
      cmul3(ar, ai, br, bi, pr, pi);
      expect_eq("cmul3 re", pr, ar * br - ai * bi);
      expect_eq("cmul3 im", pi, ar * bi + ai * br);
    end

    // ---- norm slots distinct, pads minimal ----
    begin
      int best;
      checks++;
      if (!slots_ok(STAGE1_PAD, STAGE_PAD)) begin
        failures++; $display("norm slots collide with STAGE1_PAD=%0d STAGE_PAD=%0d", STAGE1_PAD, STAGE_PAD);
      end
      best = -1;
      for (int p1 = 0; p1 < GAMMA; p1++)
        for (int p = 0; p < GAMMA; p++)
          if (slots_ok(p1, p) && (best < 0 || p1 + (NT - 2) * p < best)) best = p1 + (NT - 2) * p;
      expect_eq("added pad latency", STAGE1_PAD + (NT - 2) * STAGE_PAD, best);
      for (int i = 0; i < NT; i++)
        for (int k = i + 1; k < NT; k++) begin
          checks++;
          if ((t_stage(i) + LAT_NORM) % GAMMA == (t_stage(k) + LAT_NORM) % GAMMA) begin
            failures++; $display("stages %0d and %0d share a square-root slot", i, k);
          end
        end
    end

    // ---- sqrt(N0) at the divider ----
    for (int i = 0; i < NT; i++) begin
      checks++;
      if (T_N0 % GAMMA == (t_stage(i) + LAT_NORM + LAT_SQRT) % GAMMA) begin
        failures++; $display("sqrt(N0) meets norm %0d at the divider", i);
      end
    end
    checks++;
    if (T_N0 + LAT_RECIP + 1 < T_U4 || T_N0 + LAT_RECIP + 1 >= T_U4 + GAMMA) begin
      failures++; $display("1/sqrt(N0) arrives at %0d, outside [%0d, %0d)", T_N0 + LAT_RECIP + 1, T_U4, T_U4 + GAMMA);
    end

    // ---- first stage output alignment ----
    expect_eq("S1_PU", S1_PU, (LAT_R + 1) % GAMMA);
    checks++;
    if (S1_EOFF < NR + 1 || S1_EOFF > NR + GAMMA) begin
      failures++; $display("S1_EOFF %0d outside [%0d, %0d]", S1_EOFF, NR + 1, NR + GAMMA);
    end
    for (int j = 0; j < NT - 1; j++) begin
      int slot;
      slot = s1_row4_slot(j);
      checks += 3;
      // input slot NR+1+j of the norm multipliers, after r_j is latched (clock NR)
      if ((S1_PU + slot) % GAMMA != NR + 1 + j) begin
        failures++; $display("row-%0d product of column %0d not in norm slot %0d", NR, j, NR + 1 + j);
      end
      if (slot <= NR || slot > NR + GAMMA) begin
        failures++; $display("row-%0d product of column %0d at %0d, outside (%0d, %0d]", NR, j, slot, NR, NR + GAMMA);
      end
      if (slot + 1 > S1_EOFF + NR) begin
        failures++; $display("row-%0d result of column %0d not ready when emitted", NR, j);
      end
    end

    // ---- delays and latency ----
    for (int i = 0; i < NT - 1; i++) begin
      checks++;
      if (T_U4 - t_u(i) < 2) begin
        failures++; $display("u_%0d alignment delay %0d below 2", i + 1, T_U4 - t_u(i));
      end
    end
    expect_eq("S1_RAW", S1_RAW, LAT_R + 1 + S1_EOFF + 1 + LAT_SCALE);
    expect_eq("STAGE_RAW", STAGE_RAW, LAT_R + 1 + LAT_PROJ + LAT_SCALE);
    expect_eq("T_U4", T_U4, LAT_SCALE + STAGE1_P + (NT - 2) * STAGE_P + LAT_R + 1);
    expect_eq("LATENCY", LATENCY, 1 + T_U4 + LAT_WDET);

    $display("STAGE1_P=%0d STAGE_P=%0d T_U4=%0d T_N0=%0d LATENCY=%0d", STAGE1_P, STAGE_P, T_U4, T_N0, LATENCY);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
