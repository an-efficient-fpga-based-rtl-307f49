// mmse_pkg: constants, fixed-point formats and pipeline latencies shared by the
// square-root MMSE detector.
//
// The detector works on the 8x4 compound matrix A = [H ; sqrt(N0)*I] of a 4x4
// MIMO channel. One channel instance enters every GAMMA = 8 clocks, and every
// time-shared unit handles one 8-element column per 8 clocks, one element per
// clock. Sizes (4x4, gamma = 8, 14-bit Q and 16-bit R precision) follow the
// source design; the exact binary-point positions, the scaling bounds and the
// internal widths of the square root and reciprocal are this design's own
// choices and are documented next to each constant.
//
// Fixed-point formats (all two's complement, "Fn" = n fraction bits):
//   H, y, sqrt(N0), y_hat : 16-bit, F12          (HF)
//   column data v         : 16-bit integers, scaled per column by a power of 2
//   Q = [u1..u4]          : 14-bit, F12          (QF)
//   Q2/sqrt(N0)           : 20-bit, F12          (NF)
//   W_MMSE                : 18-bit, F12          (WF)
//   norm ||v||            : 18-bit unsigned, F2  (SF)
//   reciprocal 1/x        : 32-bit unsigned, value 2^RF / x
package mmse_pkg;

  // Antennas and time-sharing order.
  localparam int unsigned NT    = 4;          // transmit antennas (columns of H)
  localparam int unsigned NR    = 4;          // receive antennas (rows of H)
  localparam int unsigned ROWS  = NR + NT;    // rows of the compound matrix
  localparam int unsigned GAMMA = ROWS;       // multiplier time-sharing order

  // Word widths.
  localparam int unsigned DW  = 16;           // column data v, H, y, sqrt(N0)
  localparam int unsigned QW  = 14;           // Q matrix entries
  localparam int unsigned NW  = 20;           // Q2 / sqrt(N0)
  localparam int unsigned WW  = 18;           // W_MMSE entries
  localparam int unsigned YW  = 18;           // y_hat entries
  localparam int unsigned NSW = 2 * DW;       // ||v||^2
  localparam int unsigned SF  = 2;            // fraction bits of ||v||
  localparam int unsigned SIW = NSW + 2 * SF; // square-root radicand width
  localparam int unsigned RTW = SIW / 2;      // square-root result width
  localparam int unsigned RF  = 34;           // reciprocal = 2^RF / x
  localparam int unsigned RW  = 32;           // reciprocal width (saturating)

  // Binary points.
  localparam int unsigned HF = 12;
  localparam int unsigned QF = QW - 2;
  localparam int unsigned NF = 12;
  localparam int unsigned WF = 12;

  // Dynamic scaling bounds of Table-1 steps (d)-(g): after scaling the largest
  // |Re|/|Im| of a column lies in [2^SCALE_L, 2^SCALE_U].
  localparam int unsigned SCALE_L = DW - 5;
  localparam int unsigned SCALE_U = DW - 4;

  // Right shifts that restore the binary point after each product.
  localparam int unsigned U_SHIFT  = RF - QF - SF;          // v * 1/||v|| -> u
  localparam int unsigned N0_SHIFT = QF + RF - HF - NF;     // Q2 * 1/sqrt(N0)
  localparam int unsigned W_SHIFT  = NF + QF - WF;          // Q2n * Q1^*
  localparam int unsigned Y_SHIFT  = WF;                    // W * y

  // Pipeline latencies in clocks (first element in -> first element out).
  localparam int unsigned LAT_SCALE = GAMMA + 1;
  localparam int unsigned LAT_NORM  = GAMMA;                // to the result pulse
  localparam int unsigned LAT_SQRT  = RTW;
  localparam int unsigned LAT_RECIP = RF + 1;
  localparam int unsigned LAT_R     = LAT_NORM + LAT_SQRT + LAT_RECIP + 1;
  localparam int unsigned LAT_PROJ  = GAMMA + 1;
  localparam int unsigned LAT_WDET  = 4 * GAMMA;            // u sof -> outputs

  // Stage period: one Gram-Schmidt column step of the generic stage.
  localparam int unsigned STAGE_RAW = LAT_R + 1 + LAT_PROJ + LAT_SCALE;

  // The first stage (mgs_stage1) shares multipliers across idle slots. Its
  // update results for rows 0..NR-1 come from the inner-product multipliers
  // 4..7 clocks after u1 starts; row NR comes from the idle slots NR+1..ROWS-1
  // of the norm multipliers. S1_EOFF is the first clock, counted from u1's
  // first element, at which the whole updated column can be streamed out.
  localparam int unsigned S1_PU = (LAT_R + 1) % GAMMA;   // slot of u1's element 0
  function automatic int unsigned s1_row4_slot(int unsigned j);
    return (NR + 1) + ((j + GAMMA - S1_PU) % GAMMA);      // clocks after u1 starts
  endfunction
  function automatic int unsigned s1_eoff();
    int unsigned mx;
    mx = 0;
    for (int unsigned j = 0; j < NT - 1; j++)
      if (s1_row4_slot(j) > mx) mx = s1_row4_slot(j);
    return (mx - 3 > NR + 1) ? mx - 3 : NR + 1;
  endfunction
  localparam int unsigned S1_EOFF  = s1_eoff();
  localparam int unsigned S1_RAW   = LAT_R + 1 + S1_EOFF + 1 + LAT_SCALE;

  // Pad clocks for the first and the other stages, chosen so that the four
  // norm results of one instance reach the shared square root in different
  // clock slots, with the least added latency PAD1 + (NT-2) * PAD.
  // Returned as PAD1 * GAMMA + PAD.
  function automatic int unsigned pick_pads();
    int unsigned s [NT];
    bit ok;
    for (int unsigned tot = 0; tot < NT * GAMMA; tot++)
      for (int unsigned p = 0; p < GAMMA; p++) begin
        int unsigned p1;
        if ((NT - 2) * p > tot || tot - (NT - 2) * p >= GAMMA) continue;
        p1 = tot - (NT - 2) * p;
        s[0] = 0;
        for (int unsigned i = 1; i < NT; i++)
          s[i] = s[i-1] + ((i == 1) ? S1_RAW + p1 : STAGE_RAW + p);
        ok = 1'b1;
        for (int unsigned a = 0; a < NT; a++)
          for (int unsigned b = a + 1; b < NT; b++)
            if (s[a] % GAMMA == s[b] % GAMMA) ok = 1'b0;
        if (ok) return p1 * GAMMA + p;
      end
    return 0;
  endfunction
  localparam int unsigned PADS      = pick_pads();
  localparam int unsigned STAGE1_PAD = PADS / GAMMA;
  localparam int unsigned STAGE_PAD  = PADS % GAMMA;
  localparam int unsigned STAGE1_P   = S1_RAW + STAGE1_PAD;
  localparam int unsigned STAGE_P    = STAGE_RAW + STAGE_PAD;

  // Start of stage i (scaled columns in), counted from the first formatter
  // element, and the arrival of u_i and of u4.
  localparam int unsigned T_S1 = LAT_SCALE;
  function automatic int unsigned t_stage(int unsigned i);
    return T_S1 + ((i > 0) ? STAGE1_P + (i - 1) * STAGE_P : 0);
  endfunction
  function automatic int unsigned t_u(int unsigned i);
    return t_stage(i) + LAT_R + 1;
  endfunction
  localparam int unsigned T_U4 = t_u(NT - 1);

  // The reciprocal of sqrt(N0) shares the divider with the four norms. Pick a
  // slot whose result is visible during the weight stage's capture frame and
  // that no norm occupies.
  function automatic int unsigned n0_delay();
    int unsigned used [NT];
    int unsigned res;
    bit clash;
    for (int unsigned i = 0; i < NT; i++)
      used[i] = (t_stage(i) + LAT_NORM + LAT_SQRT) % GAMMA;
    for (int unsigned d = 0; d < GAMMA; d++) begin
      res = (T_U4 + d - LAT_RECIP - 1) % GAMMA;
      clash = 1'b0;
      for (int unsigned i = 0; i < NT; i++) if (used[i] == res) clash = 1'b1;
      if (!clash) return T_U4 + d - LAT_RECIP - 1;
    end
    return 0;
  endfunction
  localparam int unsigned T_N0 = n0_delay();

  // Input acceptance to outputs.
  localparam int unsigned LATENCY = 1 + T_U4 + LAT_WDET;

  // Complex sample types.
  typedef struct packed { logic signed [DW-1:0] re; logic signed [DW-1:0] im; } cv_t;
  typedef struct packed { logic signed [QW-1:0] re; logic signed [QW-1:0] im; } cq_t;
  typedef struct packed { logic signed [NW-1:0] re; logic signed [NW-1:0] im; } cn_t;
  typedef struct packed { logic signed [WW-1:0] re; logic signed [WW-1:0] im; } cw_t;
  typedef struct packed { logic signed [YW-1:0] re; logic signed [YW-1:0] im; } cy_t;

  // Divider slot tags: columns 0..NT-1, and the noise term.
  localparam int unsigned TAGW   = 3;
  localparam logic [TAGW-1:0] TAG_N0 = TAGW'(NT);

  // Arithmetic right shift with round-half-up, on a 64-bit intermediate.
  function automatic logic signed [63:0] rshr(input logic signed [63:0] x, input int unsigned sh);
    if (sh == 0) return x;
    return (x + (64'sd1 <<< (sh - 1))) >>> sh;
  endfunction

  // Saturate a 64-bit intermediate to a W-bit two's-complement word.
  function automatic logic signed [63:0] sat(input logic signed [63:0] x, input int unsigned w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (w - 1));
    if (x > hi) return hi;
    if (x < lo) return lo;
    return x;
  endfunction

  // Complex product (ar + j ai)(br + j bi) with three real multiplications
  // (pr = k1 - k3, pi = k1 + k2), the form the multiplier counts assume.
  // Exact on 64-bit intermediates, so it equals the 4-multiplication form.
  function automatic void cmul3(input  logic signed [63:0] ar, ai, br, bi,
                                output logic signed [63:0] pr, pi);
    logic signed [63:0] k1, k2, k3;
    k1 = br * (ar + ai);
    k2 = ar * (bi - br);
    k3 = ai * (br + bi);
    pr = k1 - k3;
    pi = k1 + k2;
  endfunction

endpackage
