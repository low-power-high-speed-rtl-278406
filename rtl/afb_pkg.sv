// afb_pkg: shared types, constants and helper functions of the 18-band
// multirate IFIR quasi-ANSI 1/3-octave analysis filter bank (AFB).
//
// The filter bank runs 14 linear-phase FIR sub-filters on 3 delay lines:
//   line 1 (full rate fs)   : I_A1, I_A2, H18, H17, H16       -> bands 18..16
//   line 2 (fs/2, from I_A1): H18, H17, H16                   -> bands 15..13
//   line 3 (fs/4, from I_A2): H18, H17, H16, H9 .. H1         -> bands 12..1
// The sub-filter set, the line/band mapping and the MAC allocation (3, 1
// and 4 MACs) follow the published architecture. The tap lengths below are
// this design's own choice: they are picked so that, with the published MAC
// allocation, the per-line cycle counts are exactly 33 (line 1, per sample),
// 52 (line 2, per 2 samples) and 125 (line 3, per 4 samples), and so that
// the three delay lines together hold 49 + 39 + 99 = 187 registers.
// Every sub-filter has odd length N and symmetric taps, so only the
// (N+1)/2 unique coefficients are stored; coefficient word k of filter f
// multiplies x[k] + x[N-1-k] (the centre word multiplies x[(N-1)/2] alone).
package afb_pkg;

  localparam int NUM_FILT  = 14;
  localparam int NUM_BANDS = 18;
  localparam int NUM_LINES = 3;
  localparam int MAX_NF    = 12;   // most sub-filters on one line (line 3)

  // Sub-filter identifiers; also the order of the coefficient sets in memory.
  typedef enum logic [3:0] {
    F_IA1 = 4'd0,  F_IA2 = 4'd1,
    F_H18 = 4'd2,  F_H17 = 4'd3,  F_H16 = 4'd4,
    F_H9  = 4'd5,  F_H8  = 4'd6,  F_H7  = 4'd7,  F_H6 = 4'd8,  F_H5 = 4'd9,
    F_H4  = 4'd10, F_H3  = 4'd11, F_H2  = 4'd12, F_H1 = 4'd13
  } filt_e;

  // Tap length N of each sub-filter, indexed by filt_e.
  localparam int TAPS [NUM_FILT] = '{35, 49, 29, 33, 39,
                                     89, 89, 89, 89, 89, 89, 97, 97, 99};

  // Delay-line lengths: the longest sub-filter on each line.
  localparam int LINE_LEN [NUM_LINES] = '{49, 39, 99};

  // Sub-filters processed on each line, in schedule order.
  localparam int LINE_NF [NUM_LINES] = '{5, 3, 12};
  localparam filt_e LINE_FILT [NUM_LINES][MAX_NF] = '{
    '{F_IA1, F_IA2, F_H18, F_H17, F_H16, F_H1, F_H1, F_H1, F_H1, F_H1, F_H1, F_H1},
    '{F_H18, F_H17, F_H16, F_H1, F_H1, F_H1, F_H1, F_H1, F_H1, F_H1, F_H1, F_H1},
    '{F_H18, F_H17, F_H16, F_H9, F_H8, F_H7, F_H6, F_H5, F_H4, F_H3, F_H2, F_H1}
  };

  // Number of stored (unique) coefficients of a sub-filter.
  function automatic int half_len(int f);
    return (TAPS[f] + 1) / 2;
  endfunction

  // First word of a sub-filter's coefficients in the coefficient memory.
  function automatic int coef_base(int f);
    int s = 0;
    for (int i = 0; i < f; i++) s += half_len(i);
    return s;
  endfunction

  // Total coefficient words (513 with the tap lengths above).
  function automatic int coef_words();
    return coef_base(NUM_FILT);
  endfunction

  localparam int COEF_WORDS = coef_words();

  // coef_base() of every sub-filter, as a table for run-time lookup.
  localparam int COEF_BASE [NUM_FILT] = '{
    coef_base(0), coef_base(1), coef_base(2),  coef_base(3),  coef_base(4),
    coef_base(5), coef_base(6), coef_base(7),  coef_base(8),  coef_base(9),
    coef_base(10), coef_base(11), coef_base(12), coef_base(13)};
  localparam int COEF_AW    = $clog2(COEF_WORDS);

  // Clock cycles a line needs to run all its sub-filters with P MACs.
  function automatic int line_cycles(int line, int p);
    int s = 0;
    for (int i = 0; i < LINE_NF[line]; i++)
      s += (half_len(int'(LINE_FILT[line][i])) + p - 1) / p;
    return s;
  endfunction

  // Output band (1..18) produced by sub-filter f on line l (0-based);
  // 0 for the IFIR interpolators I_A1 / I_A2, which feed lines 2 and 3.
  function automatic int band_of(int l, int f);
    if (f == int'(F_IA1) || f == int'(F_IA2)) return 0;
    if (f <= int'(F_H16))             return 20 - f - 3 * l;
    return 14 - f;
  endfunction

  // ----------------------------------------------------------------------
  // Linear-phase alignment and synthesis bank.
  //
  // Band b is produced by prototype H filter band_filter(b) in rate group
  // band_group(b) (0: fs, bands 18..16; 1: fs/2, bands 15..13; 2: fs/4,
  // bands 12..1). Within a group every band is delayed, in its own update
  // periods, to the group's longest H delay; each group sum is then delayed
  // so that all three paths reach the synthesis output with the same
  // delay SYN_DELAY (in input samples):
  //   group 0: hmax0                                   + GRP_DEPTH[0]
  //   group 1: dA1 + 2*hmax1 + 2 + dS1                 + 2*GRP_DEPTH[1]
  //   group 2: dA2 + 4*hmax2 + 4 + dS2                 + 4*GRP_DEPTH[2]
  // with dA/dS the delays (N-1)/2 of I_A/I_S, and the +2/+4 the one group
  // period by which the synthesis bank reads a group sum late (it uses the
  // last complete sum of the group when it starts an output sample).

  // Interpolators of the synthesis bank; lengths chosen equal to I_A1/I_A2.
  localparam int IS_TAPS [2] = '{35, 49};

  function automatic int band_group(int b);
    return (b >= 16) ? 0 : (b >= 13) ? 1 : 2;
  endfunction

  function automatic int band_filter(int b);
    if (b >= 16) return int'(F_H18) + 18 - b;
    if (b >= 13) return int'(F_H18) + 15 - b;
    if (b >= 10) return int'(F_H18) + 12 - b;
    return 14 - b;
  endfunction

  function automatic int h_delay(int f);
    return (TAPS[f] - 1) / 2;
  endfunction

  function automatic int group_hmax(int g);
    int mx = 0;
    for (int b = 1; b <= NUM_BANDS; b++)
      if (band_group(b) == g && h_delay(band_filter(b)) > mx)
        mx = h_delay(band_filter(b));
    return mx;
  endfunction

  // Delay of band b, in its own update periods, to align it within its group.
  function automatic int align_depth(int b);
    return group_hmax(band_group(b)) - h_delay(band_filter(b));
  endfunction

  // Delay of group g through analysis, hand-over and synthesis, in input
  // samples, before the group delay line.
  function automatic int group_path_delay(int g);
    if (g == 0) return group_hmax(0);
    if (g == 1) return h_delay(int'(F_IA1)) + 2 * group_hmax(1) + 2 + (IS_TAPS[0] - 1) / 2;
    return h_delay(int'(F_IA2)) + 4 * group_hmax(2) + 4 + (IS_TAPS[1] - 1) / 2;
  endfunction

  function automatic int syn_delay();
    int mx = 0;
    for (int g = 0; g < 3; g++) if (group_path_delay(g) > mx) mx = group_path_delay(g);
    return mx;
  endfunction

  localparam int SYN_DELAY = syn_delay();   // 248 with the lengths above
  // Group delay lines, in updates of the group (1, 2 or 4 input samples).
  localparam int GRP_DEPTH [3] = '{
    (SYN_DELAY - group_path_delay(0)),
    (SYN_DELAY - group_path_delay(1)) / 2,
    (SYN_DELAY - group_path_delay(2)) / 4};

endpackage
