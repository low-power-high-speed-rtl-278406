// tb_afb_top: end-to-end test of the 18-band analysis filter bank at its
// default parameters.
//
// Loads random coefficients for all 14 sub-filters, then feeds random
// samples, first in real time (one sample every 33 clocks, the rate of a
// 792 kHz clock for 24 kHz audio) for 6000 samples, a 250 ms random-signal
// sequence, and then as fast as the input handshake allows. A behavioural model computes every sub-filter output directly
// from the full tap vectors (not from the symmetric pairs the design
// uses), with the same rounding and saturation, and every band update of
// the design is compared with it in order. It also checks:
//   - no stall in real-time operation (in_ready high every 33 clocks),
//   - busy cycles per pass: 33 (line 1), 52 (line 2), 125 (line 3),
//   - bands 18..16 update every sample, 15..13 every 2nd, 12..1 every 4th,
// and counts how often each mechanism occurred: input stall, hand-over to
// line 2 (decimation by 2), hand-over to line 3 (decimation by 4),
// saturation, and a sample accepted on line 1's final cycle.
module tb_afb_top;
  import afb_pkg::*;

  localparam int DATA_W = 16;
  localparam int COEF_W = 16;
  localparam int N_RT    = 6000; // real-time samples: 250 ms at 24 kHz
  localparam int N_BURST = 32;   // back-to-back samples

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready;
  logic signed [DATA_W-1:0] in_data = '0;
  logic coef_we = 1'b0;
  logic [COEF_AW-1:0] coef_addr = '0;
  logic signed [COEF_W-1:0] coef_wdata = '0;
  logic signed [DATA_W-1:0] band_out [NUM_BANDS];
  logic [NUM_BANDS-1:0] band_upd, band_sat;
  logic [2:0] line_busy;

  afb_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ reference
  int coef [COEF_WORDS];
  int x1 [49], x2 [39], x3 [99];
  int exp_q [NUM_BANDS][$];
  int exps_q [NUM_BANDS][$];
  int n_acc = 0;

  function automatic int tap(int f, int t);
    int m = (TAPS[f] + 1) / 2;
    int base = 0;
    for (int i = 0; i < f; i++) base += (TAPS[i] + 1) / 2;
    return (t < m) ? coef[base + t] : coef[base + TAPS[f] - 1 - t];
  endfunction

  // Direct-form FIR, round half up by 2^15, saturate; sat flag in [16].
  function automatic int fir(int f, const ref int h [], input int len);
    longint s = 0;
    longint r;
    for (int t = 0; t < TAPS[f]; t++) s += longint'(tap(f, t)) * h[t];
    r = (s + 16384) >>> 15;
    if (r > 32767)  return 32767 | (1 << 16);
    if (r < -32768) return -32768 & 32'h0000_ffff | (1 << 16);
    return int'(r) & 32'h0000_ffff;
  endfunction

  function automatic int sx(int v);
    return int'(signed'(v[15:0]));
  endfunction

  int h1d [], h2d [], h3d [];

  function automatic void push_band(int band, int v);
    exp_q[band-1].push_back(sx(v));
    exps_q[band-1].push_back((v >> 16) & 1);
  endfunction

  task automatic model_accept(int xin);
    int ia1, ia2;
    for (int i = 48; i > 0; i--) x1[i] = x1[i-1];
    x1[0] = xin;
    h1d = new[49];
    foreach (x1[i]) h1d[i] = x1[i];
    ia1 = fir(int'(F_IA1), h1d, 49);
    ia2 = fir(int'(F_IA2), h1d, 49);
    push_band(18, fir(int'(F_H18), h1d, 49));
    push_band(17, fir(int'(F_H17), h1d, 49));
    push_band(16, fir(int'(F_H16), h1d, 49));
    if (n_acc % 2 == 0) begin
      for (int i = 38; i > 0; i--) x2[i] = x2[i-1];
      x2[0] = sx(ia1);
      h2d = new[39];
      foreach (x2[i]) h2d[i] = x2[i];
      push_band(15, fir(int'(F_H18), h2d, 39));
      push_band(14, fir(int'(F_H17), h2d, 39));
      push_band(13, fir(int'(F_H16), h2d, 39));
    end
    if (n_acc % 4 == 0) begin
      for (int i = 98; i > 0; i--) x3[i] = x3[i-1];
      x3[0] = sx(ia2);
      h3d = new[99];
      foreach (x3[i]) h3d[i] = x3[i];
      push_band(12, fir(int'(F_H18), h3d, 99));
      push_band(11, fir(int'(F_H17), h3d, 99));
      push_band(10, fir(int'(F_H16), h3d, 99));
      for (int b = 9; b >= 1; b--) push_band(b, fir(14 - b, h3d, 99));
    end
    n_acc++;
  endtask

  // ------------------------------------------------------- output monitor
  int n_upd [NUM_BANDS];
  int n_sat = 0, n_dec2 = 0, n_dec4 = 0, n_stall = 0, n_overlap = 0;
  int busy_cyc [3];

  always @(negedge clk) if (rst_n) begin
    for (int l = 0; l < 3; l++) if (line_busy[l]) busy_cyc[l]++;
    for (int b = 0; b < NUM_BANDS; b++) if (band_upd[b]) begin
      n_upd[b]++;
      if (band_sat[b]) n_sat++;
      if (b == 14) n_dec2++;
      if (b == 11) n_dec4++;
      checks++;
      if (exp_q[b].size() == 0) begin
        failures++;
        $display("FAIL band %0d: unexpected update", b + 1);
      end else begin
        int e, es;
        e  = exp_q[b].pop_front();
        es = exps_q[b].pop_front();
        if (int'(band_out[b]) != e || int'(band_sat[b]) != es) begin
          failures++;
          if (failures < 20)
            $display("FAIL band %0d: got %0d sat %0d, expected %0d sat %0d",
                     b + 1, band_out[b], band_sat[b], e, es);
        end
      end
    end
  end

  // --------------------------------------------------------------- driver
  task automatic send(int xin, bit rt);
    in_valid = 1'b1;
    in_data  = DATA_W'(xin);
    if (rt) begin
      checks++;
      if (!in_ready) begin
        failures++;
        $display("FAIL: stall in real-time operation at sample %0d", n_acc);
      end
    end
    while (!in_ready) begin
      n_stall++;
      @(negedge clk);
    end
    if (line_busy[0]) n_overlap++;
    model_accept(xin);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (x1[i]) x1[i] = 0;
    foreach (x2[i]) x2[i] = 0;
    foreach (x3[i]) x3[i] = 0;
    foreach (busy_cyc[i]) busy_cyc[i] = 0;
    foreach (n_upd[i]) n_upd[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // load coefficients: +/-4096 keeps most outputs in range
    for (int a = 0; a < COEF_WORDS; a++) begin
      coef[a] = int'($urandom_range(8191)) - 4096;
      // H18 gets full-range taps so that its bands saturate now and then
      if (a >= coef_base(int'(F_H18)) && a < coef_base(int'(F_H17)))
        coef[a] = int'($urandom_range(65535)) - 32768;
      coef_we = 1'b1; coef_addr = COEF_AW'(a); coef_wdata = COEF_W'(coef[a]);
      @(negedge clk);
    end
    coef_we = 1'b0;
    repeat (2) @(negedge clk);

    // real-time: one sample every 33 clocks
    for (int n = 0; n < N_RT; n++) begin
      longint t0;
      t0 = cycle;
      send(int'($urandom_range(65535)) - 32768, 1'b1);
      while (cycle < t0 + 33) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    // busy cycles per pass, all in real time so far
    checks += 3;
    if (busy_cyc[0] != 33 * N_RT)        begin failures++; $display("FAIL line1 busy %0d", busy_cyc[0]); end
    if (busy_cyc[1] != 52 * (N_RT / 2))  begin failures++; $display("FAIL line2 busy %0d", busy_cyc[1]); end
    if (busy_cyc[2] != 125 * (N_RT / 4)) begin failures++; $display("FAIL line3 busy %0d", busy_cyc[2]); end

    // burst: in_valid held high, throughput limited by line 1
    begin
      longint tb0;
      tb0 = cycle;
      for (int n = 0; n < N_BURST; n++) send(int'($urandom_range(65535)) - 32768, 1'b0);
      checks++;
      if (cycle - tb0 > 33 * N_BURST + 2) begin
        failures++;
        $display("FAIL burst took %0d cycles for %0d samples", cycle - tb0, N_BURST);
      end
    end
    repeat (300) @(negedge clk);

    // every expected output delivered, at the right rates
    for (int b = 0; b < NUM_BANDS; b++) begin
      int want;
      want = (b >= 15) ? N_RT + N_BURST : (b >= 12) ? (N_RT + N_BURST) / 2
                                                    : (N_RT + N_BURST) / 4;
      checks++;
      if (n_upd[b] != want || exp_q[b].size() != 0) begin
        failures++;
        $display("FAIL band %0d: %0d updates, expected %0d", b + 1, n_upd[b], want);
      end
    end
    // each mechanism happened
    $display("mechanisms: stall=%0d dec2=%0d dec4=%0d sat=%0d overlap=%0d",
             n_stall, n_dec2, n_dec4, n_sat, n_overlap);
    checks += 5;
    if (n_stall == 0)   begin failures++; $display("FAIL: no input stall seen"); end
    if (n_dec2 == 0)    begin failures++; $display("FAIL: no line-2 hand-over"); end
    if (n_dec4 == 0)    begin failures++; $display("FAIL: no line-3 hand-over"); end
    if (n_sat == 0)     begin failures++; $display("FAIL: no saturation"); end
    if (n_overlap == 0) begin failures++; $display("FAIL: no back-to-back pass"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
