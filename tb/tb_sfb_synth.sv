// tb_sfb_synth: unit test of the synthesis filter bank.
//
// Loads random interpolator coefficients, then plays 600 input-sample
// periods of 33 clocks. In each period it updates, in the order the
// analysis bank does, bands 18..16, then bands 15..13 (every 2nd period)
// and bands 12..1 (every 4th) with random values. A sample-level model forms the
// three group sums, delays the full-rate sum by 229 samples and the
// half-rate sum by 87 half-rate samples, zero-stuffs the two decimated
// paths (using the group sums of the previous group period), filters them
// with the full 35- and 49-tap impulse responses and adds the paths with
// the same rounding and saturation. Each output is compared with the
// model, and its latency (28 clocks from the band-16 update) is checked.
module tb_sfb_synth;
  import afb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] al_out [NUM_BANDS];
  logic [NUM_BANDS-1:0] al_upd = '0;
  logic coef_we = 1'b0;
  logic [5:0] coef_addr = '0;
  logic signed [15:0] coef_wdata = '0;
  logic signed [15:0] y_out;
  logic y_valid, y_sat, busy;
  int checks = 0, failures = 0, n_ysat = 0;

  sfb_synth dut (.*);

  always #5 clk = ~clk;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int c [43];
  int d1 [$], d2 [$], u1 [$], u2 [$];
  int g2_cur = 0, g3_cur = 0;
  int exp_y [$], exp_s [$];
  longint t_tick [$];

  function automatic int sat16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction
  function automatic int h(int which, int t);
    int n, m, base;
    n = which == 0 ? 35 : 49;
    m = (n + 1) / 2;
    base = which == 0 ? 0 : 18;
    return (t < m) ? c[base + t] : c[base + n - 1 - t];
  endfunction
  // FIR over a history (index 0 newest); returns value, sat flag in bit 16
  function automatic int fir(int which, const ref int hq [$]);
    longint s = 0, r;
    int n;
    n = which == 0 ? 35 : 49;
    for (int t = 0; t < n && t < hq.size(); t++) s += longint'(h(which, t)) * hq[t];
    r = (s + 16384) >>> 15;
    return (r > 32767 || r < -32768) ? (sat16(r) & 32'hffff) | 32'h10000 : sat16(r) & 32'hffff;
  endfunction

  task automatic upd(int b);   // b is 1-based
    al_out[b-1] = 16'($urandom_range(20000) - 10000);
    al_upd[b-1] = 1'b1;
    @(negedge clk);
    al_upd[b-1] = 1'b0;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(negedge clk) if (rst_n && y_valid) begin
    checks += 2;
    if (exp_y.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
    else begin
      int e, es;
      longint tt;
      e = exp_y.pop_front(); es = exp_s.pop_front(); tt = t_tick.pop_front();
      if (y_sat) n_ysat++;
      if (int'(y_out) != e || int'(y_sat) != es) begin
        failures++;
        $display("FAIL y=%0d sat=%b expected %0d %0d", y_out, y_sat, e, es);
      end
      if (cycle - tt != 28) begin failures++; $display("FAIL latency %0d", cycle - tt); end
    end
  end

  initial begin
    foreach (al_out[b]) al_out[b] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 43; a++) begin
      c[a] = int'($urandom_range(16383)) - 8192;
      coef_we = 1'b1; coef_addr = 6'(a); coef_wdata = 16'(c[a]);
      @(negedge clk);
    end
    coef_we = 1'b0;
    for (int i = 0; i <= 229; i++) d1.push_back(0);
    for (int i = 0; i <= 87; i++) d2.push_back(0);
    for (int n = 0; n < 600; n++) begin
      longint t0;
      int g1, g2s, g3s, v1, v2, is1, is2, sflag;
      longint ysum;
      t0 = cycle;
      // group sums the synthesis bank uses at this tick: previous periods
      g2s = g2_cur;
      g3s = g3_cur;
      upd(18); upd(17);
      begin
        longint s;
        s = 0;
        al_out[15] = 16'($urandom_range(20000) - 10000);
        for (int b = 16; b <= 18; b++) s += al_out[b-1];
        g1 = sat16(s);
      end
      al_upd[15] = 1'b1;
      t_tick.push_back(cycle);
      @(negedge clk);
      al_upd[15] = 1'b0;
      if (n % 2 == 0) begin
        longint s;
        s = 0;
        for (int b = 15; b >= 13; b--) upd(b);
        for (int b = 13; b <= 15; b++) s += al_out[b-1];
        g2_cur = sat16(s);
      end
      if (n % 4 == 0) begin
        longint s;
        s = 0;
        for (int b = 12; b >= 1; b--) upd(b);
        for (int b = 1; b <= 12; b++) s += al_out[b-1];
        g3_cur = sat16(s);
      end
      // model of this output sample
      d1.push_front(g1); void'(d1.pop_back());
      if (n % 2 == 0) begin d2.push_front(g2s); void'(d2.pop_back()); end
      u1.push_front(n % 2 == 0 ? d2[87] : 0);
      u2.push_front(n % 4 == 0 ? g3s : 0);
      if (u1.size() > 35) void'(u1.pop_back());
      if (u2.size() > 49) void'(u2.pop_back());
      v1 = fir(0, u1); v2 = fir(1, u2);
      is1 = int'(signed'(v1[15:0])); is2 = int'(signed'(v2[15:0]));
      ysum = longint'(d1[229]) + is1 + is2;
      sflag = (v1[16] || v2[16] || ysum > 32767 || ysum < -32768) ? 1 : 0;
      exp_y.push_back(sat16(ysum)); exp_s.push_back(sflag);
      while (cycle < t0 + 33) @(negedge clk);
    end
    repeat (60) @(negedge clk);
    checks++;
    if (exp_y.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", exp_y.size()); end
    $display("outputs saturated: %0d", n_ysat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
