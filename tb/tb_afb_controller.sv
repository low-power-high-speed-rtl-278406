// tb_afb_controller: unit test of the system controller and its schedule.
//
// Feeds 16 input strobes one every 33 clocks and models the hand-over of
// decimated samples itself. The expected schedule is written out here from
// the coefficient counts of the sub-filters (I_A1 18, I_A2 25, H18 15,
// H17 17, H16 20, H9..H4 45, H3 49, H2 49, H1 50) and the MAC counts
// (3, 1, 4): every step of every line must show the right sub-filter, pair
// base and first/last flags, in order. It also checks that a pass takes
// 33, 52 and 125 cycles, that line 2 runs for every 2nd and line 3 for
// every 4th sample, that in_ready stays high in real time and that a
// second strobe sent right after a sample is held off (a stall).
module tb_afb_controller;
  import afb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_ready;
  logic [2:0] shift, act, first, last, busy;
  logic cap2, cap3;
  filt_e fid [3];
  logic [6:0] kbase [3];
  logic [1:0] phase;
  int checks = 0, failures = 0;

  afb_controller dut (.*);

  always #5 clk = ~clk;

  // expected schedule per line: list of (filter id, unique coefficients)
  int ids1 [5]  = '{0, 1, 2, 3, 4};
  int m1 [5]    = '{18, 25, 15, 17, 20};
  int ids2 [3]  = '{2, 3, 4};
  int m2 [3]    = '{15, 17, 20};
  int ids3 [12] = '{2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13};
  int m3 [12]   = '{15, 17, 20, 45, 45, 45, 45, 45, 45, 49, 49, 50};
  int pmac [3]  = '{3, 1, 4};

  // per-line step pointer into the expected schedule
  int fi [3], kk [3], passes [3], steps [3], n_cap2 = 0, n_cap3 = 0, n_in = 0;

  function automatic int nf(int l);
    return l == 0 ? 5 : l == 1 ? 3 : 12;
  endfunction
  function automatic int eid(int l, int i);
    return l == 0 ? ids1[i] : l == 1 ? ids2[i] : ids3[i];
  endfunction
  function automatic int em(int l, int i);
    return l == 0 ? m1[i] : l == 1 ? m2[i] : m3[i];
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (shift[0]) n_in++;
    // hand-overs only for the kept phases: sample index even / multiple of 4
    if (cap2) begin
      n_cap2++;
      checks++;
      if ((n_in - 1) % 2 != 0) begin failures++; $display("FAIL: cap2 for sample %0d", n_in - 1); end
    end
    if (cap3) begin
      n_cap3++;
      checks++;
      if ((n_in - 1) % 4 != 0) begin failures++; $display("FAIL: cap3 for sample %0d", n_in - 1); end
    end
    for (int l = 0; l < 3; l++) if (act[l]) begin
      int m;
      m = em(l, fi[l]);
      checks++;
      steps[l]++;
      if (int'(fid[l]) != eid(l, fi[l]) || int'(kbase[l]) != kk[l] ||
          first[l] != (kk[l] == 0) || last[l] != (kk[l] + pmac[l] >= m)) begin
        failures++;
        $display("FAIL line %0d step: fid=%0d k=%0d f=%b l=%b exp fid=%0d k=%0d",
                 l + 1, fid[l], kbase[l], first[l], last[l], eid(l, fi[l]), kk[l]);
      end
      if (kk[l] + pmac[l] >= m) begin
        kk[l] = 0;
        fi[l]++;
        if (fi[l] == nf(l)) begin fi[l] = 0; passes[l]++; end
      end else kk[l] += pmac[l];
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (fi[l]) begin fi[l] = 0; kk[l] = 0; passes[l] = 0; steps[l] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 16; n++) begin
      checks++;
      if (!in_ready) begin failures++; $display("FAIL: not ready at sample %0d", n); end
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b1;               // held high: must be stalled now
      checks++;
      if (in_ready) begin failures++; $display("FAIL: no stall after sample %0d", n); end
      in_valid = 1'b0;
      repeat (31) @(negedge clk);
      checks++;                      // still busy one cycle before the 33rd
      if (in_ready) begin failures++; $display("FAIL: ready too early at %0d", n); end
      @(negedge clk);
    end
    repeat (200) @(negedge clk);
    checks += 6;
    if (passes[0] != 16 || steps[0] != 16 * 33) begin failures++; $display("FAIL line1 %0d passes %0d steps", passes[0], steps[0]); end
    if (passes[1] != 8  || steps[1] != 8 * 52)  begin failures++; $display("FAIL line2 %0d passes %0d steps", passes[1], steps[1]); end
    if (passes[2] != 4  || steps[2] != 4 * 125) begin failures++; $display("FAIL line3 %0d passes %0d steps", passes[2], steps[2]); end
    if (n_cap2 != 8) begin failures++; $display("FAIL cap2 %0d", n_cap2); end
    if (n_cap3 != 4) begin failures++; $display("FAIL cap3 %0d", n_cap3); end
    if (busy != 3'b000) begin failures++; $display("FAIL still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
