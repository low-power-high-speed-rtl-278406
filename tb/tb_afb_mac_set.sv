// tb_afb_mac_set: unit test of a MAC set of the filter engine.
//
// Runs random multi-step accumulations through a 3-lane MAC set: each
// step pre-adds the tap pairs, multiplies by the coefficients and adds to
// the running sum; the testbench keeps its own 64-bit sum and checks the
// rounded, saturated result, the saturation flag, the tag and that
// res_valid pulses exactly once, one cycle after the `last` step.
module tb_afb_mac_set;
  localparam int P = 3, W = 16, CW = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic act = 1'b0, first = 1'b0, last = 1'b0;
  logic [3:0] tag = '0;
  logic signed [W-1:0] a [P], b [P];
  logic signed [CW-1:0] c [P];
  logic res_valid, res_sat;
  logic signed [W-1:0] res;
  logic [3:0] res_tag;
  int checks = 0, failures = 0, n_sat = 0;

  afb_mac_set #(.P(P), .DATA_W(W), .COEF_W(CW), .ACC_W(40)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (a[j]) begin a[j] = '0; b[j] = '0; c[j] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      longint s, r;
      int steps, er, es, crange;
      steps  = 1 + int'($urandom_range(7));
      crange = (t % 3 == 0) ? 32767 : 2047;   // some runs saturate
      s = 0;
      for (int k = 0; k < steps; k++) begin
        act = 1'b1; first = (k == 0); last = (k == steps - 1);
        tag = 4'(t);
        for (int j = 0; j < P; j++) begin
          a[j] = W'(int'($urandom_range(65535)) - 32768);
          b[j] = W'(int'($urandom_range(65535)) - 32768);
          c[j] = CW'(int'($urandom_range(2 * crange)) - crange);
          s += (longint'(a[j]) + longint'(b[j])) * longint'(c[j]);
        end
        @(negedge clk);
        checks++;
        if (k < steps - 1 && res_valid) begin failures++; $display("FAIL: early res_valid"); end
      end
      act = 1'b0; first = 1'b0; last = 1'b0;
      // result is valid in the cycle after the last step
      r  = (s + 16384) >>> 15;
      es = (r > 32767 || r < -32768) ? 1 : 0;
      er = (r > 32767) ? 32767 : (r < -32768) ? -32768 : int'(r);
      n_sat += es;
      checks++;
      if (!res_valid || int'(res) != er || int'(res_sat) != es || res_tag != 4'(t)) begin
        failures++;
        $display("FAIL run %0d: v=%b res=%0d sat=%b tag=%0d exp %0d %0d", t, res_valid, res, res_sat, res_tag, er, es);
      end
      @(negedge clk);
      checks++;
      if (res_valid) begin failures++; $display("FAIL: res_valid longer than one cycle"); end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: no saturation case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
