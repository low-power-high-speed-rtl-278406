// tb_afb_delay_line: unit test of one data-memory delay line.
//
// A 9-sample line with 3 read lanes is filled with known samples; for
// every pair base and every odd filter length up to 9 the tap pairs are
// compared with values computed from the testbench's own copy of the
// history (x[i] and x[N-1-i], zero past the centre tap). Also checks the
// reset value and that a read in the shift cycle still sees the old data.
module tb_afb_delay_line;
  localparam int LEN = 9, P = 3, W = 16;
  logic clk = 1'b0, rst_n = 1'b0, shift = 1'b0;
  logic signed [W-1:0] din = '0;
  logic [3:0] kbase = '0, ntaps = 4'd9;
  logic signed [W-1:0] a [P], b [P];
  int hist [LEN];
  int checks = 0, failures = 0;

  afb_delay_line #(.LEN(LEN), .P(P), .DATA_W(W), .IDX_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int n = 1; n <= LEN; n += 2) begin
      for (int k = 0; k < LEN; k++) begin
        int m;
        m = (n + 1) / 2;
        ntaps = 4'(n); kbase = 4'(k);
        #1;
        for (int j = 0; j < P; j++) begin
          int ea, eb, i;
          i  = k + j;
          ea = (i < m) ? hist[i] : 0;
          eb = (i < m - 1) ? hist[n - 1 - i] : 0;
          checks++;
          if (int'(a[j]) != ea || int'(b[j]) != eb) begin
            failures++;
            $display("FAIL n=%0d k=%0d j=%0d: a=%0d b=%0d exp %0d %0d", n, k, j, a[j], b[j], ea, eb);
          end
        end
      end
    end
  endtask

  initial begin
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_all();                       // all zero after reset
    for (int s = 0; s < 20; s++) begin
      @(negedge clk);
      din = W'(int'($urandom_range(65535)) - 32768);
      shift = 1'b1;
      ntaps = 4'd9; kbase = 4'd0;
      #1;
      checks++;                        // shift cycle still reads old x[0]
      if (int'(a[0]) != hist[0]) begin failures++; $display("FAIL: read during shift"); end
      @(negedge clk);
      shift = 1'b0;
      for (int i = LEN - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = int'(din);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
