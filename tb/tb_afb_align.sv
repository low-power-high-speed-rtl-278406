// tb_afb_align: unit test of the linear-phase alignment buffers.
//
// Sends random values on random bands, each with its update strobe, and
// checks every aligned output against the testbench's own history of that
// band: the value sent depth(b) updates earlier (zero before that), with
// the depths written out here from the filter delays (bands 1..18:
// 0 1 1 5 5 5 5 5 5 30 33 35 0 3 5 0 3 5). Also checks that al_upd follows
// band_upd by exactly one cycle.
module tb_afb_align;
  import afb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [15:0] band_in [NUM_BANDS];
  logic [NUM_BANDS-1:0] band_upd = '0;
  logic signed [15:0] al_out [NUM_BANDS];
  logic [NUM_BANDS-1:0] al_upd;
  int depth [NUM_BANDS] = '{0, 1, 1, 5, 5, 5, 5, 5, 5, 30, 33, 35, 0, 3, 5, 0, 3, 5};
  int hist [NUM_BANDS][$];
  int checks = 0, failures = 0;

  afb_align dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (band_in[b]) band_in[b] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      logic [NUM_BANDS-1:0] sel;
      sel = NUM_BANDS'($urandom) & NUM_BANDS'($urandom);
      for (int b = 0; b < NUM_BANDS; b++) if (sel[b]) begin
        band_in[b] = 16'($urandom);
        hist[b].push_front(int'(band_in[b]));
      end
      band_upd = sel;
      @(negedge clk);
      band_upd = '0;
      for (int b = 0; b < NUM_BANDS; b++) begin
        checks++;
        if (al_upd[b] != sel[b]) begin failures++; $display("FAIL al_upd band %0d", b + 1); end
        if (sel[b]) begin
          int e;
          e = (hist[b].size() > depth[b]) ? hist[b][depth[b]] : 0;
          checks++;
          if (int'(al_out[b]) != e) begin
            failures++;
            $display("FAIL band %0d: %0d expected %0d", b + 1, al_out[b], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
