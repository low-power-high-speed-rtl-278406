// afb_align: linear-phase alignment buffers on the 18 band outputs.
//
// The prototype filters H18..H16 and H9..H1 have different lengths and so
// different group delays. To keep the whole filter bank linear phase, each
// band is delayed, counted in its own updates, until every band of a rate
// group has the delay of the group's longest filter:
//   depth(b) = max over group of (N-1)/2  -  (N_b - 1)/2
// (afb_pkg::align_depth; 146 registers in all with the chosen lengths).
// The group-level delays that equalise the three rate groups sit in the
// synthesis bank, on the group sums.
// Interface: band_in/band_upd are the analysis bank's band registers and
// update strobes; a strobe shifts that band's buffer, and one cycle later
// al_upd[b] pulses with the aligned sample on al_out[b].
// That buffer registers equalise the band delays for linear phase follows
// the published design; their placement and sizes are this design's own
// (the published design lists 300 such registers for its own filters).
module afb_align
  import afb_pkg::*;
#(
  parameter int DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] band_in  [NUM_BANDS],
  input  logic [NUM_BANDS-1:0]     band_upd,
  output logic signed [DATA_W-1:0] al_out   [NUM_BANDS],
  output logic [NUM_BANDS-1:0]     al_upd
);

  for (genvar b = 0; b < NUM_BANDS; b++) begin : g_band
    afb_sdelay #(.DEPTH(align_depth(b + 1)), .W(DATA_W)) u_dly (
      .clk, .rst_n, .en(band_upd[b]), .din(band_in[b]), .dout(al_out[b]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) al_upd <= '0;
    else        al_upd <= band_upd;
  end

endmodule
