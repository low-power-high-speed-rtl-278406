// fb_top: complete 18-band quasi-ANSI S1.11 1/3-octave filter bank for a
// digital hearing aid: analysis bank, linear-phase alignment and synthesis
// bank.
//
// afb_top splits the input into 18 bands (bands 18..16 at fs, 15..13 at
// fs/2, 12..1 at fs/4); afb_align delays the bands of each rate group to a
// common delay; sfb_synth sums each group, interpolates the two decimated
// groups back to fs and adds the three paths, every path having the same
// total delay of afb_pkg::SYN_DELAY input samples (248 with the chosen
// filter lengths), so the whole bank is linear phase.
// The aligned bands are brought out (aligned_out/aligned_upd) for a
// per-band gain or compression stage; in this design the synthesis bank
// takes them unmodified, as in the published block diagram.
// Interface: the analysis-bank ports of afb_top, the synthesis
// coefficient port (syn_coef_*, see sfb_synth), and the output y_out with
// a one-cycle y_valid strobe per input sample. Clock: 33 cycles per input
// sample, 792 kHz for 24 kHz audio.
// The three-part structure follows the published filter-bank diagram; the
// alignment placement and all sizes not published are this design's own.
module fb_top
  import afb_pkg::*;
#(
  parameter int DATA_W = 16,
  parameter int COEF_W = 16,
  parameter int ACC_W  = 40
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_data,
  input  logic                     coef_we,
  input  logic [COEF_AW-1:0]       coef_addr,
  input  logic signed [COEF_W-1:0] coef_wdata,
  input  logic                     syn_coef_we,
  input  logic [5:0]               syn_coef_addr,
  input  logic signed [COEF_W-1:0] syn_coef_wdata,
  output logic signed [DATA_W-1:0] band_out [NUM_BANDS],
  output logic [NUM_BANDS-1:0]     band_upd,
  output logic [NUM_BANDS-1:0]     band_sat,
  output logic signed [DATA_W-1:0] aligned_out [NUM_BANDS],
  output logic [NUM_BANDS-1:0]     aligned_upd,
  output logic [2:0]               line_busy,
  output logic signed [DATA_W-1:0] y_out,
  output logic                     y_valid,
  output logic                     y_sat,
  output logic                     syn_busy
);

  afb_top #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_afb (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .coef_we, .coef_addr,
    .coef_wdata, .band_out, .band_upd, .band_sat, .line_busy);

  afb_align #(.DATA_W(DATA_W)) u_align (
    .clk, .rst_n, .band_in(band_out), .band_upd,
    .al_out(aligned_out), .al_upd(aligned_upd));

  sfb_synth #(.DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_sfb (
    .clk, .rst_n, .al_out(aligned_out), .al_upd(aligned_upd),
    .coef_we(syn_coef_we), .coef_addr(syn_coef_addr),
    .coef_wdata(syn_coef_wdata), .y_out, .y_valid, .y_sat, .busy(syn_busy));

endmodule
