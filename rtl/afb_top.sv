// afb_top: 18-band multirate IFIR quasi-ANSI S1.11 1/3-octave analysis
// filter bank for a digital hearing aid.
//
// The input x (fs, e.g. 24 kHz) feeds delay line 1, on which three MACs
// compute the interpolators I_A1 and I_A2 and the three prototype band
// filters H18, H17, H16 (bands 18..16). The I_A1 output, kept every 2nd
// sample, feeds delay line 2, on which one MAC reuses H18..H16 at fs/2 for
// bands 15..13 (noble identity: H(z^2) before the decimator equals H(z)
// after it). The I_A2 output, kept every 4th sample, feeds delay line 3, on
// which four MACs compute H18..H16 at fs/4 (bands 12..10) and H9..H1
// (bands 9..1). One clock of 33 x fs (792 kHz at 24 kHz) is enough to run
// all of it in real time without stalls.
//
// Blocks: afb_controller (system controller, input handshake and
// schedule), afb_coef_mem and three afb_delay_line (the register module:
// coefficient memory and data memory) and three afb_mac_set (the filter
// engine, 3 + 1 + 4 MACs).
//
// Interface:
//   in_valid/in_ready/in_data  input samples (DATA_W-bit two's complement)
//   coef_we/coef_addr/coef_wdata  coefficient load port; sub-filter f's
//        (N+1)/2 unique taps h[0..(N-1)/2] go at afb_pkg::coef_base(f)+k
//   band_out[b-1]   latest output sample of band b (b = 1..18)
//   band_upd[b-1]   one-cycle strobe: band_out[b-1] was just updated
//   band_sat[b-1]   that update was clipped by saturation
//   line_busy[l]    delay line l+1 is being processed
// Bands 18..16 update once per input sample, 15..13 once per 2 samples and
// 12..1 once per 4 samples. Band outputs are not delay-aligned across
// bands.
// The filter set, the three-line multirate structure, the band mapping and
// the 3/1/4 MAC allocation follow the published design; word widths,
// rounding, the tap lengths (afb_pkg) and the handshakes are this design's
// own choices.
module afb_top
  import afb_pkg::*;
#(
  parameter int DATA_W = 16,
  parameter int COEF_W = 16,
  parameter int ACC_W  = 40,
  parameter int MACS1  = 3,
  parameter int MACS2  = 1,
  parameter int MACS3  = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_data,
  input  logic                     coef_we,
  input  logic [COEF_AW-1:0]       coef_addr,
  input  logic signed [COEF_W-1:0] coef_wdata,
  output logic signed [DATA_W-1:0] band_out [NUM_BANDS],
  output logic [NUM_BANDS-1:0]     band_upd,
  output logic [NUM_BANDS-1:0]     band_sat,
  output logic [2:0]               line_busy
);

  localparam int MAXP = (MACS1 > MACS2) ? ((MACS1 > MACS3) ? MACS1 : MACS3)
                                        : ((MACS2 > MACS3) ? MACS2 : MACS3);

  // ---------------------------------------------------------------- control
  logic [2:0] shift, act, first, last;
  logic       cap2, cap3;
  filt_e      fid   [3];
  logic [6:0] kbase [3];
  logic [1:0] phase;

  afb_controller #(.MACS1(MACS1), .MACS2(MACS2), .MACS3(MACS3)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .shift, .cap2, .cap3, .act, .first, .last,
    .busy(line_busy), .fid, .kbase, .phase);

  // ---------------------------------------------------- coefficient memory
  logic [COEF_AW-1:0]       raddr [3];
  logic signed [COEF_W-1:0] rdata [3][MAXP];

  always_comb
    for (int l = 0; l < 3; l++)
      raddr[l] = COEF_AW'(COEF_BASE[int'(fid[l])] + int'(kbase[l]));

  afb_coef_mem #(.WORDS(COEF_WORDS), .COEF_W(COEF_W), .NPORT(3), .MAXP(MAXP))
    u_coef (.clk, .we(coef_we), .waddr(coef_addr), .wdata(coef_wdata),
            .raddr, .rdata);

  // ------------------------------------------ data memory and filter engine
  logic signed [DATA_W-1:0] hold2, hold3;       // decimated hand-over regs
  logic signed [DATA_W-1:0] res   [3];
  logic [2:0]               res_valid, res_sat;
  logic [3:0]               res_tag [3];

  logic signed [DATA_W-1:0] a1 [MACS1], b1 [MACS1];
  logic signed [DATA_W-1:0] a2 [MACS2], b2 [MACS2];
  logic signed [DATA_W-1:0] a3 [MACS3], b3 [MACS3];
  logic signed [COEF_W-1:0] c1 [MACS1], c2 [MACS2], c3 [MACS3];
  logic [6:0]               ntaps [3];

  always_comb begin
    for (int l = 0; l < 3; l++) ntaps[l] = 7'(TAPS[int'(fid[l])]);
    for (int j = 0; j < MACS1; j++) c1[j] = rdata[0][j];
    for (int j = 0; j < MACS2; j++) c2[j] = rdata[1][j];
    for (int j = 0; j < MACS3; j++) c3[j] = rdata[2][j];
  end

  afb_delay_line #(.LEN(LINE_LEN[0]), .P(MACS1), .DATA_W(DATA_W), .IDX_W(7))
    u_line1 (.clk, .rst_n, .shift(shift[0]), .din(in_data),
             .kbase(kbase[0]), .ntaps(ntaps[0]), .a(a1), .b(b1));
  afb_delay_line #(.LEN(LINE_LEN[1]), .P(MACS2), .DATA_W(DATA_W), .IDX_W(7))
    u_line2 (.clk, .rst_n, .shift(shift[1]), .din(hold2),
             .kbase(kbase[1]), .ntaps(ntaps[1]), .a(a2), .b(b2));
  afb_delay_line #(.LEN(LINE_LEN[2]), .P(MACS3), .DATA_W(DATA_W), .IDX_W(7))
    u_line3 (.clk, .rst_n, .shift(shift[2]), .din(hold3),
             .kbase(kbase[2]), .ntaps(ntaps[2]), .a(a3), .b(b3));

  afb_mac_set #(.P(MACS1), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W))
    u_mac1 (.clk, .rst_n, .act(act[0]), .first(first[0]), .last(last[0]),
            .tag(fid[0]), .a(a1), .b(b1), .c(c1), .res_valid(res_valid[0]),
            .res(res[0]), .res_sat(res_sat[0]), .res_tag(res_tag[0]));
  afb_mac_set #(.P(MACS2), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W))
    u_mac2 (.clk, .rst_n, .act(act[1]), .first(first[1]), .last(last[1]),
            .tag(fid[1]), .a(a2), .b(b2), .c(c2), .res_valid(res_valid[1]),
            .res(res[1]), .res_sat(res_sat[1]), .res_tag(res_tag[1]));
  afb_mac_set #(.P(MACS3), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W))
    u_mac3 (.clk, .rst_n, .act(act[2]), .first(first[2]), .last(last[2]),
            .tag(fid[2]), .a(a3), .b(b3), .c(c3), .res_valid(res_valid[2]),
            .res(res[2]), .res_sat(res_sat[2]), .res_tag(res_tag[2]));

  // --------------------------------------------- hand-over and band outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold2    <= '0;
      hold3    <= '0;
      band_upd <= '0;
      band_sat <= '0;
      for (int b = 0; b < NUM_BANDS; b++) band_out[b] <= '0;
    end else begin
      if (cap2) hold2 <= res[0];
      if (cap3) hold3 <= res[0];
      band_upd <= '0;
      for (int l = 0; l < 3; l++) begin
        if (res_valid[l] && band_of(l, int'(res_tag[l])) != 0) begin
          band_out[band_of(l, int'(res_tag[l])) - 1] <= res[l];
          band_upd[band_of(l, int'(res_tag[l])) - 1] <= 1'b1;
          band_sat[band_of(l, int'(res_tag[l])) - 1] <= res_sat[l];
        end
      end
    end
  end

  // Reading `phase` keeps the controller's sample phase visible to assertions.
  a_cap_phase: assert property (@(posedge clk) disable iff (!rst_n)
                                cap3 |-> phase == 2'd0);

endmodule
