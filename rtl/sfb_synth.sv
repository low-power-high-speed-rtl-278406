// sfb_synth: synthesis filter bank of the multirate IFIR filter bank.
//
// Recombines the 18 aligned band signals into one full-rate output:
//   y(n) = g1(n - D1) + I_S1{ up2( g2 delayed D2 ) }(n) + I_S2{ up4( g3 ) }(n)
// where g1 is the sum of bands 18..16 (fs), g2 of bands 15..13 (fs/2) and
// g3 of bands 12..1 (fs/4); up2/up4 insert zeros, and I_S1 (35 taps) and
// I_S2 (49 taps) are symmetric interpolation filters. The group delay lines
// D1 = GRP_DEPTH[0] (input samples) and D2 = GRP_DEPTH[1] (half-rate
// samples) equalise the three paths (afb_pkg explains the sizes).
//
// Operation: the group sums g2 and g3 are latched when the last band of
// their group updates (band 13, band 1). An output sample starts when band
// 16, the last full-rate band, updates (the "tick"): g1 and the phase-
// selected g2/g3 (zero on the stuffed phases) go into the group delay
// lines, one cycle later into the two interpolator delay lines, and the
// two interpolators then run in parallel on one MAC each, 25 cycles (18
// for I_S1). y_valid pulses with y_out 28 cycles after the tick, well
// inside the 33 cycles per input sample. Sums and the output saturate to
// DATA_W bits; y_sat flags a clipped output.
// Coefficient load port: I_S1's 18 unique coefficients at addresses 0..17
// and I_S2's 25 at 18..42, Q1.15, each with the interpolation gain (2, 4)
// folded in as far as Q1.15 allows.
// The structure (group sums, upsampling by 2 and 4, I_S1, I_S2, final
// adders) follows the published block diagram; the interpolator lengths,
// timing, sharing of the analysis bank's delay-line and MAC blocks and
// all widths are this design's own choices.
module sfb_synth
  import afb_pkg::*;
#(
  parameter int DATA_W = 16,
  parameter int COEF_W = 16,
  parameter int ACC_W  = 40
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] al_out [NUM_BANDS],
  input  logic [NUM_BANDS-1:0]     al_upd,
  input  logic                     coef_we,
  input  logic [5:0]               coef_addr,
  input  logic signed [COEF_W-1:0] coef_wdata,
  output logic signed [DATA_W-1:0] y_out,
  output logic                     y_valid,
  output logic                     y_sat,
  output logic                     busy
);

  localparam int M1 = (IS_TAPS[0] + 1) / 2;   // 18
  localparam int M2 = (IS_TAPS[1] + 1) / 2;   // 25
  localparam int SW = DATA_W + 5;
  localparam logic signed [SW-1:0] MAXV = SW'((1 <<< (DATA_W - 1)) - 1);
  localparam logic signed [SW-1:0] MINV = -(SW'(1) <<< (DATA_W - 1));

  function automatic logic signed [DATA_W-1:0] sat(logic signed [SW-1:0] v);
    return (v > MAXV) ? MAXV[DATA_W-1:0] : (v < MINV) ? MINV[DATA_W-1:0]
                                                      : v[DATA_W-1:0];
  endfunction

  // ----------------------------------------------------------- group sums
  logic signed [SW-1:0] s1, s2, s3;
  always_comb begin
    s1 = '0; s2 = '0; s3 = '0;
    for (int b = 0; b < NUM_BANDS; b++) begin
      if (b >= 15)      s1 = s1 + SW'(al_out[b]);
      else if (b >= 12) s2 = s2 + SW'(al_out[b]);
      else              s3 = s3 + SW'(al_out[b]);
    end
  end

  logic                     tick, tick_q;
  logic [1:0]               t, t_q;
  logic signed [DATA_W-1:0] g2_reg, g3_reg, g1d, g2d, g3d;

  assign tick = al_upd[15];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g2_reg <= '0;
      g3_reg <= '0;
      t      <= '0;
      t_q    <= '0;
      tick_q <= 1'b0;
    end else begin
      if (al_upd[12]) g2_reg <= sat(s2);
      if (al_upd[0])  g3_reg <= sat(s3);
      tick_q <= tick;
      if (tick) begin
        t   <= t + 2'd1;
        t_q <= t;
      end
    end
  end

  // group delay lines (GRP_DEPTH[2] is 0 with the chosen lengths)
  afb_sdelay #(.DEPTH(GRP_DEPTH[0]), .W(DATA_W)) u_d1 (
    .clk, .rst_n, .en(tick), .din(sat(s1)), .dout(g1d));
  afb_sdelay #(.DEPTH(GRP_DEPTH[1]), .W(DATA_W)) u_d2 (
    .clk, .rst_n, .en(tick && !t[0]), .din(g2_reg), .dout(g2d));
  afb_sdelay #(.DEPTH(GRP_DEPTH[2]), .W(DATA_W)) u_d3 (
    .clk, .rst_n, .en(tick && t == 2'd0), .din(g3_reg), .dout(g3d));

  // --------------------------------------------- zero-stuffed interpolators
  logic signed [DATA_W-1:0] u1, u2;
  assign u1 = t_q[0]        ? '0 : g2d;
  assign u2 = (t_q != 2'd0) ? '0 : g3d;

  logic                     run;
  logic [6:0]               k;
  logic signed [DATA_W-1:0] a1 [1], b1 [1], a2 [1], b2 [1];
  logic [5:0]               raddr [2];
  logic signed [COEF_W-1:0] rdata [2][1];

  afb_delay_line #(.LEN(IS_TAPS[0]), .P(1), .DATA_W(DATA_W), .IDX_W(7)) u_is1_line (
    .clk, .rst_n, .shift(tick_q), .din(u1), .kbase(k), .ntaps(7'(IS_TAPS[0])),
    .a(a1), .b(b1));
  afb_delay_line #(.LEN(IS_TAPS[1]), .P(1), .DATA_W(DATA_W), .IDX_W(7)) u_is2_line (
    .clk, .rst_n, .shift(tick_q), .din(u2), .kbase(k), .ntaps(7'(IS_TAPS[1])),
    .a(a2), .b(b2));

  assign raddr[0] = 6'(k);
  assign raddr[1] = 6'(M1) + 6'(k);

  afb_coef_mem #(.WORDS(M1 + M2), .COEF_W(COEF_W), .NPORT(2), .MAXP(1), .AW(6)) u_coef (
    .clk, .we(coef_we), .waddr(coef_addr), .wdata(coef_wdata), .raddr, .rdata);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      k   <= '0;
    end else if (tick_q) begin
      run <= 1'b1;
      k   <= '0;
    end else if (run) begin
      if (32'(k) == M2 - 1) run <= 1'b0;
      k <= k + 7'd1;
    end
  end

  logic                     v1, v2, s1f, s2f;
  logic signed [DATA_W-1:0] r1, r2, is1_q;
  logic                     is1_sat;
  logic [3:0]               tag1, tag2;

  afb_mac_set #(.P(1), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_mac1 (
    .clk, .rst_n, .act(run && 32'(k) < M1), .first(k == '0),
    .last(32'(k) == M1 - 1), .tag(4'd0), .a(a1), .b(b1), .c(rdata[0]),
    .res_valid(v1), .res(r1), .res_sat(s1f), .res_tag(tag1));
  afb_mac_set #(.P(1), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_mac2 (
    .clk, .rst_n, .act(run), .first(k == '0),
    .last(32'(k) == M2 - 1), .tag(4'd1), .a(a2), .b(b2), .c(rdata[1]),
    .res_valid(v2), .res(r2), .res_sat(s2f), .res_tag(tag2));

  logic signed [SW-1:0] ysum;
  assign ysum = SW'(g1d) + SW'(is1_q) + SW'(r2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      is1_q   <= '0;
      is1_sat <= 1'b0;
      y_out   <= '0;
      y_valid <= 1'b0;
      y_sat   <= 1'b0;
    end else begin
      if (v1) begin
        is1_q   <= r1;
        is1_sat <= s1f;
      end
      y_valid <= v2;
      if (v2) begin
        y_out <= sat(ysum);
        y_sat <= is1_sat || s2f || (ysum > MAXV) || (ysum < MINV);
      end
    end
  end

  assign busy = run || tick_q;

  // an output sample must finish before the next one starts
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 tick |-> !run);

endmodule
