// afb_mac_set: a set of P linear-phase MAC units of the filter engine,
// dedicated to one delay line.
//
// Each cycle with `act` high, every lane j pre-adds its tap pair
// (a[j] + b[j]), multiplies it by coefficient c[j], and the P products are
// summed into one accumulator: `first` clears the accumulator before the
// sum, so one sub-filter output takes ceil(m/P) consecutive cycles for m
// unique coefficients. On the cycle marked `last` the finished sum is
// rounded (round half up) from Q(COEF_W-1) back to a DATA_W-bit sample,
// saturated, and presented on `res` with `res_valid` high for one cycle in
// the following cycle, together with the `tag` given on that last cycle
// and `res_sat` telling whether saturation clipped it.
// The allocation of 3, 1 and 4 MACs to the three lines follows the
// published architecture; word widths, rounding and saturation are this
// design's own choices. The accumulator is ACC_W bits and does not wrap for
// filters of up to 2^(ACC_W-DATA_W-COEF_W-1) unique coefficients.
module afb_mac_set #(
  parameter int P      = 3,
  parameter int DATA_W = 16,
  parameter int COEF_W = 16,
  parameter int ACC_W  = 40,
  parameter int TAG_W  = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     act,
  input  logic                     first,
  input  logic                     last,
  input  logic [TAG_W-1:0]         tag,
  input  logic signed [DATA_W-1:0] a [P],
  input  logic signed [DATA_W-1:0] b [P],
  input  logic signed [COEF_W-1:0] c [P],
  output logic                     res_valid,
  output logic signed [DATA_W-1:0] res,
  output logic                     res_sat,
  output logic [TAG_W-1:0]         res_tag
);

  localparam int FRAC = COEF_W - 1;

  logic signed [ACC_W-1:0] acc, acc_next, rnd;
  logic signed [ACC_W-1:0] sat_hi, sat_lo;

  logic signed [DATA_W+COEF_W:0] prod [P];

  for (genvar j = 0; j < P; j++) begin : g_lane
    logic signed [DATA_W:0] pre;   // symmetric pre-adder
    assign pre     = (DATA_W+1)'(a[j]) + (DATA_W+1)'(b[j]);
    assign prod[j] = pre * c[j];
  end

  always_comb begin
    acc_next = first ? '0 : acc;
    for (int j = 0; j < P; j++) acc_next = acc_next + ACC_W'(prod[j]);
    rnd    = (acc_next + (ACC_W'(1) <<< (FRAC - 1))) >>> FRAC;
    sat_hi = ACC_W'((1 <<< (DATA_W - 1)) - 1);
    sat_lo = -(ACC_W'(1) <<< (DATA_W - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      res_valid <= 1'b0;
      res       <= '0;
      res_sat   <= 1'b0;
      res_tag   <= '0;
    end else begin
      res_valid <= act && last;
      if (act) acc <= acc_next;
      if (act && last) begin
        res_tag <= tag;
        if (rnd > sat_hi) begin
          res <= sat_hi[DATA_W-1:0];  res_sat <= 1'b1;
        end else if (rnd < sat_lo) begin
          res <= sat_lo[DATA_W-1:0];  res_sat <= 1'b1;
        end else begin
          res <= rnd[DATA_W-1:0];     res_sat <= 1'b0;
        end
      end
    end
  end

endmodule
