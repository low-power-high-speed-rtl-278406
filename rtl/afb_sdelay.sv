// afb_sdelay: strobe-driven delay of DEPTH samples (helper of the
// alignment buffers and the synthesis bank).
//
// On each cycle with `en` high, `din` enters a chain of DEPTH+1 registers
// and every register takes its predecessor's value; `dout` is the last
// register, i.e. the sample that entered DEPTH strobes before the current
// one, visible from the cycle after the strobe. DEPTH = 0 is a single
// output register. All registers reset to zero, so the first DEPTH outputs
// after reset are zero.
module afb_sdelay #(
  parameter int DEPTH = 4,
  parameter int W     = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);

  logic signed [W-1:0] r [DEPTH+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= DEPTH; i++) r[i] <= '0;
    end else if (en) begin
      r[0] <= din;
      for (int i = 1; i <= DEPTH; i++) r[i] <= r[i-1];
    end
  end

  assign dout = r[DEPTH];

endmodule
