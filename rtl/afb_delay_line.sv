// afb_delay_line: one delay line of the filter bank's data memory.
//
// A shift register of LEN samples, x[0] the newest. A one-cycle `shift`
// strobe moves every sample one place down and writes `din` into x[0]; the
// new contents are visible from the next cycle. For the MAC set that serves
// this line it presents P symmetric tap pairs of the sub-filter being
// computed: for lane j and pair index i = kbase + j of an N-tap linear-phase
// filter with m = (N+1)/2 unique coefficients,
//   a[j] = x[i]        if i < m,     else 0
//   b[j] = x[N-1-i]    if i < m - 1, else 0   (the centre tap has no partner)
// so that a[j] + b[j] is the operand of coefficient word i. Lanes past the
// end of the filter read zero, which keeps an unused multiplier idle.
// Reads are combinational; a shift and the reads of the same cycle see the
// old contents, so the last MAC cycle of a sample may overlap the arrival of
// the next one. The samples reset to zero.
// The three lines and their total of 187 registers follow the published
// architecture; the pair-read port is this design's own choice.
module afb_delay_line #(
  parameter int LEN    = 49,
  parameter int P      = 3,
  parameter int DATA_W = 16,
  parameter int IDX_W  = $clog2(LEN + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     shift,
  input  logic signed [DATA_W-1:0] din,
  input  logic [IDX_W-1:0]         kbase,  // first pair index of this cycle
  input  logic [IDX_W-1:0]         ntaps,  // tap length N of the sub-filter
  output logic signed [DATA_W-1:0] a [P],
  output logic signed [DATA_W-1:0] b [P]
);

  logic signed [DATA_W-1:0] x [LEN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) x[i] <= '0;
    end else if (shift) begin
      x[0] <= din;
      for (int i = 1; i < LEN; i++) x[i] <= x[i-1];
    end
  end

  logic [IDX_W:0] m;   // unique coefficients of the current sub-filter
  assign m = (IDX_W+1)'((32'(ntaps) + 1) / 2);

  for (genvar j = 0; j < P; j++) begin : g_lane
    logic [IDX_W:0] i, ib;
    assign i  = (IDX_W+1)'(kbase) + (IDX_W+1)'(j);
    assign ib = (IDX_W+1)'(ntaps) - 1'b1 - i;
    assign a[j] = (i < m && 32'(i) < LEN)                ? x[i]  : '0;
    assign b[j] = (i + 1'b1 < m && 32'(ib) < LEN && ib <= (IDX_W+1)'(ntaps))
                  ? x[ib] : '0;
  end

endmodule
