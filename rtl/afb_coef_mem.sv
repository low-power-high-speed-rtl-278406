// afb_coef_mem: coefficient memory of the filter bank's register module.
//
// Holds the unique (half) coefficient sets of the 14 linear-phase
// sub-filters back to back, WORDS words of COEF_W bits, in the order of
// afb_pkg::filt_e (set f starts at afb_pkg::coef_base(f)). It is written
// one word per cycle through the load port (`we`, `waddr`, `wdata`, taking
// effect at the clock edge) and read through NPORT independent read ports,
// one per delay line, each returning MAXP consecutive words starting at
// `raddr[p]` in the same cycle (combinational read). Words past the end of
// the memory read as zero. The memory has no reset: it must be loaded
// before the filter bank runs.
// That the memory holds the 14 sub-filter coefficient sets follows the
// published architecture. The coefficient values are not published, so
// this design makes the memory writable instead of a fixed table; the port
// structure is this design's own choice.
module afb_coef_mem #(
  parameter int WORDS  = afb_pkg::COEF_WORDS,
  parameter int COEF_W = 16,
  parameter int NPORT  = 3,
  parameter int MAXP   = 4,
  parameter int AW     = $clog2(WORDS)
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [AW-1:0]            waddr,
  input  logic signed [COEF_W-1:0] wdata,
  input  logic [AW-1:0]            raddr [NPORT],
  output logic signed [COEF_W-1:0] rdata [NPORT][MAXP]
);

  logic signed [COEF_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < WORDS) mem[waddr] <= wdata;
  end

  for (genvar p = 0; p < NPORT; p++) begin : g_port
    for (genvar j = 0; j < MAXP; j++) begin : g_word
      logic [AW:0] ad;
      assign ad = (AW+1)'(raddr[p]) + (AW+1)'(j);
      assign rdata[p][j] = (32'(ad) < WORDS) ? mem[ad[AW-1:0]] : '0;
    end
  end

endmodule
