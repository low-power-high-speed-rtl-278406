// afb_line_seq: schedule sequencer of one delay line (helper of the system
// controller).
//
// A `start` strobe (accepted while `ready`) launches one pass over the
// sub-filters of line LINE, in the order of afb_pkg::LINE_FILT. From the
// next cycle on it issues one MAC-set step per cycle: the sub-filter `fid`,
// the first pair index `kbase` (stepping by P), `first` on the first step
// of a sub-filter and `last` on its last step, ceil(m/P) steps for m unique
// coefficients. `busy` is high while steps are issued; `ready` is high when
// idle or on the final step, so a new pass may be started back to back
// (the delay line shifts at the end of that final cycle).
// One pass therefore takes afb_pkg::line_cycles(LINE, P) cycles: 33, 52
// and 125 for the published allocation of 3, 1 and 4 MACs.
module afb_line_seq
  import afb_pkg::*;
#(
  parameter int LINE = 0,
  parameter int P    = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       ready,
  output logic       first,
  output logic       last,
  output filt_e      fid,
  output logic [6:0] kbase
);

  localparam int NF = LINE_NF[LINE];

  logic [3:0] fi;
  int unsigned m;
  logic       final_step;   // last step of the last sub-filter

  always_comb begin
    fid        = LINE_FILT[LINE][fi];
    m          = 32'(half_len(int'(fid)));
    first      = busy && (kbase == '0);
    last       = busy && (32'(kbase) + 32'(P) >= m);
    final_step = last && (32'(fi) == 32'(NF - 1));
    ready      = !busy || final_step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      fi    <= '0;
      kbase <= '0;
    end else if (start && ready) begin
      busy  <= 1'b1;
      fi    <= '0;
      kbase <= '0;
    end else if (busy) begin
      if (last) begin
        kbase <= '0;
        if (final_step) busy <= 1'b0;
        else            fi   <= fi + 4'd1;
      end else begin
        kbase <= kbase + 7'(P);
      end
    end
  end

endmodule
