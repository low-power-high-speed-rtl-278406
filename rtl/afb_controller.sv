// afb_controller: system controller of the filter bank.
//
// Handles the input interface and coordinates the data flow of the three
// delay lines according to the multirate schedule: every input sample runs
// I_A1, I_A2, H18, H17, H16 on line 1; every 2nd sample (phase 0 and 2)
// hands the I_A1 output down to line 2, which then runs H18..H16; every 4th
// sample (phase 0) hands the I_A2 output down to line 3, which then runs
// H18..H16 and H9..H1. This is the decimation by 2 and by 4 of the IFIR
// structure, with each sub-filter computed only at its own rate.
//
// Interface: a sample is accepted on a cycle with `in_valid` and
// `in_ready` both high; `shift[0]` then shifts it into line 1. The cycle
// after line 1 finishes I_A1 (or I_A2) of a sample that is to be kept,
// `cap2` (`cap3`) tells the datapath to capture the MAC result into the
// hand-over register of line 2 (3). When that line's sequencer is ready,
// `shift[1]` (`shift[2]`) moves the register into the line and starts its
// pass. Per line l, `act/first/last/fid/kbase[l]` drive the MAC set and
// the reads of the delay line and coefficient memory.
//
// Timing: with the published allocation line 1 needs 33 cycles per sample,
// line 2 52 cycles per 2 samples and line 3 125 cycles per 4 samples, so
// at a clock of 33 x the sample rate (792 kHz for 24 kHz audio) a new
// sample can be accepted every 33 cycles with no stall. `in_ready` drops
// (a stall) only while line 1 is busy or a hand-over register is still
// occupied, i.e. if samples come faster than that.
// The schedule follows the published one; the hand-over registers and the
// valid/ready input handshake are this design's own choices.
module afb_controller
  import afb_pkg::*;
#(
  parameter int MACS1 = 3,
  parameter int MACS2 = 1,
  parameter int MACS3 = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  output logic [2:0] shift,
  output logic       cap2,     // capture I_A1 result for line 2
  output logic       cap3,     // capture I_A2 result for line 3
  output logic [2:0] act,
  output logic [2:0] first,
  output logic [2:0] last,
  output logic [2:0] busy,
  output filt_e      fid   [3],
  output logic [6:0] kbase [3],
  output logic [1:0] phase     // phase (mod 4) of the sample on line 1
);

  logic [2:0] ready;
  logic [1:0] ph;
  logic       hold2_full, hold3_full;
  logic       cap2_q, cap3_q;

  afb_line_seq #(.LINE(0), .P(MACS1)) u_seq1 (
    .clk, .rst_n, .start(shift[0]), .busy(busy[0]), .ready(ready[0]),
    .first(first[0]), .last(last[0]),
    .fid(fid[0]), .kbase(kbase[0]));

  afb_line_seq #(.LINE(1), .P(MACS2)) u_seq2 (
    .clk, .rst_n, .start(shift[1]), .busy(busy[1]), .ready(ready[1]),
    .first(first[1]), .last(last[1]),
    .fid(fid[1]), .kbase(kbase[1]));

  afb_line_seq #(.LINE(2), .P(MACS3)) u_seq3 (
    .clk, .rst_n, .start(shift[2]), .busy(busy[2]), .ready(ready[2]),
    .first(first[2]), .last(last[2]),
    .fid(fid[2]), .kbase(kbase[2]));

  assign act = busy;
  assign cap2 = cap2_q;
  assign cap3 = cap3_q;

  always_comb begin
    in_ready = ready[0] && !hold2_full && !hold3_full && !cap2_q && !cap3_q;
    shift[0] = in_valid && in_ready;
    shift[1] = hold2_full && ready[1];
    shift[2] = hold3_full && ready[2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph         <= '0;
      phase      <= '0;
      cap2_q     <= 1'b0;
      cap3_q     <= 1'b0;
      hold2_full <= 1'b0;
      hold3_full <= 1'b0;
    end else begin
      if (shift[0]) begin
        phase <= ph;
        ph    <= ph + 2'd1;
      end
      cap2_q <= last[0] && fid[0] == F_IA1 && !phase[0];
      cap3_q <= last[0] && fid[0] == F_IA2 && phase == 2'd0;
      if (cap2_q)        hold2_full <= 1'b1;
      else if (shift[1]) hold2_full <= 1'b0;
      if (cap3_q)        hold3_full <= 1'b1;
      else if (shift[2]) hold3_full <= 1'b0;
    end
  end

  // A decimated sample must never arrive while its hand-over register is
  // still occupied: in_ready holds the input back until it is free.
  a_no_overrun2: assert property (@(posedge clk) disable iff (!rst_n)
                                  cap2_q |-> !hold2_full);
  a_no_overrun3: assert property (@(posedge clk) disable iff (!rst_n)
                                  cap3_q |-> !hold3_full);

endmodule
