// bcid_gen: bunch-crossing timing and the pair of BCID counters.
//
// A 3-bit tick counter divides clk (3.125 ns) into 25 ns bunch crossings.
// The local BC boundary can be moved in 6.25 ns steps (bc_phase) to set
// the phase of the local 40 MHz BCID clock. Two 12-bit BCID counters run
// from the same boundary, the second one delayed by 2*win_sel ticks
// (win_sel * 6.25 ns). A hit that arrives while the counters disagree lies
// in the first part of a BC, the part that also falls inside the widened
// matching window of the previous BC; it takes the value of the first
// counter and bcid_flag = 1. win_sel = 0 gives the 25 ns window (both
// counters equal, flag never set), win_sel = 1..4 gives 31.25 .. 50 ns.
// Both counters count BCs from reset and wrap at 2^12; the offset is added
// to the output, so a new offset or win_sel takes effect at once.
//
// Interface: bc_start is a one-cycle strobe on the first tick of each BC,
// phase is the tick index 0..7 inside the BC, bcid/bcid_flag are valid in
// every cycle. The dual-counter scheme, the 12-bit offset, the 6.25 ns
// steps and the 25..50 ns window range are the TDS's; the delay being set
// by the matching-window setting rather than an independent 5 ns delay,
// and the 2^12 wrap, are this design's choices.
module bcid_gen
  import tds_pkg::*;
#(
  parameter int unsigned TICKS = TICKS_PER_BC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BCID_W-1:0] bcid_offset,
  input  logic [1:0]        bc_phase,   // BC boundary shift, 6.25 ns steps
  input  logic [2:0]        win_sel,    // matching window 25 + 6.25*win_sel ns
  output logic              bc_start,
  output logic [2:0]        phase,
  output logic [BCID_W-1:0] bcid,
  output logic              bcid_flag
);

  logic [2:0]        tick;      // free-running reference tick
  logic [3:0]        delay;     // counter-2 delay in ticks, 0..8
  logic [2:0]        inc2_at;

  always_comb begin
    delay    = (win_sel > 3'd4) ? 4'd8 : {win_sel, 1'b0};
    phase    = tick - {bc_phase, 1'b0};
    bc_start = (phase == 3'd0);
    inc2_at  = (delay == 4'd0) ? 3'(TICKS - 1) : 3'(delay - 4'd1);
  end

  logic [BCID_W-1:0] cnt1, cnt2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick <= '0;
      cnt1 <= '0;
      cnt2 <= '0;
    end else begin
      tick <= (tick == 3'(TICKS - 1)) ? 3'd0 : tick + 3'd1;
      if (phase == 3'(TICKS - 1)) cnt1 <= cnt1 + 1'b1;
      // counter 2 reaches each value of counter 1 'delay' ticks later
      if (phase == inc2_at)       cnt2 <= cnt1 + BCID_W'(delay == 4'd0);
    end
  end

  assign bcid      = cnt1 + bcid_offset;
  assign bcid_flag = (cnt1 != cnt2);

endmodule
