// pad_pulse_det: leading-edge detection and pad buffer of the pad-TDS.
//
// Every pad input is sampled once per clk. A channel is "yes" for a BC if
// a leading edge (0 then 1) of its VMM pulse was seen during that BC,
// otherwise "no". The 96 pads form 6 groups of 16; the BC boundary of
// group g is shifted by grp_phase[g] * 6.25 ns (four phases of the 40 MHz
// clock) to make up for cable lengths. At its own boundary a group moves
// its edge flags into the first slot of a 2-deep pad buffer; at the chip's
// BC start (bc_start, phase 0) all groups move that slot into the second,
// which drives flags. flags therefore always holds the local BC that ended
// at or before the last BC start, for all groups alike; it changes one
// clk after bc_start. Disabled channels (ch_en = 0) read "no".
//
// Groups, phases, leading-edge rule and buffer depth 2 are the TDS's; the
// exact hand-over instants are this design's choice.
module pad_pulse_det
  import tds_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_PAD-1:0]      pad_in,
  input  logic [N_PAD-1:0]      ch_en,
  input  logic [2*PAD_GROUPS-1:0] grp_phase,   // group g at [2g +: 2]
  input  logic [2:0]            phase,         // tick within the chip BC
  input  logic                  bc_start,
  output logic [N_PAD-1:0]      flags
);

  localparam int unsigned GSZ = N_PAD / PAD_GROUPS;

  logic [N_PAD-1:0] prev, acc, buf1;
  logic [N_PAD-1:0] edge_now, grp_bound;

  always_comb begin
    edge_now = pad_in & ~prev & ch_en;
    for (int g = 0; g < PAD_GROUPS; g++)
      for (int c = 0; c < GSZ; c++)
        grp_bound[g*GSZ + c] = (phase == {grp_phase[2*g +: 2], 1'b0});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev  <= '0;
      acc   <= '0;
      buf1  <= '0;
      flags <= '0;
    end else begin
      prev <= pad_in;
      for (int i = 0; i < N_PAD; i++) begin
        if (grp_bound[i]) begin
          buf1[i] <= acc[i];
          acc[i]  <= edge_now[i];
        end else begin
          acc[i]  <= acc[i] | edge_now[i];
        end
      end
      if (bc_start) flags <= buf1;
    end
  end

endmodule
