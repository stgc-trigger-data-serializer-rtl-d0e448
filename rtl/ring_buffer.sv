// ring_buffer: per-strip hit store waiting for the pad-trigger road.
//
// Holds up to DEPTH (4) hits of one strip channel as 11-bit entries
// {charge, 4 BCID LSBs, BCID flag}. A new hit overwrites the oldest slot
// (circular write pointer). At every BC start, entries older than MAX_AGE
// BCs are invalidated so that the 4-bit BCID tag cannot alias.
//
// Read side (combinational): for the trigger BCID k the newest valid
// entry is returned whose tag equals k, or, when ext_en is set, whose tag
// equals k+1 and whose BCID flag is set (a hit in the first part of BC
// k+1 that also lies in the widened matching window of BC k). The result
// is {hit, charge}; hit = 0 and charge = 0 when nothing matches.
//
// Depth 4 and the matching rule are the TDS's; the 4-bit tag comes from
// the 11-bit ring-buffer word width; the ageing rule and MAX_AGE are this
// design's choices.
module ring_buffer
  import tds_pkg::*;
#(
  parameter int unsigned DEPTH   = 4,
  parameter int unsigned MAX_AGE = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr,
  input  rb_entry_t         wr_entry,
  input  logic              bc_start,
  input  logic [3:0]        cur_bcid_lsb,
  input  logic [BCID_W-1:0] trig_bcid,
  input  logic              ext_en,
  output strip_t            rd
);

  rb_entry_t                  mem [DEPTH];
  logic [DEPTH-1:0]           vld;
  logic [$clog2(DEPTH)-1:0]   wp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      wp  <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (bc_start) begin
        for (int i = 0; i < DEPTH; i++)
          if (4'(cur_bcid_lsb - mem[i].bcid_lsb) >= 4'(MAX_AGE)) vld[i] <= 1'b0;
      end
      if (wr) begin
        mem[wp] <= wr_entry;
        vld[wp] <= 1'b1;
        wp      <= wp + 1'b1;
      end
    end
  end

  always_comb begin
    logic [$clog2(DEPTH)-1:0] idx;
    logic [3:0] k, k1;
    k  = trig_bcid[3:0];
    k1 = k + 4'd1;
    rd = '0;
    // oldest first, so that the newest match wins
    for (int i = 0; i < DEPTH; i++) begin
      idx = wp + ($clog2(DEPTH))'(i);
      if (vld[idx] && (mem[idx].bcid_lsb == k ||
                       (ext_en && mem[idx].flag && mem[idx].bcid_lsb == k1))) begin
        rd.hit = 1'b1;
        rd.q   = mem[idx].q;
      end
    end
  end

endmodule
