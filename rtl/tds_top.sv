// tds_top: the two TDS configurations side by side.
//
// The same chip works either as a pad-TDS or as a strip-TDS. In the
// trigger, pad-TDS frames go to the off-detector pad-trigger logic, which
// finds the pad towers and returns road words to the strip-TDS; that logic
// is not part of the chip, so the two instances here share nothing and
// bring all their ports out: p_* for the pad-TDS and s_* for the
// strip-TDS. Both take clk (320 MHz, 8 cycles per BC) and clk_ser
// (4.8 GHz, 15 x clk, phase-locked), the clocks the on-chip PLL provides.
module tds_top
  import tds_pkg::*;
(
  input  logic               clk,
  input  logic               clk_ser,
  input  logic               rst_n,
  // pad-TDS
  input  logic [2:0]         p_chip_id,
  input  logic               p_scl,
  input  logic               p_sda_in,
  output logic               p_sda_oe,
  input  logic [N_PAD-1:0]   p_pad_in,
  output logic               p_ser_out,
  output logic [PKT_W-1:0]   p_word,
  output logic               p_frame_start,
  // strip-TDS
  input  logic [2:0]         s_chip_id,
  input  logic               s_scl,
  input  logic               s_sda_in,
  output logic               s_sda_oe,
  input  logic [N_VMM-1:0]   s_vmm_sd,
  input  logic [N_NEIGH-1:0] s_neigh_lo,
  input  logic [N_NEIGH-1:0] s_neigh_hi,
  input  logic [1:0]         s_pad_line0,
  input  logic [1:0]         s_pad_line1,
  output logic               s_ser_out,
  output logic [PKT_W-1:0]   s_word,
  output logic               s_frame_start,
  output logic               s_road_locked
);

  pad_tds u_pad (
    .clk(clk), .clk_ser(clk_ser), .rst_n(rst_n), .chip_id(p_chip_id),
    .scl(p_scl), .sda_in(p_sda_in), .sda_oe(p_sda_oe), .pad_in(p_pad_in),
    .ser_out(p_ser_out), .word(p_word), .frame_start(p_frame_start)
  );

  strip_tds u_strip (
    .clk(clk), .clk_ser(clk_ser), .rst_n(rst_n), .chip_id(s_chip_id),
    .scl(s_scl), .sda_in(s_sda_in), .sda_oe(s_sda_oe), .vmm_sd(s_vmm_sd),
    .neigh_lo(s_neigh_lo), .neigh_hi(s_neigh_hi), .pad_line0(s_pad_line0),
    .pad_line1(s_pad_line1), .ser_out(s_ser_out), .word(s_word),
    .frame_start(s_frame_start), .road_locked(s_road_locked)
  );

endmodule
