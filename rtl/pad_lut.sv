// pad_lut: band-ID to starting-strip look-up table.
//
// Each strip-TDS serves at most 8 roads. Entry i of the table is 15 bits,
// {band-ID[7:0], starting strip[6:0]}; a road whose band-ID equals the
// band field of an entry reads out the 17-strip window that begins at
// that entry's starting strip (index into the 132-strip array: two
// neighbour strips below, 128 own strips, two neighbour strips above).
// The lookup is registered: start/hit/road_out appear one cycle after
// road_valid, with road_out_valid high for that cycle. A road that hits
// no entry gives road_out_valid with hit = 0 (nothing of this TDS in the
// road). The table is held in the triple-redundant configuration
// registers, so this block only reads it; entry 0 wins if several match.
//
// The 8 x 15-bit organisation and the band-ID addressing are the TDS's;
// the content-addressed search and the miss behaviour are this design's.
module pad_lut
  import tds_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_LUT*15-1:0]   table_bits,  // entry i at [15*i +: 15]
  input  logic                  road_valid,
  input  road_t                 road,
  output logic                  road_out_valid,
  output road_t                 road_out,
  output logic                  hit,
  output logic [6:0]            start
);

  logic       m_hit;
  logic [6:0] m_start;

  always_comb begin
    m_hit   = 1'b0;
    m_start = '0;
    for (int i = N_LUT - 1; i >= 0; i--) begin
      if (table_bits[15*i+7 +: 8] == road.band) begin
        m_hit   = 1'b1;
        m_start = table_bits[15*i +: 7];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      road_out_valid <= 1'b0;
      road_out       <= '0;
      hit            <= 1'b0;
      start          <= '0;
    end else begin
      road_out_valid <= road_valid;
      if (road_valid) begin
        road_out <= road;
        hit      <= m_hit;
        start    <= m_start;
      end
    end
  end

endmodule
