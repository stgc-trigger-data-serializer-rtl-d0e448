// tds_pkg: constants, types and helper functions shared by the strip-TDS
// and pad-TDS logic.
//
// Clocking convention used throughout: one logic clock "clk" runs at the
// VMM bit rate (320 Mb/s, i.e. the dual-edge 160 MHz sampling of the chip
// modelled as single-edge sampling at twice the rate). A bunch crossing
// (BC, 25 ns) is TICKS_PER_BC = 8 clk cycles; a 160 MHz cycle is 2 clk
// cycles. The 4.8 Gb/s serializer takes one 30-bit word per 160 MHz cycle.
// Sizes (128 + 4 strip channels, 17-strip window, 15 strips read out,
// 6-bit charge, 12-bit BCID, 4-hit ring buffers, 5 x 30-bit packets,
// "1010" header, "10"/"01" data/NULL flags, 96 pads, 8-bit pad CRC) follow
// the TDS description; the clocking convention is this design's choice.
package tds_pkg;

  localparam int unsigned TICKS_PER_BC = 8;   // 25 ns / 3.125 ns
  localparam int unsigned BCID_W       = 12;
  localparam int unsigned Q_W          = 6;   // strip charge
  localparam int unsigned N_VMM        = 128; // strip channels of one TDS
  localparam int unsigned N_NEIGH      = 2;   // neighbour strips per side
  localparam int unsigned N_CH         = N_VMM + 2 * N_NEIGH; // 132
  localparam int unsigned WIN          = 17;  // strips searched per road
  localparam int unsigned N_OUT        = 15;  // strips sent per road
  localparam int unsigned N_SEL_IN     = 8;   // inputs of each 8-1 SEL
  localparam int unsigned PKT_W        = 30;  // serializer word
  localparam int unsigned N_PKT        = 5;   // packets per strip frame
  localparam int unsigned PKT_DATA_W   = 24;  // scrambled bits per packet
  localparam int unsigned STRIP_PAYLOAD_W = N_PKT * PKT_DATA_W; // 120
  localparam int unsigned STRIP_CRC_W  = 4;
  localparam int unsigned N_PAD        = 96;
  localparam int unsigned PAD_GROUPS   = 6;
  localparam int unsigned PAD_CRC_W    = 8;
  localparam int unsigned PAD_FRAME_W  = 120;
  localparam int unsigned N_PARA       = 240;
  localparam int unsigned N_DIAG       = 40;
  localparam int unsigned N_LUT        = 8;

  localparam logic [3:0] FRAME_HDR = 4'b1010;
  localparam logic [1:0] FLAG_DATA = 2'b10;
  localparam logic [1:0] FLAG_NULL = 2'b01;
  localparam logic [15:0] PADTRIG_IDLE = 16'h8000;

  // 4-bit CRC x^4+x+1 (0x9 in Koopman notation), 8-bit CRC 0x97 (Koopman),
  // i.e. x^8+x^5+x^3+x^2+x+1; both given without the leading x^n term.
  localparam logic [3:0] CRC4_POLY = 4'h3;
  localparam logic [7:0] CRC8_POLY = 8'h2F;

  // One ring-buffer entry: 11 bits, as drawn for the ring buffer data path.
  typedef struct packed {
    logic [Q_W-1:0] q;        // charge
    logic [3:0]     bcid_lsb; // low bits of the BCID the hit was given
    logic           flag;     // BCID flag: the two BCID counters disagreed
  } rb_entry_t;

  // Matched strip as seen after the ring buffer: hit bit plus charge.
  typedef struct packed {
    logic           hit;
    logic [Q_W-1:0] q;
  } strip_t;

  // Decoded pad-trigger road.
  typedef struct packed {
    logic [BCID_W-1:0] bcid;
    logic [4:0]        phi;
    logic [7:0]        band;
  } road_t;

endpackage
