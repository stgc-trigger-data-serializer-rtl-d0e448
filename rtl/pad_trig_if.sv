// pad_trig_if: receiver and decoder of the pad-trigger road lines.
//
// The pad-trigger logic sends each strip-TDS two serial lines at 640 Mb/s,
// i.e. 2 bits per clk (bit [1] first), one 16-bit word per line per BC:
//   line 0: "10" header, 12-bit trigger BCID, 2 spare bits
//   line 1: "10" header, 5-bit phi-ID, 8-bit band-ID, 1 spare bit
// With no trigger both lines carry 0x8000. The receiver finds the word
// boundary from that idle word: while unlocked it looks for 0x8000 on both
// lines at either bit offset; once locked, a word is taken every 8 clk
// cycles at that offset. A word whose header is not "10" on either line
// drops the lock. A locked word pair that is not the idle pair is a road:
// road/road_valid are registered and road_valid is high for one cycle.
//
// Line rates, word layout, header and idle word are the TDS's; the
// alignment and loss-of-lock rule are this design's choices.
module pad_trig_if
  import tds_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] line0,
  input  logic [1:0] line1,
  output logic       locked,
  output logic       road_valid,
  output road_t      road,
  output logic       hdr_error    // one-cycle strobe when lock is lost
);

  logic [14:0] sr0, sr1;          // with the new 2 bits: 17, either offset
  logic        odd;
  logic [2:0]  cnt;
  logic [15:0] w0, w1;
  logic [16:0] n0, n1;

  always_comb begin
    n0 = {sr0, line0};
    n1 = {sr1, line1};
    w0 = odd ? n0[16:1] : n0[15:0];
    w1 = odd ? n1[16:1] : n1[15:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr0        <= '0;
      sr1        <= '0;
      odd        <= 1'b0;
      cnt        <= '0;
      locked     <= 1'b0;
      road_valid <= 1'b0;
      road       <= '0;
      hdr_error  <= 1'b0;
    end else begin
      sr0        <= n0[14:0];
      sr1        <= n1[14:0];
      road_valid <= 1'b0;
      hdr_error  <= 1'b0;
      if (!locked) begin
        if (n0[15:0] == PADTRIG_IDLE && n1[15:0] == PADTRIG_IDLE) begin
          locked <= 1'b1;
          odd    <= 1'b0;
          cnt    <= '0;
        end else if (n0[16:1] == PADTRIG_IDLE && n1[16:1] == PADTRIG_IDLE) begin
          locked <= 1'b1;
          odd    <= 1'b1;
          cnt    <= '0;
        end
      end else begin
        cnt <= cnt + 3'd1;
        if (cnt == 3'd7) begin
          if (w0[15:14] != 2'b10 || w1[15:14] != 2'b10) begin
            locked    <= 1'b0;
            hdr_error <= 1'b1;
          end else if (!(w0 == PADTRIG_IDLE && w1 == PADTRIG_IDLE)) begin
            road_valid <= 1'b1;
            road.bcid  <= w0[13:2];
            road.phi   <= w1[13:9];
            road.band  <= w1[8:1];
          end
        end
      end
    end
  end

endmodule
