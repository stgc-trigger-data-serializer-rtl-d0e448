// pad_frame_builder: 120-bit pad-TDS frame, one per BC.
//
// At every BC start it takes the 96 yes/no flags and the BCID and forms
//   [119:116] "1010" header (not scrambled)
//   [115:20]  96 pad flags, pad 95 first
//   [19:8]    BCID
//   [7:0]     CRC-8 (x^8 + x^5 + x^3 + x^2 + x + 1) of bits [115:8]
// Bits [115:0] are scrambled (1 + x^39 + x^58, state carried from frame
// to frame). The frame leaves as four 30-bit serializer words, one per
// ce160 strobe, starting with the first ce160 after bc_start
// (frame_start marks the cycle the first word is on word). With prbs_en
// the words are PRBS-31 instead.
// Header, field sizes and their order (header, 96 yes/no bits, BCID, CRC),
// CRC polynomial, scrambler and the 120 bits per BC are the TDS's; the pad
// order inside the flag field and the split into four words are this
// design's.
module pad_frame_builder
  import tds_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bc_start,
  input  logic              ce160,
  input  logic              prbs_en,
  input  logic [N_PAD-1:0]  flags,
  input  logic [BCID_W-1:0] bcid,
  output logic [PKT_W-1:0]  word,
  output logic              frame_start
);

  logic [107:0] body;
  logic [7:0]   crc;
  logic [115:0] scr;
  logic [119:0] frame;
  logic [1:0]   idx;
  logic         pending;
  logic [PKT_W-1:0] prbs_word;

  assign body = {flags, bcid};

  crc_gen #(.DATA_W(108), .CRC_W(PAD_CRC_W), .POLY(CRC8_POLY)) u_crc (
    .data(body), .crc(crc)
  );

  scrambler #(.DW(116)) u_scr (
    .clk(clk), .rst_n(rst_n), .en(bc_start && !prbs_en), .din({body, crc}), .dout(scr)
  );

  prbs31 #(.W(PKT_W)) u_prbs (
    .clk(clk), .rst_n(rst_n), .en(ce160 && prbs_en), .dout(prbs_word)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame       <= '0;
      idx         <= '0;
      pending     <= 1'b0;
      word        <= '0;
      frame_start <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      if (bc_start) begin
        frame   <= {FRAME_HDR, scr};
        idx     <= '0;
        pending <= 1'b1;
      end else if (ce160) begin
        if (prbs_en) begin
          word <= prbs_word;
        end else if (pending) begin
          word        <= frame[119 - 30*idx -: 30];
          frame_start <= (idx == 2'd0);
          idx         <= idx + 2'd1;
          if (idx == 2'd3) pending <= 1'b0;
        end
      end
    end
  end

endmodule
