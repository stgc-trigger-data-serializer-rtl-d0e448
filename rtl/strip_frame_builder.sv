// strip_frame_builder: frame build, FIFO control, CRC and scrambling of
// the strip-TDS output.
//
// For every road with strips to send it forms the 120-bit payload
//   [119:108] BCID  [107:100] band-ID  [99:95] phi-ID  [94] spare (0)
//   [93:4]    15 charges, 6 bits each, lowest strip first
//   [3:0]     CRC-4 (x^4 + x + 1) of bits [119:4]
// and queues it in a FIFO of FIFO_DEPTH frames (a frame takes 31.25 ns on
// the link, longer than a BC, so back-to-back roads must wait). On every
// ce160 strobe (one 160 MHz period) one 30-bit word leaves on word:
//   data frame, packets 0..4:  "1010" "10" scrambled payload[119-24k -: 24]
//   no frame pending (NULL):  "1010" "01" scrambled 24 zero bits
// Headers and flags are not scrambled; the 24 data bits of every packet
// (NULL ones included) pass through one continuous 1 + x^39 + x^58
// scrambler. With prbs_en the words are PRBS-31 instead. A road arriving
// with a full FIFO is dropped and counted on overflow.
//
// Timing: a frame written into an empty FIFO starts at the next ce160
// strobe; frame_start is high in the cycle its first word is on word.
// Payload size, packets, headers, flags, CRC and scrambler follow the
// TDS; the field order inside the payload, the FIFO depth and the drop
// policy are this design's choices.
module strip_frame_builder
  import tds_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce160,
  input  logic              prbs_en,
  input  logic              in_valid,
  input  road_t             road,
  input  logic [Q_W-1:0]    charges [N_OUT],
  output logic [PKT_W-1:0]  word,
  output logic              frame_start,
  output logic              overflow
);

  localparam int unsigned AW = $clog2(FIFO_DEPTH);

  logic [STRIP_PAYLOAD_W-1:0] payload;
  logic [STRIP_PAYLOAD_W-STRIP_CRC_W-1:0] body;
  logic [STRIP_CRC_W-1:0]     crc;

  always_comb begin
    body = '0;
    body[115:104] = road.bcid;
    body[103:96]  = road.band;
    body[95:91]   = road.phi;
    body[90]      = 1'b0;
    for (int i = 0; i < N_OUT; i++) body[89 - 6*i -: 6] = charges[i];
  end

  crc_gen #(.DATA_W(116), .CRC_W(STRIP_CRC_W), .POLY(CRC4_POLY)) u_crc (
    .data(body), .crc(crc)
  );

  assign payload = {body, crc};

  // ---------------- FIFO ----------------
  logic [STRIP_PAYLOAD_W-1:0] fifo [FIFO_DEPTH];
  logic [AW:0] wp, rp;
  logic        empty, full, pop;

  assign empty = (wp == rp);
  assign full  = (wp - rp) == (AW+1)'(FIFO_DEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      overflow <= 1'b0;
      for (int i = 0; i < FIFO_DEPTH; i++) fifo[i] <= '0;
    end else begin
      overflow <= 1'b0;
      if (in_valid) begin
        if (!full) begin
          fifo[wp[AW-1:0]] <= payload;
          wp <= wp + 1'b1;
        end else begin
          overflow <= 1'b1;
        end
      end
    end
  end

  // ---------------- packetizer ----------------
  logic [2:0]                 pkt;       // 0: idle, 1..4: next packet index
  logic [STRIP_PAYLOAD_W-1:0] cur;
  logic [PKT_DATA_W-1:0]      sdata, sout;
  logic [1:0]                 flag;
  logic [PKT_W-1:0]           prbs_word;
  logic                       start_now;

  always_comb begin
    start_now = (pkt == 3'd0) && !empty;
    pop       = ce160 && start_now;
    if (start_now) begin
      sdata = fifo[rp[AW-1:0]][119 -: 24];
      flag  = FLAG_DATA;
    end else if (pkt != 3'd0) begin
      sdata = cur[119 - 24*pkt -: 24];
      flag  = FLAG_DATA;
    end else begin
      sdata = '0;
      flag  = FLAG_NULL;
    end
  end

  scrambler #(.DW(PKT_DATA_W)) u_scr (
    .clk(clk), .rst_n(rst_n), .en(ce160 && !prbs_en), .din(sdata), .dout(sout)
  );

  prbs31 #(.W(PKT_W)) u_prbs (
    .clk(clk), .rst_n(rst_n), .en(ce160 && prbs_en), .dout(prbs_word)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp          <= '0;
      pkt         <= '0;
      cur         <= '0;
      word        <= '0;
      frame_start <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      if (ce160) begin
        if (prbs_en) begin
          word <= prbs_word;
        end else begin
          word <= {FRAME_HDR, flag, sout};
          if (pop) begin
            cur         <= fifo[rp[AW-1:0]];
            rp          <= rp + 1'b1;
            pkt         <= 3'd1;
            frame_start <= 1'b1;
          end else if (pkt != 3'd0) begin
            pkt <= (pkt == 3'(N_PKT - 1)) ? 3'd0 : pkt + 3'd1;
          end
        end
      end
    end
  end

endmodule
