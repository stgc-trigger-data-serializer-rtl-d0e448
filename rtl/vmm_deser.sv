// vmm_deser: deserializer of one VMM strip output channel.
//
// The VMM sends, for each strip with data, one start bit "1" followed by
// the 6-bit charge, MSB first, one bit per clk (320 Mb/s). In IDLE the
// line is low; the first "1" marks the hit, and the BCID and BCID flag
// present in that cycle are attached to it (the BCID is assigned from the
// first edge seen from the VMM). After the sixth charge bit the complete
// entry is presented on entry with hit_valid high for one cycle; the line
// is watched for the next start bit in the following cycle.
// A disabled channel (ch_en = 0) ignores its input.
//
// Latency: hit_valid rises 7 cycles after the start bit was sampled.
// The frame (start bit + 6 bits) and BCID tagging follow the TDS
// description; MSB-first bit order is this design's choice.
module vmm_deser
  import tds_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ch_en,
  input  logic              sdin,
  input  logic [BCID_W-1:0] bcid,
  input  logic              bcid_flag,
  output logic              hit_valid,
  output rb_entry_t         entry
);

  logic         busy;
  logic [2:0]   cnt;
  logic [Q_W-1:0] sh;
  logic [3:0]   tag_bcid;
  logic         tag_flag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      sh        <= '0;
      tag_bcid  <= '0;
      tag_flag  <= 1'b0;
      hit_valid <= 1'b0;
    end else begin
      hit_valid <= 1'b0;
      if (!busy) begin
        if (ch_en && sdin) begin
          busy     <= 1'b1;
          cnt      <= '0;
          tag_bcid <= bcid[3:0];
          tag_flag <= bcid_flag;
        end
      end else begin
        sh  <= {sh[Q_W-2:0], sdin};
        cnt <= cnt + 3'd1;
        if (cnt == 3'(Q_W - 1)) begin
          busy      <= 1'b0;
          hit_valid <= 1'b1;
        end
      end
    end
  end

  assign entry = '{q: sh, bcid_lsb: tag_bcid, flag: tag_flag};

endmodule
