// serial_pattern: self-test source of a VMM strip charge pattern.
//
// On a fire strobe (while idle) it plays the same 7-bit serial frame a
// VMM sends for a strip with data: a start bit "1" and then the 6-bit
// charge, MSB first, one bit per clk. The TDS feeds such a generator into
// each of the first strips' deserializers in test mode. busy is high
// while the frame is being sent; fire during busy is ignored.
// The existence of the generator and the 6-bit pattern are the TDS's; the
// fire/charge interface is this design's choice.
module serial_pattern
  import tds_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           fire,
  input  logic [Q_W-1:0] charge,
  output logic           sdout,
  output logic           busy
);

  logic [Q_W:0] sh;     // start bit + charge
  logic [2:0]   left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      left <= '0;
    end else if (left != 3'd0) begin
      sh   <= {sh[Q_W-1:0], 1'b0};
      left <= left - 3'd1;
    end else if (fire) begin
      sh   <= {1'b1, charge};
      left <= 3'(Q_W + 1);
    end
  end

  assign sdout = (left != 3'd0) && sh[Q_W];
  assign busy  = (left != 3'd0);

endmodule
