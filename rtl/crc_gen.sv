// crc_gen: combinational CRC of a DATA_W-bit message.
//
// The message is divided MSB first by the generator polynomial x^CRC_W +
// POLY (POLY holds the lower terms) with an all-zero start value; the
// remainder is the CRC. The strip frame uses CRC_W = 4 with x^4 + x + 1
// over 116 bits; the pad frame uses CRC_W = 8 with x^8 + x^5 + x^3 + x^2
// + x + 1 over 108 bits. Polynomials follow the TDS description; the
// start value and bit order are this design's choices.
module crc_gen #(
  parameter int unsigned       DATA_W = 116,
  parameter int unsigned       CRC_W  = 4,
  parameter logic [CRC_W-1:0]  POLY   = CRC_W'(3)
) (
  input  logic [DATA_W-1:0] data,
  output logic [CRC_W-1:0]  crc
);

  always_comb begin
    logic fb;
    crc = '0;
    for (int i = DATA_W - 1; i >= 0; i--) begin
      fb  = data[i] ^ crc[CRC_W-1];
      crc = {crc[CRC_W-2:0], 1'b0} ^ (fb ? POLY : '0);
    end
  end

endmodule
