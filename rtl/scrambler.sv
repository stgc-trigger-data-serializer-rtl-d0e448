// scrambler: multiplicative (self-synchronising) scrambler 1 + x^39 + x^58.
//
// Bit by bit, MSB of the word first: out = in ^ S38 ^ S57, and out is
// shifted into the 58-bit state (S0 <- out, Sn <- Sn-1), as for the
// 10 Gb/s Ethernet scrambler. A word of DW bits is scrambled in one
// cycle: dout is a combinational function of din and the state; on a clk
// edge with en high the state advances by the DW output bits. The
// receiver's descrambler runs the same register on the received bits, so
// it synchronises by itself after 58 bits.
// The polynomial and structure are the TDS's; the all-ones start state
// (so that idle zero data still toggles the line) is this design's.
module scrambler #(
  parameter int unsigned DW = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  logic [57:0] st, st_next;

  always_comb begin
    st_next = st;
    for (int i = DW - 1; i >= 0; i--) begin
      dout[i] = din[i] ^ st_next[38] ^ st_next[57];
      st_next = {st_next[56:0], dout[i]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  st <= '1;
    else if (en) st <= st_next;
  end

endmodule
