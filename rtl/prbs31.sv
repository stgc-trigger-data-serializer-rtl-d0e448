// prbs31: PRBS-31 pattern source for link tests (x^31 + x^28 + 1).
//
// Each clk with en high it outputs the next 30 bits of the sequence as one
// serializer word (first bit in bit 29). The Fibonacci register is seeded
// with all ones at reset. The TDS offers PRBS-31 on its serial output for
// eye-diagram and bit-error tests; word packing and seed are this
// design's choices.
module prbs31 #(
  parameter int unsigned W = 30
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] dout
);

  logic [30:0] st, st_next;

  always_comb begin
    st_next = st;
    for (int i = W - 1; i >= 0; i--) begin
      dout[i] = st_next[30] ^ st_next[27];
      st_next = {st_next[29:0], dout[i]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  st <= '1;
    else if (en) st <= st_next;
  end

endmodule
