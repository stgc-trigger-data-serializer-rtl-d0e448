// strip_sel: the seventeen 8-to-1 strip selectors.
//
// The 132 strips (index 0..131) are wired to 17 selectors so that
// selector r sees strips r, r+17, r+34, ..., r+119 (inputs beyond strip
// 131 read as zero). Any 17 consecutive strips contain exactly one strip
// of each residue modulo 17, so with the window start s every selector
// picks exactly one strip of the window s..s+16: selector r takes
// strip s + ((r - s) mod 17). The 17 lines therefore leave in "rotated"
// order; the strip sequencer puts them back in window order.
// Purely combinational.
//
// The selector count, the 8 inputs and the r + 17k wiring are the TDS's;
// the explicit selection formula is this design's reading of that wiring.
module strip_sel
  import tds_pkg::*;
(
  input  strip_t     strips [N_CH],
  input  logic [6:0] start,
  output strip_t     lines  [WIN]
);

  always_comb begin
    int unsigned s_mod, d, k;
    s_mod = 32'(start) % WIN;
    for (int unsigned r = 0; r < WIN; r++) begin
      d = (r + WIN - s_mod) % WIN;           // position of line r in window
      k = (32'(start) + d) / WIN;            // which of the 8 inputs
      lines[r] = '0;
      for (int unsigned j = 0; j < N_SEL_IN; j++)
        if (j == k && (r + WIN * j) < N_CH) lines[r] = strips[r + WIN * j];
    end
  end

endmodule
