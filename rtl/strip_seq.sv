// strip_seq: strip sequencer, selection of the 15 strips sent out.
//
// Takes the 17 selector lines (rotated order, see strip_sel) and the
// window start, puts them back in window order (window strip i is line
// (start + i) mod 17), and chooses which 15 of the 17 strips go out:
// the last 15 if more matched hits lie in the two strips only the last
// set contains (window strips 15, 16) than in the two only the first set
// contains (strips 0, 1); otherwise the first 15. Strips without a
// matched hit are sent with charge 0. Output is registered: one cycle
// after in_valid, out_valid is high with the charges (charges[0] is the
// lowest strip of the chosen 15), sel_last and the hit count of the 15.
//
// Reading 17 strips and sending the first or last 15 are the TDS's; the
// rule that decides between them is this design's.
module strip_seq
  import tds_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  strip_t         lines [WIN],
  input  logic [6:0]     start,
  output logic           out_valid,
  output logic [Q_W-1:0] charges [N_OUT],
  output logic           sel_last,
  output logic [4:0]     n_hits
);

  strip_t     win [WIN];
  logic       last;
  logic [4:0] cnt;

  always_comb begin
    int unsigned s_mod;
    s_mod = 32'(start) % WIN;
    for (int unsigned i = 0; i < WIN; i++) win[i] = lines[(s_mod + i) % WIN];
    last = (2'(win[15].hit) + 2'(win[16].hit)) > (2'(win[0].hit) + 2'(win[1].hit));
    cnt = '0;
    for (int unsigned i = 0; i < N_OUT; i++)
      cnt = cnt + 5'(win[i + (last ? 2 : 0)].hit);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sel_last  <= 1'b0;
      n_hits    <= '0;
      for (int i = 0; i < N_OUT; i++) charges[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sel_last <= last;
        n_hits   <= cnt;
        for (int unsigned i = 0; i < N_OUT; i++) begin
          strip_t st;
          st = win[i + (last ? 2 : 0)];
          charges[i] <= st.hit ? st.q : '0;
        end
      end
    end
  end

endmodule
