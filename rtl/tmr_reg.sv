// tmr_reg: triple modular redundant register with majority vote.
//
// Three copies of a W-bit register hold the same value; q is their
// bitwise majority. Every clock the voted value is written back to all
// three copies, so a single upset copy is outvoted at once and repaired
// on the next edge. A write (we) loads d into all three copies; with
// be (bit enable) only the selected bits are written. Reset value RST.
// The TDS protects its configuration bits and the road look-up table
// with TMR; the write-back of the voted value is this design's choice.
module tmr_reg #(
  parameter int unsigned   W   = 8,
  parameter logic [W-1:0]  RST = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] be,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] c0, c1, c2, nxt;

  assign q   = (c0 & c1) | (c1 & c2) | (c0 & c2);
  assign nxt = we ? ((d & be) | (q & ~be)) : q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c0 <= RST;
      c1 <= RST;
      c2 <= RST;
    end else begin
      c0 <= nxt;
      c1 <= nxt;
      c2 <= nxt;
    end
  end

endmodule
