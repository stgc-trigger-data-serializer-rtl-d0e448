// gbt_ser: 30-to-1 output serializer (4.8 Gb/s).
//
// Runs on the bit clock clk_ser (30 times the 160 MHz word rate). A mod-30
// counter loads word into the shift register every 30 bit clocks; the
// register then shifts out MSB first on sout. The word source must keep
// word stable for one 160 MHz period and change it away from the load
// edge; the chip's PLL provides phase-locked clocks for that. Latency:
// the first bit of a word appears one bit clock after its load.
// The 30-bit word at 4.8 Gb/s is the TDS's; the TDS lays this part out by
// hand, and this RTL only gives its logic function.
module gbt_ser #(
  parameter int unsigned W = 30
) (
  input  logic         clk_ser,
  input  logic         rst_n,
  input  logic [W-1:0] word,
  output logic         sout,
  output logic         load
);

  logic [$clog2(W)-1:0] cnt;
  logic [W-1:0]         sh;

  assign load = (cnt == '0);

  always_ff @(posedge clk_ser or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      sh  <= '0;
    end else begin
      cnt <= (cnt == ($clog2(W))'(W - 1)) ? '0 : cnt + 1'b1;
      sh  <= load ? word : {sh[W-2:0], 1'b0};
    end
  end

  assign sout = sh[W-1];

endmodule
