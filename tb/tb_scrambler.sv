// tb_scrambler: scrambles random 24-bit words and compares with a
// bit-serial model of 1 + x^39 + x^58 (all-ones start), also across
// cycles with en low; then descrambles the output with an independent,
// unsynchronised descrambler and checks that it recovers the data after
// its 58-bit start-up.
module tb_scrambler;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, en;
  logic [23:0] din, dout;
  int checks = 0, failures = 0, nbits = 0;
  logic [57:0] mst, dst;

  always #5 clk = ~clk;
  scrambler #(.DW(24)) dut (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .dout(dout));

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; din = 0;
    mst = '1; dst = 58'h123456789ABCDE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      logic [23:0] e;
      logic [57:0] tmp;
      din = (t % 7 == 0) ? 24'd0 : 24'($urandom);
      en = ($urandom % 4 != 0);
      tmp = mst;
      for (int b = 23; b >= 0; b--) e[b] = scr_bit(tmp, din[b]);
      #1;
      chk(dout == e, $sformatf("scramble t%0d", t));
      if (en) begin
        mst = tmp;
        for (int b = 23; b >= 0; b--) begin
          logic r;
          r = descr_bit(dst, dout[b]);
          if (nbits >= 58) chk(r == din[b], "descramble");
          nbits++;
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
