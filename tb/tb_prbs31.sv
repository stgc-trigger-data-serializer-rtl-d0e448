// tb_prbs31: compares the 30-bit words with a bit-serial PRBS-31 model
// (x^31 + x^28 + 1, all-ones start), including cycles with en low.
module tb_prbs31;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, en;
  logic [29:0] d;
  logic [30:0] st;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  prbs31 #(.W(30)) dut (.clk(clk), .rst_n(rst_n), .en(en), .dout(d));

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
    en = 0; st = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      logic [29:0] e;
      logic [30:0] tmp;
      en = ($urandom % 5 != 0);
      tmp = st;
      for (int b = 29; b >= 0; b--) e[b] = prbs_bit(tmp);
      #1;
      chk(d == e, $sformatf("word %0d", t));
      if (en) st = tmp;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
