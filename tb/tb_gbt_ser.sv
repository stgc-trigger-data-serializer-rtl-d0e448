// tb_gbt_ser: feeds a new random 30-bit word every 30 bit clocks, away
// from the load edge, and checks the serial stream bit by bit (MSB first,
// first bit one bit clock after the load).
module tb_gbt_ser;
  logic clk_ser = 0, rst_n = 0, sout, load;
  logic [29:0] word;
  int checks = 0, failures = 0;
  logic [29:0] q [$];

  always #1 clk_ser = ~clk_ser;
  gbt_ser #(.W(30)) dut (.clk_ser(clk_ser), .rst_n(rst_n), .word(word), .sout(sout), .load(load));

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (100000) @(posedge clk_ser);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word = 30'($urandom);
    repeat (3) @(negedge clk_ser);
    rst_n = 1;
    for (int w = 0; w < 500; w++) begin
      logic [29:0] cur;
      // load happens at the next posedge (counter at 0)
      cur = word;
      @(posedge clk_ser);
      #0.5;
      chk(load == 1'b0, "load period");
      for (int b = 29; b >= 0; b--) begin
        chk(sout == cur[b], $sformatf("word %0d bit %0d", w, b));
        if (b == 15) word = 30'($urandom);    // change mid-word
        if (b > 0) begin @(posedge clk_ser); #0.5; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
