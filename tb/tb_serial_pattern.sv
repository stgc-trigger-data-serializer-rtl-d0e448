// tb_serial_pattern: fires the test-pattern generator with random charges
// and checks the serial frame bit by bit (start bit, 6 charge bits MSB
// first, then idle) and that fire while busy is ignored.
module tb_serial_pattern;
  import tds_pkg::*;
  logic clk = 0, rst_n = 0, fire, sd, busy;
  logic [5:0] q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  serial_pattern dut (.clk(clk), .rst_n(rst_n), .fire(fire), .charge(q), .sdout(sd), .busy(busy));

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fire = 0; q = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(sd == 0 && !busy, "idle after reset");
    for (int n = 0; n < 100; n++) begin
      logic [6:0] exp;
      logic [5:0] qq;
      qq = 6'($urandom);
      q = qq; fire = 1;
      @(negedge clk);
      fire = 0;
      exp = {1'b1, qq};
      for (int b = 6; b >= 0; b--) begin
        chk(sd == exp[b], $sformatf("frame %0d bit %0d", n, b));
        chk(busy, "busy");
        if (b == 3) begin q = ~qq; fire = 1; end   // ignored
        @(negedge clk);
        fire = 0;
      end
      chk(sd == 0 && !busy, "idle after frame");
      repeat ($urandom_range(0, 3)) begin @(negedge clk); chk(sd == 0, "idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
