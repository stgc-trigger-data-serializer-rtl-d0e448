// tb_crc_gen: CRC-4 (x^4+x+1, 116 bits) and CRC-8 (x^8+x^5+x^3+x^2+x+1,
// 108 bits) of random and single-bit messages against polynomial long
// division, plus the property that message||CRC leaves remainder zero.
module tb_crc_gen;
  import tds_pkg::*;
  import tb_ref_pkg::*;
  logic [115:0] d4;
  logic [107:0] d8;
  logic [3:0]   c4;
  logic [7:0]   c8;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  crc_gen #(.DATA_W(116), .CRC_W(4), .POLY(4'h3))  u4 (.data(d4), .crc(c4));
  crc_gen #(.DATA_W(108), .CRC_W(8), .POLY(8'h2F)) u8 (.data(d8), .crc(c8));

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
    for (int t = 0; t < 500; t++) begin
      if (t < 116) begin d4 = '0; d4[t] = 1'b1; end
      else for (int i = 0; i < 4; i++) d4[32*i +: 32] = $urandom;
      if (t < 108) begin d8 = '0; d8[t] = 1'b1; end
      else for (int i = 0; i < 4; i++) d8[27*i +: 27] = 27'($urandom);
      @(negedge clk);
      chk(c4 == crc_div(128'(d4), 116, 4, 8'h03)[3:0], $sformatf("crc4 t%0d", t));
      chk(c8 == crc_div(128'(d8), 108, 8, 8'h2F), $sformatf("crc8 t%0d", t));
      chk(crc_div({8'd0, d4, c4}, 120, 4, 8'h03) == 0, "crc4 check");
      chk(crc_div({12'd0, d8, c8}, 116, 8, 8'h2F) == 0, "crc8 check");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
