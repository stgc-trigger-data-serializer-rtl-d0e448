// tb_cfg_regs: random register writes and reads against a model of the
// register map: 30 parameter bytes (para output and read-back), 5
// diagnostic bytes that follow diag_in in normal mode and are written
// over the port only when para[2:0] = 111, and zero for unused addresses.
module tb_cfg_regs;
  import tds_pkg::*;
  logic clk = 0, rst_n = 0, we;
  logic [6:0] ra;
  logic [7:0] wd, rd;
  logic [239:0] para;
  logic [39:0] din, diag;
  int checks = 0, failures = 0, n_test = 0;

  always #5 clk = ~clk;
  cfg_regs dut (.clk(clk), .rst_n(rst_n), .reg_addr(ra), .wr_en(we), .wr_data(wd),
                .rd_data(rd), .para(para), .diag_in(din), .diag(diag));

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [239:0] mp;
    logic [39:0]  md;
    we = 0; ra = 0; wd = 0; din = 0;
    mp = '0; md = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      bit test;
      test = (mp[2:0] == 3'b111);
      din = {8'($urandom), $urandom};
      ra = 7'($urandom_range(0, 40));
      wd = 8'($urandom);
      if (t % 50 == 10) begin ra = 0; wd = {5'($urandom), 3'b111}; end
      if (t % 50 == 30) begin ra = 0; wd = 8'($urandom) & 8'hFE; end
      we = ($urandom % 2);
      #1;
      // read before the write
      if (ra < 30)      chk(rd == mp[8*ra +: 8], $sformatf("read para %0d", ra));
      else if (ra < 35) chk(rd == md[8*(ra-30) +: 8], $sformatf("read diag %0d", ra));
      else              chk(rd == 0, "read unused");
      @(posedge clk);
      if (we && ra < 30) mp[8*ra +: 8] = wd;
      if (!test) md = din;
      else if (we && ra >= 30 && ra < 35) begin md[8*(ra-30) +: 8] = wd; n_test++; end
      #1;
      chk(para == mp, "para");
      chk(diag == md, "diag");
      @(negedge clk);
      we = 0;
    end
    chk(n_test > 10, "test-mode writes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
