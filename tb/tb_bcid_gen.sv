// tb_bcid_gen: checks BC strobes, the BCID count from the offset, the
// BC clock phase shift and the BCID flag of the delayed second counter
// for every matching-window setting.
module tb_bcid_gen;
  import tds_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [11:0] off;
  logic [1:0]  bcp;
  logic [2:0]  win;
  logic        bc_start, flag;
  logic [2:0]  phase;
  logic [11:0] bcid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bcid_gen dut (.clk(clk), .rst_n(rst_n), .bcid_offset(off), .bc_phase(bcp),
                .win_sel(win), .bc_start(bc_start), .phase(phase), .bcid(bcid), .bcid_flag(flag));

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cfg = 0; cfg < 10; cfg++) begin
      int t, exp_ph, nbc, d;
      logic [11:0] exp_bcid;
      off = 12'($urandom);
      if (cfg == 9) off = 12'hFFE;      // wrap
      bcp = 2'(cfg % 4);
      win = 3'(cfg % 5);
      d   = 2 * int'(win);
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      t = 0;
      nbc = 0;
      // after reset release, tick 0 is the first cycle
      for (int i = 0; i < 80; i++) begin
        exp_ph = (t - 2 * int'(bcp) + 64) % 8;
        exp_bcid = off + 12'(nbc);
        #1;
        chk(phase == 3'(exp_ph), $sformatf("phase cfg%0d t%0d", cfg, t));
        chk(bc_start == (exp_ph == 0), "bc_start");
        chk(bcid == exp_bcid, $sformatf("bcid cfg%0d t%0d %h/%h", cfg, t, bcid, exp_bcid));
        if (nbc >= 1) chk(flag == (d == 8 ? 1'b1 : (exp_ph < d)),
                          $sformatf("flag cfg%0d ph%0d", cfg, exp_ph));
        @(negedge clk);
        if (exp_ph == 7) nbc++;
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
