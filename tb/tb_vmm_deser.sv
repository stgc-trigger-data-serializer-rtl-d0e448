// tb_vmm_deser: sends VMM frames (start bit + 6-bit charge) with random
// gaps and charges, and checks charge, BCID tag taken at the start bit,
// the flag, the 7-cycle latency and that a disabled channel stays quiet.
module tb_vmm_deser;
  import tds_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ch_en, sdin, flag, hv;
  logic [11:0] bcid;
  rb_entry_t ent;
  int checks = 0, failures = 0, nhits = 0, cyc = 0, exp_cyc;
  logic [5:0] exp_q;
  logic [3:0] exp_b;
  logic       exp_f;
  bit         expect_hit;

  always #5 clk = ~clk;
  always @(posedge clk) begin cyc++; bcid <= bcid + 12'd1; flag <= ~flag; end

  vmm_deser dut (.clk(clk), .rst_n(rst_n), .ch_en(ch_en), .sdin(sdin), .bcid(bcid),
                 .bcid_flag(flag), .hit_valid(hv), .entry(ent));

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

  // monitor
  always @(posedge clk) if (rst_n) begin
    #1;
    if (hv) begin
      nhits++;
      chk(expect_hit, "unexpected hit");
      chk(ent.q == exp_q, $sformatf("charge %h exp %h", ent.q, exp_q));
      chk(ent.bcid_lsb == exp_b && ent.flag == exp_f, "bcid tag");
      chk(cyc == exp_cyc, $sformatf("latency cyc %0d exp %0d", cyc, exp_cyc));
      expect_hit = 0;
    end
  end

  initial begin
    bcid = 0; flag = 0; sdin = 0; ch_en = 1; expect_hit = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [5:0] q;
      q = 6'($urandom);
      ch_en = (n % 10 != 9);
      repeat ($urandom_range(0, 5)) @(negedge clk);
      sdin = 1;
      @(posedge clk);           // start bit sampled here
      exp_b = bcid[3:0]; exp_f = flag; exp_q = q;
      exp_cyc = cyc + 7;
      expect_hit = ch_en;
      for (int b = 5; b >= 0; b--) begin
        @(negedge clk); sdin = q[b];
        if (!ch_en && b == 3) sdin = 0; // keep a disabled line simple
      end
      @(negedge clk); sdin = 0;
      repeat (2) @(negedge clk);
      chk(!expect_hit, "hit missing");
      expect_hit = 0;
    end
    chk(nhits == 180, $sformatf("hit count %0d", nhits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
