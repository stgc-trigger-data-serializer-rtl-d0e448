// tb_strip_seq: random rotated lines and starts; checks the restored
// window order, the first-15 / last-15 decision, zero charge for strips
// without a hit, the hit count and the one-cycle latency.
module tb_strip_seq;
  import tds_pkg::*;
  logic clk = 0, rst_n = 0, iv, ov, last;
  strip_t lines [WIN];
  logic [6:0] start;
  logic [5:0] ch [N_OUT];
  logic [4:0] nh;
  int checks = 0, failures = 0, nlast = 0, nfirst = 0;

  always #5 clk = ~clk;
  strip_seq dut (.clk(clk), .rst_n(rst_n), .in_valid(iv), .lines(lines), .start(start),
                 .out_valid(ov), .charges(ch), .sel_last(last), .n_hits(nh));

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
    iv = 0; start = 0;
    foreach (lines[i]) lines[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      strip_t w [WIN];
      int lo, hi, off, cnt;
      for (int i = 0; i < WIN; i++) begin
        w[i].hit = ($urandom % 3 == 0);
        w[i].q = 6'($urandom);
      end
      start = 7'($urandom);
      for (int i = 0; i < WIN; i++) lines[(int'(start) + i) % WIN] = w[i];
      lo = int'(w[0].hit) + int'(w[1].hit);
      hi = int'(w[15].hit) + int'(w[16].hit);
      off = (hi > lo) ? 2 : 0;
      iv = 1;
      @(negedge clk);
      iv = 0;
      chk(ov && last == (off == 2), "valid/sel_last");
      cnt = 0;
      for (int i = 0; i < N_OUT; i++) begin
        chk(ch[i] == (w[i + off].hit ? w[i + off].q : 6'd0), $sformatf("t%0d charge %0d", t, i));
        cnt += int'(w[i + off].hit);
      end
      chk(int'(nh) == cnt, "hit count");
      if (off == 2) nlast++; else nfirst++;
    end
    chk(nlast > 50 && nfirst > 50, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
