// tb_pad_trig_if: drives the two 640 Mb/s road lines (2 bits per clk)
// with an arbitrary bit offset, idle words, random roads and a corrupted
// header, and checks lock, decoded roads in order, loss of lock and
// re-lock.
module tb_pad_trig_if;
  import tds_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] l0, l1;
  logic locked, rv, herr;
  road_t road;
  int checks = 0, failures = 0, n_roads = 0, n_err = 0;
  road_t exp_q [$];
  bit s0 [$], s1 [$];

  always #5 clk = ~clk;
  pad_trig_if dut (.clk(clk), .rst_n(rst_n), .line0(l0), .line1(l1), .locked(locked),
                   .road_valid(rv), .road(road), .hdr_error(herr));

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic put(input logic [15:0] w0, input logic [15:0] w1);
    for (int b = 15; b >= 0; b--) begin s0.push_back(w0[b]); s1.push_back(w1[b]); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rv) begin
      n_roads++;
      if (exp_q.size() == 0) chk(0, "unexpected road");
      else begin
        road_t e;
        e = exp_q.pop_front();
        chk(road == e, $sformatf("road %h exp %h", road, e));
      end
    end
    if (herr) n_err++;
  end

  initial begin
    l0 = 0; l1 = 0;
    for (int pass = 0; pass < 2; pass++) begin
      // odd bit offset on the first pass, even on the second
      s0.delete(); s1.delete();
      for (int i = 0; i < 1 + 2 * pass; i++) begin s0.push_back(0); s1.push_back(0); end
      repeat (3) put(PADTRIG_IDLE, PADTRIG_IDLE);
      for (int r = 0; r < 40; r++) begin
        road_t rr;
        rr.bcid = 12'($urandom); rr.phi = 5'($urandom); rr.band = 8'($urandom);
        if (rr.bcid == 0) rr.bcid = 1;
        if ($urandom % 3 == 0) put(PADTRIG_IDLE, PADTRIG_IDLE);
        put({2'b10, rr.bcid, 2'b00}, {2'b10, rr.phi, rr.band, 1'b0});
        exp_q.push_back(rr);
      end
      put(PADTRIG_IDLE, PADTRIG_IDLE);
      put(16'h4000, PADTRIG_IDLE);      // bad header on line 0
      repeat (2) put(16'h0000, 16'h0000);
      if (s0.size() % 2) begin s0.push_back(0); s1.push_back(0); end
      rst_n = (pass == 0) ? 1'b0 : 1'b1;
      @(negedge clk); rst_n = 1;
      while (s0.size() > 0) begin
        l0 = {s0.pop_front(), s0.pop_front()};
        l1 = {s1.pop_front(), s1.pop_front()};
        @(negedge clk);
      end
      repeat (3) @(negedge clk);
      chk(exp_q.size() == 0, $sformatf("roads missing %0d", exp_q.size()));
      chk(!locked, "lock dropped after bad header");
    end
    chk(n_roads == 80 && n_err == 2, $sformatf("roads %0d errors %0d", n_roads, n_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
