// tb_strip_frame_builder: sends roads with random charges, alone and in
// bursts that overflow the FIFO, then a stretch of PRBS-31. Every output
// word is checked: "1010" header, "10"/"01" flag, descrambled NULL data
// equal to zero, data frames of five packets whose descrambled payload
// carries the expected BCID, band-ID, phi-ID, charges and a correct CRC-4,
// in order, minus the roads reported as dropped. Also checks the start
// latency into an idle link and the PRBS-31 words.
module tb_strip_frame_builder;
  import tds_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, ce, prbs, iv, fs, ovf;
  road_t road;
  logic [5:0] ch [N_OUT];
  logic [29:0] word;
  int checks = 0, failures = 0, n_frames = 0, n_null = 0, n_ovf = 0, n_prbs = 0;
  int pk = 0;            // packets of the current frame seen
  logic [119:0] pay;
  logic [57:0] dst;
  logic [30:0] pst;
  logic [119:0] expq [$];

  always #5 clk = ~clk;

  strip_frame_builder #(.FIFO_DEPTH(4)) dut (.clk(clk), .rst_n(rst_n), .ce160(ce), .prbs_en(prbs),
      .in_valid(iv), .road(road), .charges(ch), .word(word), .frame_start(fs), .overflow(ovf));

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

  // ce160 every second cycle
  always @(posedge clk) if (!rst_n) ce <= 0; else ce <= ~ce;

  // output checker: a word is new in the cycle after a ce160 edge
  logic ce_d;
  always @(posedge clk) begin
    ce_d <= ce && rst_n;
    #1;
    if (ce_d) begin
      if (prbs) begin
        logic [29:0] e;
        for (int b = 29; b >= 0; b--) e[b] = prbs_bit(pst);
        chk(word == e, "prbs word");
        n_prbs++;
      end else begin
        logic [23:0] d;
        for (int b = 23; b >= 0; b--) d[b] = descr_bit(dst, word[b]);
        chk(word[29:26] == FRAME_HDR, "header");
        if (pk == 0 && word[25:24] == FLAG_NULL) begin
          chk(d == 0, "null data");
          chk(!fs, "no frame_start on NULL");
          n_null++;
        end else begin
          chk(word[25:24] == FLAG_DATA, "data flag");
          if (pk == 0) chk(fs, "frame_start");
          pay[119 - 24*pk -: 24] = d;
          pk++;
          if (pk == 5) begin
            pk = 0;
            n_frames++;
            chk(crc_div({8'd0, pay}, 120, 4, 8'h03) == 0, "crc");
            if (expq.size() == 0) chk(0, "unexpected frame");
            else begin logic [115:0] ee; ee = expq.pop_front(); chk(pay[119:4] == ee, $sformatf("payload frame %0d got %h exp %h t=%0t", n_frames, pay[119:4], ee, $time)); end
          end
        end
      end
    end
  end

  task automatic send_road(input bit burst);
    logic [115:0] e;
    road.bcid = 12'($urandom); road.band = 8'($urandom); road.phi = 5'($urandom);
    for (int i = 0; i < N_OUT; i++) ch[i] = ($urandom % 2) ? 6'($urandom) : 6'd0;
    e = '0;
    e[115:104] = road.bcid; e[103:96] = road.band; e[95:91] = road.phi;
    for (int i = 0; i < N_OUT; i++) e[89 - 6*i -: 6] = ch[i];
    expq.push_back({e, 4'd0} >> 4);
    iv = 1;
    @(negedge clk);
    iv = 0;
    if (!burst) begin
      int lat;
      lat = 0;
      while (!fs && lat < 20) begin @(negedge clk); lat++; end
      chk(lat <= 3, $sformatf("start latency %0d", lat));
    end
  endtask

  // dropped roads: remove the last queued one
  always @(posedge clk) begin
    #2;
    if (ovf) begin n_ovf++; void'(expq.pop_back()); end
  end

  initial begin
    iv = 0; prbs = 0; road = '0; foreach (ch[i]) ch[i] = 0;
    dst = '1; pst = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    for (int r = 0; r < 30; r++) begin
      send_road(0);
      repeat ($urandom_range(12, 30)) @(negedge clk);
    end
    for (int b = 0; b < 3; b++) begin
      int o0;
      o0 = n_ovf;
      for (int r = 0; r < 8; r++) send_road(1);
      repeat (120) @(negedge clk);
      // from an idle link exactly one frame leaves within the 8-cycle burst
      // (the next packet boundary is at most 2 cycles away, a frame lasts 10),
      // so FIFO_DEPTH + 1 roads are kept
      chk(8 - (n_ovf - o0) == 4 + 1, $sformatf("burst kept %0d roads", 8 - (n_ovf - o0)));
    end
    prbs = 1;
    @(negedge clk); @(negedge clk);
    repeat (200) @(negedge clk);
    @(posedge clk); #3; prbs = 0;
    @(negedge clk);
    for (int r = 0; r < 5; r++) begin
      send_road(0);
      repeat (20) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    chk(expq.size() == 0, $sformatf("frames missing %0d", expq.size()));
    chk(n_ovf > 0 && n_null > 50 && n_prbs > 50 && n_frames > 40,
        $sformatf("coverage ovf %0d null %0d prbs %0d frames %0d", n_ovf, n_null, n_prbs, n_frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
