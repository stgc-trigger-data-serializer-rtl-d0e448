// tb_strip_tds: end-to-end test of the strip-TDS at its default sizes.
//
// Configures the chip over I2C (BCID offset, 31.25 ns matching window
// with the BCID+1 extension, road table), drives VMM serial hits on all
// 132 strip inputs and pad-trigger road words on the two 640 Mb/s lines,
// and checks every frame that leaves: header/flags, descrambled payload
// (BCID, band-ID, phi-ID, 15 charges, CRC-4) against a model that does
// its own BCID tagging, BCID matching, window and first/last-15 choice.
// It also checks the serial output against the parallel words, the
// road-to-frame latency, a road for a band not in the table (no frame), a
// burst of roads that overflows the FIFO (dropped count read back through
// the diagnostic registers), the test-pattern mode and the PRBS-31 mode.
// Every mechanism is counted; one that never occurs is a failure.
module tb_strip_tds;
  import tds_pkg::*;
  import tb_ref_pkg::*;

  localparam int TMAX = 40000;
  localparam logic [11:0] OFFSET = 12'h5A3;

  logic clk = 0, clk_ser = 0, rst_n = 0;
  logic scl, sda_m, sda_oe;
  wire  sda_line = sda_m & ~sda_oe;
  logic [2:0]   chip_id = 3'd2;
  logic [127:0] vmm;
  logic [1:0]   nlo, nhi, l0, l1;
  logic         ser, fs, locked;
  logic [29:0]  word;
  int I2C_Q = 4;
  int checks = 0, failures = 0;
  int tick = -1;

  // stimulus timelines
  logic [N_CH-1:0] tl [TMAX];
  bit pb0 [2*TMAX], pb1 [2*TMAX];

  // mechanism counters
  int c_lock = 0, c_first = 0, c_last = 0, c_ext = 0, c_excl = 0, c_miss = 0;
  int c_ovf = 0, c_null = 0, c_pat = 0, c_prbs = 0, c_frames = 0, c_edge = 0;

  always #15 clk = ~clk;
  initial begin #0.5; forever #1 clk_ser = ~clk_ser; end

  strip_tds dut (.clk(clk), .clk_ser(clk_ser), .rst_n(rst_n), .chip_id(chip_id), .scl(scl),
                 .sda_in(sda_line), .sda_oe(sda_oe), .vmm_sd(vmm), .neigh_lo(nlo), .neigh_hi(nhi),
                 .pad_line0(l0), .pad_line1(l1), .ser_out(ser), .word(word), .frame_start(fs),
                 .road_locked(locked));

  `include "i2c_bfm.svh"

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0d)", m, tick); end
  endtask

  initial begin
    repeat (TMAX - 10) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- drive timelines ----------------
  always @(negedge clk) begin
    int t;
    if (rst_n) tick <= tick + 1;
    t = (tick + 1 < TMAX && rst_n) ? tick + 1 : TMAX - 1;
    {nhi, vmm, nlo} = tl[t];
    l0 = {pb0[2*t], pb0[2*t+1]};
    l1 = {pb1[2*t], pb1[2*t+1]};
  end

  // word slots on the road lines: slot s covers bits 1+16s .. 16+16s
  function automatic void put_word(int s, logic [15:0] w0, logic [15:0] w1);
    for (int b = 0; b < 16; b++) begin
      pb0[1 + 16*s + b] = w0[15-b];
      pb1[1 + 16*s + b] = w1[15-b];
    end
  endfunction

  // hit frame on strip e starting at tick t
  function automatic void put_hit(int e, int t, logic [5:0] q);
    logic [6:0] f;
    f = {1'b1, q};
    for (int b = 0; b < 7; b++) tl[t + b][e] = f[6-b];
  endfunction

  function automatic logic [11:0] bcid_at(int t);
    return OFFSET + 12'(t / 8);
  endfunction

  // ---------------- expected frames ----------------
  logic [115:0] expq [$];
  int           exp_dec [$];     // tick at which the road word was complete

  // ---------------- output collector ----------------
  logic [57:0] dst = '1;
  logic [119:0] pay;
  int pk = 0, n_skip = 0;
  bit collect = 1;
  logic [29:0] prbs_words [$];
  int lat_max = 0;

  always @(posedge clk) begin
    #1;
    if (rst_n && tick >= 0 && tick % 2 == 1) begin   // word changes on odd-phase edges
      if (collect) begin
        logic [23:0] d;
        for (int b = 23; b >= 0; b--) d[b] = descr_bit(dst, word[b]);
        chk(word[29:26] == FRAME_HDR, "header");
        if (pk == 0 && word[25:24] == FLAG_NULL) begin
          if (tick > 12) chk(d == 0, "null data");  // descrambler start-up
          c_null++;
        end else begin
          chk(word[25:24] == FLAG_DATA, "flag");
          if (pk == 0) begin
            chk(fs, "frame_start");
            if (exp_dec.size() > 0) begin
              int lat;
              lat = exp_dec.pop_front();
              lat = tick - lat;
              if (lat < 1000 && lat > lat_max) lat_max = lat;
            end
          end
          pay[119 - 24*pk -: 24] = d;
          pk++;
          if (pk == 5) begin
            pk = 0;
            c_frames++;
            chk(crc_div({8'd0, pay}, 120, 4, 8'h03) == 0, "crc");
            // match against the expected queue; roads dropped by the FIFO are skipped
            while (expq.size() > 0 && expq[0] != pay[119:4]) begin
              void'(expq.pop_front()); n_skip++;
            end
            if (expq.size() == 0) chk(0, $sformatf("unexpected frame %h", pay[119:4]));
            else begin void'(expq.pop_front()); chk(1, "frame"); end
          end
        end
      end else prbs_words.push_back(word);
    end
  end

  // ---------------- serial output against parallel words ----------------
  bit sbits [$];
  logic [29:0] wat [$];
  always @(posedge clk_ser) if (rst_n && collect) begin
    sbits.push_back(ser);
    wat.push_back(word);
  end

  // ---------------- test ----------------
  logic [239:0] para;
  logic [7:0]   lut_band [8];
  logic [6:0]   lut_start [8];

  task automatic cfg_write_all(input int first, input int last);
    bit ok;
    for (int r = first; r <= last; r++) begin
      i2c_write(chip_id, 7'(r), para[8*r +: 8], ok);
      chk(ok, "i2c write ack");
    end
  endtask

  // one road with random hits around BC k, road word in slot k+3
  task automatic road(input int k, input int li, input bit burst);
    strip_t w [WIN];
    logic [5:0] ch [N_OUT];
    int s, off, lo, hi;
    logic [4:0] phi;
    logic [115:0] e;
    s = int'(lut_start[li]);
    phi = 5'($urandom);
    for (int i = 0; i < WIN; i++) begin
      int cat, ei;
      logic [5:0] q;
      ei = s + i;
      w[i] = '0;
      cat = burst ? 0 : $urandom_range(0, 9);
      q = 6'($urandom_range(1, 63));
      if (ei < N_CH && cat >= 4) begin
        case (cat)
          4, 5, 6: begin put_hit(ei, 8*k + $urandom_range(0, 7), q); w[i] = '{1'b1, q}; end
          7: begin put_hit(ei, 8*(k+1) + $urandom_range(0, 1), q); w[i] = '{1'b1, q}; c_ext++; end
          8: begin put_hit(ei, 8*(k+1) + $urandom_range(2, 7), q); c_excl++; end
          default: begin put_hit(ei, 8*(k-2) + $urandom_range(0, 7), q); c_excl++; end
        endcase
        if (ei < 2 || ei >= 130) c_edge++;
      end
    end
    lo = int'(w[0].hit) + int'(w[1].hit);
    hi = int'(w[15].hit) + int'(w[16].hit);
    off = (hi > lo) ? 2 : 0;
    if (!burst) begin if (off) c_last++; else c_first++; end
    for (int i = 0; i < N_OUT; i++) ch[i] = w[i + off].hit ? w[i + off].q : 6'd0;
    e = '0;
    e[115:104] = bcid_at(8*k); e[103:96] = lut_band[li]; e[95:91] = phi;
    for (int i = 0; i < N_OUT; i++) e[89 - 6*i -: 6] = ch[i];
    put_word(k + 3, {2'b10, bcid_at(8*k), 2'b00}, {2'b10, phi, lut_band[li], 1'b0});
    expq.push_back(e);
    exp_dec.push_back(burst ? 1 << 30 : 8*(k+3) + 8);
  endtask

  initial begin
    logic [7:0] d1, d2;
    bit ok;
    int k0;
    scl = 1; sda_m = 1;
    foreach (tl[i]) tl[i] = '0;
    for (int s = 0; s < TMAX / 8 - 1; s++) put_word(s, PADTRIG_IDLE, PADTRIG_IDLE);
    // configuration
    para = '0;
    para[14:3] = OFFSET;
    para[17:15] = 3'd1;       // 31.25 ns window
    para[18] = 1'b1;          // accept flagged BCID+1 hits
    para[26:21] = 6'd45;      // test pattern charge
    lut_band = '{8'h21, 8'h42, 8'h63, 8'h84, 8'h77, 8'h10, 8'hC5, 8'hE6};
    lut_start = '{7'd20, 7'd113, 7'd0, 7'd118, 7'd2, 7'd60, 7'd95, 7'd37};
    for (int i = 0; i < 8; i++) para[29 + 15*i +: 15] = {lut_band[i], lut_start[i]};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    cfg_write_all(0, 18);
    while (!locked) @(negedge clk);
    c_lock++;
    // check a parameter byte read back
    i2c_read(chip_id, 7'd5, d1, ok);
    chk(ok && d1 == para[47:40], "i2c read back");

    // single roads with random hits
    k0 = tick / 8 + 2;
    for (int r = 0; r < 60; r++) begin
      int li;
      li = (r < 4) ? 1 + r : $urandom_range(0, 3);
      if (r % 6 == 5) li = $urandom_range(5, 7);
      road(k0 + 12*r, li, 0);
    end
    // a road for a band not in the table
    put_word(k0 + 12*60 + 3, {2'b10, 12'h123, 2'b00}, {2'b10, 5'd3, 8'h99, 1'b0});
    c_miss++;
    // burst: a road every BC overflows the FIFO
    for (int r = 0; r < 40; r++) road(k0 + 12*61 + r, r % 4, 1);
    while (tick < 8 * (k0 + 12*61 + 60)) @(negedge clk);
    // roads of the burst that never left were dropped by the FIFO
    n_skip += expq.size();
    expq.delete();
    exp_dec.delete();
    chk(n_skip > 0, "roads dropped in burst");
    c_ovf = n_skip;
    // dropped-road count from the diagnostic registers (diag[33:26])
    i2c_read(chip_id, 7'h21, d1, ok); chk(ok, "diag read");
    i2c_read(chip_id, 7'h22, d2, ok); chk(ok, "diag read");
    chk({d2[1:0], d1[7:2]} == 8'(n_skip), $sformatf("diag drop count %0d vs %0d", {d2[1:0], d1[7:2]}, n_skip));
    chk(lat_max <= 16, $sformatf("road-to-frame latency %0d cycles", lat_max));
    // serial output against parallel words
    begin
      int best;
      best = -1;
      for (int o = 0; o < 30 && best < 0; o++) begin
        bit good; good = 1;
        for (int m = 0; o + 30*m + 31 < sbits.size() && m < 3000; m++) begin
          logic [29:0] c;
          for (int b = 0; b < 30; b++) c[29-b] = sbits[o + 30*m + 1 + b];
          if (c != wat[o + 30*m]) good = 0;
        end
        if (good) best = o;
      end
      chk(best >= 0, "serial stream equals the parallel words");
    end
    // test pattern on the first 15 strips
    para[20] = 1'b1;
    cfg_write_all(2, 2);
    repeat (16) @(negedge clk);
    begin
      int k;
      logic [115:0] e;
      k = tick / 8 + 1;
      while (tick < 8 * k) @(negedge clk);
      put_word(k + 1, {2'b10, bcid_at(8*(k-1)), 2'b00}, {2'b10, 5'd9, 8'h77, 1'b0});
      e = '0;
      e[115:104] = bcid_at(8*(k-1)); e[103:96] = 8'h77; e[95:91] = 5'd9;
      for (int i = 0; i < N_OUT; i++) e[89 - 6*i -: 6] = 6'd45;
      expq.push_back(e);
      while (tick < 8 * (k + 8)) @(negedge clk);
      chk(expq.size() == 0, "pattern frame");
      if (expq.size() == 0) c_pat++;
    end
    // PRBS-31
    para[19] = 1'b1;
    collect = 0;
    cfg_write_all(2, 2);
    prbs_words.delete();
    repeat (200) @(negedge clk);
    begin
      bit sb [$];
      int bad;
      foreach (prbs_words[i]) for (int b = 29; b >= 0; b--) sb.push_back(prbs_words[i][b]);
      bad = 0;
      for (int n = 31; n < sb.size(); n++) if (sb[n] != (sb[n-31] ^ sb[n-28])) bad++;
      chk(sb.size() > 1000 && bad == 0, $sformatf("PRBS-31 recurrence, %0d bad", bad));
      if (bad == 0) c_prbs++;
    end
    $display("mechanisms: lock %0d first15 %0d last15 %0d ext %0d excluded %0d edge %0d miss %0d overflow %0d null %0d pattern %0d prbs %0d frames %0d latency %0d",
             c_lock, c_first, c_last, c_ext, c_excl, c_edge, c_miss, c_ovf, c_null, c_pat, c_prbs, c_frames, lat_max);
    chk(c_lock > 0 && c_first > 0 && c_last > 0 && c_ext > 0 && c_excl > 0 && c_edge > 0 && c_miss > 0 &&
        c_ovf > 0 && c_null > 0 && c_pat > 0 && c_prbs > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
