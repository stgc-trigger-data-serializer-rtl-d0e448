// tb_pad_tds: end-to-end test of the pad-TDS at its default sizes.
//
// Configures BCID offset, BC clock phase, the six group phases and a few
// disabled channels over I2C, drives random pulses on all 96 pads and
// checks every frame: header, descrambled yes/no flags against a model of
// leading edges per shifted BC, BCID, CRC-8; then the serial output
// against the parallel words, the diagnostic registers, and the PRBS-31
// mode. Counts yes flags, suppressed edges of disabled pads, shifted
// groups and frames; one that never occurs is a failure.
module tb_pad_tds;
  import tds_pkg::*;
  import tb_ref_pkg::*;

  localparam int TMAX = 12000;
  localparam logic [11:0] OFFSET = 12'hABC;
  localparam int BP = 1;               // BC clock phase

  logic clk = 0, clk_ser = 0, rst_n = 0;
  logic scl, sda_m, sda_oe;
  wire  sda_line = sda_m & ~sda_oe;
  logic [2:0]  chip_id = 3'd6;
  logic [95:0] pin, prev, en;
  logic        ser, fs;
  logic [29:0] word;
  logic [11:0] gp;
  int I2C_Q = 4;
  int checks = 0, failures = 0;
  int tick = -1, t_cfg = 1 << 30;
  bit edges [96][TMAX];
  int c_yes = 0, c_sup = 0, c_shift = 0, c_frames = 0, c_prbs = 0;

  always #15 clk = ~clk;
  initial begin #0.5; forever #1 clk_ser = ~clk_ser; end

  pad_tds dut (.clk(clk), .clk_ser(clk_ser), .rst_n(rst_n), .chip_id(chip_id), .scl(scl),
               .sda_in(sda_line), .sda_oe(sda_oe), .pad_in(pin), .ser_out(ser), .word(word),
               .frame_start(fs));

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

  // random pulses, recorded edges
  always @(negedge clk) begin
    int t;
    if (rst_n) begin
      tick <= tick + 1;
      t = tick + 1;
      for (int i = 0; i < 96; i++) if ($urandom % 9 == 0) pin[i] = ~pin[i];
      if (t < TMAX)
        for (int i = 0; i < 96; i++) begin
          edges[i][t] = pin[i] && !prev[i] && (t < t_cfg || en[i]);
          if (t > t_cfg && pin[i] && !prev[i] && !en[i]) c_sup++;
        end
      prev = pin;
    end
  end

  function automatic logic [11:0] bcid_at(int b);
    int n;
    n = 0;
    // TB tick b is chip tick b - 1 (the chip counts from the cycle after reset)
    for (int r = 0; r < b - 1; r++) if ((r - 2*BP + 64) % 8 == 7) n++;
    return OFFSET + 12'(n);
  endfunction

  // frame collector
  logic [57:0] dst = '1;
  logic [119:0] fr;
  int wi = -1;
  bit collect = 1;
  logic [29:0] prbs_words [$];

  always @(posedge clk) begin
    #1;
    if (rst_n && tick >= 0) begin
      if (!collect) begin
        if ((tick - 2*BP + 64) % 2 == 1) prbs_words.push_back(word);
      end else begin
        if (fs) wi = 0;
        if (wi >= 0 && (tick - 2*BP + 64) % 2 == 1) begin
          fr[119 - 30*wi -: 30] = word;
          wi++;
          if (wi == 4) begin
            logic [115:0] d;
            int b;
            wi = -1;
            b = tick - 7;                     // the BC start that built the frame
            for (int i = 115; i >= 0; i--) d[i] = descr_bit(dst, fr[i]);
            if (b > t_cfg + 40) begin
              chk(fr[119:116] == FRAME_HDR, "header");
              chk(d[7:0] == crc_div(128'(d[115:8]), 108, 8, 8'h2F), "crc8");
              chk(d[19:8] == bcid_at(b), $sformatf("bcid %h exp %h", d[19:8], bcid_at(b)));
              for (int i = 0; i < 96; i++) begin
                int p; bit e;
                p = int'(gp[2*(i/16) +: 2]);
                e = 0;
                for (int k = b - 24 + 2*p; k <= b - 17 + 2*p; k++) e |= edges[i][k];
                chk(d[20 + i] == e, $sformatf("pad %0d frame at %0d", i, b));
                if (e) c_yes++;
              end
              c_frames++;
            end
          end
        end
      end
    end
  end

  bit sbits [$];
  logic [29:0] wat [$];
  always @(posedge clk_ser) if (rst_n && collect) begin
    sbits.push_back(ser);
    wat.push_back(word);
  end

  initial begin
    logic [239:0] para;
    logic [7:0] d;
    bit ok;
    scl = 1; sda_m = 1; pin = 0; prev = 0;
    for (int i = 0; i < 96; i++) en[i] = (i % 13 != 5);
    gp = 12'b11_10_01_00_10_01;
    para = '0;
    para[14:3] = OFFSET;
    para[16:15] = 2'(BP);
    para[28:17] = gp;
    para[125:30] = en;
    for (int g = 0; g < 6; g++) if (gp[2*g +: 2] != 0) c_shift++;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    for (int r = 0; r <= 15; r++) begin
      i2c_write(chip_id, 7'(r), para[8*r +: 8], ok);
      chk(ok, "i2c write");
    end
    t_cfg = tick;
    repeat (3000) @(negedge clk);
    // diagnostics: frames are counted, BCID of the last frame is plausible
    i2c_read(chip_id, 7'h1E, d, ok);
    chk(ok, "diag read");
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
    // PRBS-31
    para[29] = 1'b1;
    collect = 0;
    i2c_write(chip_id, 7'd3, para[31:24], ok);
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
    $display("mechanisms: frames %0d yes %0d suppressed %0d shifted groups %0d prbs %0d",
             c_frames, c_yes, c_sup, c_shift, c_prbs);
    chk(c_frames > 300 && c_yes > 0 && c_sup > 0 && c_shift > 0 && c_prbs > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
