// tb_pad_frame_builder: random flags and BCIDs every BC; the four words
// that follow each BC start are joined, the header checked, the other 116
// bits descrambled with an independent serial descrambler and compared
// with the flags, BCID and CRC-8 (long division); then PRBS-31 words.
module tb_pad_frame_builder;
  import tds_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, bc_start, ce, prbs, fs;
  logic [95:0] flags;
  logic [11:0] bcid;
  logic [29:0] word;
  logic [57:0] dst;
  logic [30:0] pst;
  int checks = 0, failures = 0, n_frames = 0, n_prbs = 0;

  always #5 clk = ~clk;
  pad_frame_builder dut (.clk(clk), .rst_n(rst_n), .bc_start(bc_start), .ce160(ce), .prbs_en(prbs),
                         .flags(flags), .bcid(bcid), .word(word), .frame_start(fs));

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
    logic [95:0] f_exp;
    logic [11:0] b_exp;
    bc_start = 0; ce = 0; prbs = 0; flags = 0; bcid = 0;
    dst = '1; pst = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int bc = 0; bc < 300; bc++) begin
      logic [119:0] fr;
      prbs = (bc >= 250);
      for (int ph = 0; ph < 8; ph++) begin
        bc_start = (ph == 0);
        ce = ph[0];
        if (ph == 0) begin
          for (int i = 0; i < 3; i++) flags[32*i +: 32] = $urandom;
          bcid = 12'($urandom);
          f_exp = flags; b_exp = bcid;
        end
        @(posedge clk);
        #1;
        if (ce) begin
          if (prbs) begin
            logic [29:0] e;
            for (int b = 29; b >= 0; b--) e[b] = prbs_bit(pst);
            chk(word == e, "prbs");
            n_prbs++;
          end else begin
            fr[119 - 30*(ph/2) -: 30] = word;
            chk(fs == (ph == 1), "frame_start");
          end
        end
        @(negedge clk);
      end
      if (!prbs) begin
        logic [115:0] d;
        chk(fr[119:116] == FRAME_HDR, "header");
        for (int b = 115; b >= 0; b--) d[b] = descr_bit(dst, fr[b]);
        chk(d[115:20] == f_exp && d[19:8] == b_exp, $sformatf("fields bc %0d", bc));
        chk(d[7:0] == crc_div(128'(d[115:8]), 108, 8, 8'h2F), "crc8");
        n_frames++;
      end
    end
    chk(n_frames == 250 && n_prbs == 200, "counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
