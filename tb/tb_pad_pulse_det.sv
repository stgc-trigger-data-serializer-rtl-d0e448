// tb_pad_pulse_det: random pulses on all 96 pads with random group phases
// and channel enables; after every BC start each flag must equal "a
// leading edge occurred in that pad's shifted BC" for the local BC that
// ended before the previous chip BC start, as worked out from the
// recorded input history.
module tb_pad_pulse_det;
  import tds_pkg::*;
  logic clk = 0, rst_n = 0, bc_start;
  logic [95:0] pin, en, flags;
  logic [11:0] gp;
  logic [2:0]  phase;
  int checks = 0, failures = 0, n_yes = 0, n_no = 0;
  localparam int T = 2000;
  bit edges [96][T];
  logic [95:0] prev;

  always #5 clk = ~clk;
  pad_pulse_det dut (.clk(clk), .rst_n(rst_n), .pad_in(pin), .ch_en(en), .grp_phase(gp),
                     .phase(phase), .bc_start(bc_start), .flags(flags));

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (T + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pin = 0; prev = 0; phase = 0; bc_start = 0;
    for (int i = 0; i < 96; i++) en[i] = ($urandom % 8 != 0);
    gp = 12'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < T; t++) begin
      // drive cycle t
      phase = 3'(t % 8);
      bc_start = (t % 8 == 0);
      for (int i = 0; i < 96; i++) if ($urandom % 6 == 0) pin[i] = ~pin[i];
      for (int i = 0; i < 96; i++) edges[i][t] = pin[i] && !prev[i] && en[i];
      prev = pin;
      @(posedge clk);
      #1;
      if (bc_start && t >= 24) begin
        for (int i = 0; i < 96; i++) begin
          int p; bit e;
          p = int'(gp[2*(i/16) +: 2]);
          e = 0;
          for (int k = t - 16 + 2*p; k <= t - 9 + 2*p; k++) e |= edges[i][k];
          chk(flags[i] == e, $sformatf("t%0d pad %0d phase %0d", t, i, p));
          if (e) n_yes++; else n_no++;
        end
      end
      @(negedge clk);
    end
    chk(n_yes > 100 && n_no > 100, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
