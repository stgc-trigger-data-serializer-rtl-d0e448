// tb_strip_sel: random strip data and window starts (including windows
// running past strip 131); for every window strip i the line
// (start + i) mod 17 must carry strip start + i, or zero past the end.
module tb_strip_sel;
  import tds_pkg::*;
  strip_t strips [N_CH];
  strip_t lines [WIN];
  logic [6:0] start;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  strip_sel dut (.strips(strips), .start(start), .lines(lines));

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      for (int c = 0; c < N_CH; c++) strips[c] = 7'($urandom);
      start = (t < 128) ? 7'(t) : 7'($urandom);
      @(negedge clk);
      for (int i = 0; i < WIN; i++) begin
        int e;
        e = int'(start) + i;
        chk(lines[e % WIN] == ((e < N_CH) ? strips[e] : 7'd0),
            $sformatf("start %0d strip %0d", start, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
