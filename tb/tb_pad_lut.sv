// tb_pad_lut: loads random 8-entry road tables (distinct band-IDs) and
// checks hit/miss, the starting strip, the passed-on road and the
// one-cycle lookup latency.
module tb_pad_lut;
  import tds_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [119:0] tbl;
  logic rv, ov, hit;
  road_t road, road_o;
  logic [6:0] start;
  int checks = 0, failures = 0, nhit = 0, nmiss = 0;

  always #5 clk = ~clk;
  pad_lut dut (.clk(clk), .rst_n(rst_n), .table_bits(tbl), .road_valid(rv), .road(road),
               .road_out_valid(ov), .road_out(road_o), .hit(hit), .start(start));

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
    logic [7:0] bands [8];
    logic [6:0] starts [8];
    rv = 0; road = '0; tbl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < 8; i++) begin
        bit dup;
        do begin
          bands[i] = 8'($urandom); dup = 0;
          for (int j = 0; j < i; j++) if (bands[j] == bands[i]) dup = 1;
        end while (dup);
        starts[i] = 7'($urandom);
        tbl[15*i +: 15] = {bands[i], starts[i]};
      end
      for (int k = 0; k < 20; k++) begin
        int sel; logic [6:0] es; bit eh;
        sel = $urandom_range(0, 11);
        road.bcid = 12'($urandom); road.phi = 5'($urandom);
        road.band = (sel < 8) ? bands[sel] : 8'($urandom);
        eh = 0; es = 0;
        for (int i = 0; i < 8; i++) if (bands[i] == road.band) begin eh = 1; es = starts[i]; end
        rv = 1;
        @(negedge clk);
        rv = 0;
        chk(ov && hit == eh && (!eh || start == es) && road_o == road,
            $sformatf("lookup band %h", road.band));
        if (eh) nhit++; else nmiss++;
        @(negedge clk);
        chk(!ov, "single-cycle valid");
      end
    end
    chk(nhit > 0 && nmiss > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
