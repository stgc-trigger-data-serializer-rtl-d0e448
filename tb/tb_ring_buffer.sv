// tb_ring_buffer: writes random hits with random BCID tags and flags into
// the 4-deep buffer and compares every lookup (exact and with the BCID+1
// extension) against a queue model of the last four hits, including
// overwrite of the oldest entry and ageing at BC starts.
module tb_ring_buffer;
  import tds_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr, bc_start, ext_en;
  rb_entry_t went;
  logic [3:0] cur;
  logic [11:0] trig;
  strip_t rd;
  int checks = 0, failures = 0, n_ext = 0, n_aged = 0, n_match = 0;

  typedef struct { rb_entry_t e; bit v; } slot_t;
  slot_t model [$];

  always #5 clk = ~clk;

  ring_buffer #(.DEPTH(4), .MAX_AGE(8)) dut (.clk(clk), .rst_n(rst_n), .wr(wr), .wr_entry(went),
      .bc_start(bc_start), .cur_bcid_lsb(cur), .trig_bcid(trig), .ext_en(ext_en), .rd(rd));

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

  initial begin
    wr = 0; bc_start = 0; ext_en = 0; cur = 0; trig = 0; went = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      // random action: write, bc_start or nothing
      wr = ($urandom % 3 == 0);
      bc_start = ($urandom % 4 == 0);
      if (bc_start) cur = cur + 4'd1;
      went.q = 6'($urandom);
      went.bcid_lsb = cur - 4'($urandom_range(0, 2));
      went.flag = 1'($urandom);
      @(posedge clk);
      // model update: ageing first, then the write
      if (bc_start)
        foreach (model[i])
          if (4'(cur - model[i].e.bcid_lsb) >= 4'd8 && model[i].v) begin model[i].v = 0; n_aged++; end
      if (wr) begin
        model.push_back('{e: went, v: 1'b1});
        if (model.size() > 4) void'(model.pop_front());
      end
      @(negedge clk);
      wr = 0; bc_start = 0;
      // lookups
      for (int q = 0; q < 3; q++) begin
        bit hit; logic [5:0] qq; bit via_ext;
        trig = {8'($urandom), cur - 4'($urandom_range(0, 3))};
        ext_en = 1'($urandom);
        hit = 0; qq = 0; via_ext = 0;
        foreach (model[i]) begin
          if (model[i].v && (model[i].e.bcid_lsb == trig[3:0] ||
              (ext_en && model[i].e.flag && model[i].e.bcid_lsb == trig[3:0] + 4'd1))) begin
            hit = 1; qq = model[i].e.q;
            via_ext = (model[i].e.bcid_lsb != trig[3:0]);
          end
        end
        #1;
        chk(rd.hit == hit && rd.q == (hit ? qq : 6'd0),
            $sformatf("lookup it%0d trig %h: got %b/%h exp %b/%h", it, trig[3:0], rd.hit, rd.q, hit, qq));
        if (hit) n_match++;
        if (hit && via_ext) n_ext++;
      end
    end
    chk(n_ext > 0 && n_aged > 0 && n_match > 100, $sformatf("coverage ext %0d aged %0d match %0d", n_ext, n_aged, n_match));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
