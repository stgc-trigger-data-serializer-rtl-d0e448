// tb_i2c_slave: I2C writes and reads through the slave into a register
// array model; checks the write strobes, the read data on SDA, the
// acknowledges, and that transfers for another chip ID are not
// acknowledged and cause no write.
module tb_i2c_slave;
  logic clk = 0, rst_n = 0;
  logic scl, sda_m, sda_oe, we;
  wire  sda_line = sda_m & ~sda_oe;
  logic [6:0] ra;
  logic [7:0] wd, rd;
  logic [7:0] mem [128];
  logic [2:0] chip_id = 3'd5;
  int I2C_Q = 4;
  int checks = 0, failures = 0, n_we = 0;

  always #5 clk = ~clk;
  i2c_slave dut (.clk(clk), .rst_n(rst_n), .chip_id(chip_id), .scl(scl), .sda_in(sda_line),
                 .sda_oe(sda_oe), .reg_addr(ra), .wr_en(we), .wr_data(wd), .rd_data(rd));

  assign rd = mem[ra];
  always @(posedge clk) if (we) begin mem[ra] <= wd; n_we++; end

  `include "i2c_bfm.svh"

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] model [128];
    scl = 1; sda_m = 1;
    foreach (mem[i]) begin mem[i] = 8'($urandom); model[i] = mem[i]; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int t = 0; t < 150; t++) begin
      logic [6:0] r; logic [7:0] d, got; bit ok; logic [2:0] c; int nw;
      r = 7'($urandom);
      d = 8'($urandom);
      c = (t % 10 == 7) ? chip_id ^ 3'($urandom_range(1, 7)) : chip_id;
      nw = n_we;
      if ($urandom % 2) begin
        i2c_write(c, r, d, ok);
        if (c == chip_id) begin
          model[r] = d;
          chk(ok && n_we == nw + 1, $sformatf("write ack t%0d", t));
        end else chk(!ok && n_we == nw, "foreign chip write");
      end else begin
        i2c_read(c, r, got, ok);
        if (c == chip_id) chk(ok && got == model[r], $sformatf("read t%0d r%h got %h exp %h", t, r, got, model[r]));
        else chk(!ok && got == 8'hFF, "foreign chip read");
      end
      chk(!sda_oe, "SDA released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
