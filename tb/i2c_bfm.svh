// i2c_bfm.svh: I2C master tasks shared by the testbenches (included inside
// a testbench module). The including module declares clk, logic scl,
// logic sda_m (master's open-drain drive, 1 = released), the resolved
// line sda_line and an int I2C_Q (quarter SCL period in clk cycles).
// Transfers use the TDS's three-byte format with 10-bit addressing:
// {11110, chip[2:1], R/W}, {chip[0], reg[6:0]}, data.

task automatic i2c_wait(input int n);
  repeat (n) @(posedge clk);
endtask

task automatic i2c_start();
  sda_m = 1; scl = 1; i2c_wait(I2C_Q);
  sda_m = 0; i2c_wait(I2C_Q);
  scl = 0; i2c_wait(I2C_Q);
endtask

task automatic i2c_stop();
  sda_m = 0; i2c_wait(I2C_Q);
  scl = 1; i2c_wait(I2C_Q);
  sda_m = 1; i2c_wait(2 * I2C_Q);
endtask

task automatic i2c_send(input logic [7:0] b, output bit ack);
  for (int i = 7; i >= 0; i--) begin
    sda_m = b[i]; i2c_wait(I2C_Q);
    scl = 1; i2c_wait(2 * I2C_Q);
    scl = 0; i2c_wait(I2C_Q);
  end
  sda_m = 1; i2c_wait(I2C_Q);
  scl = 1; i2c_wait(I2C_Q);
  ack = !sda_line;
  i2c_wait(I2C_Q);
  scl = 0; i2c_wait(I2C_Q);
endtask

task automatic i2c_recv(output logic [7:0] b, input bit ack);
  sda_m = 1;
  for (int i = 7; i >= 0; i--) begin
    i2c_wait(I2C_Q);
    scl = 1; i2c_wait(I2C_Q);
    b[i] = sda_line;
    i2c_wait(I2C_Q);
    scl = 0; i2c_wait(I2C_Q);
  end
  sda_m = !ack; i2c_wait(I2C_Q);
  scl = 1; i2c_wait(2 * I2C_Q);
  scl = 0; i2c_wait(I2C_Q);
  sda_m = 1;
endtask

task automatic i2c_write(input logic [2:0] chip, input logic [6:0] r, input logic [7:0] d,
                         output bit ok);
  bit a1, a2, a3;
  i2c_start();
  i2c_send({5'b11110, chip[2:1], 1'b0}, a1);
  i2c_send({chip[0], r}, a2);
  i2c_send(d, a3);
  i2c_stop();
  ok = a1 && a2 && a3;
endtask

task automatic i2c_read(input logic [2:0] chip, input logic [6:0] r, output logic [7:0] d,
                        output bit ok);
  bit a1, a2;
  i2c_start();
  i2c_send({5'b11110, chip[2:1], 1'b1}, a1);
  i2c_send({chip[0], r}, a2);
  i2c_recv(d, 1'b0);
  i2c_stop();
  ok = a1 && a2;
endtask
