// I2C controller tasks for testbenches. The including module must declare
//   logic clk;            system clock the target samples with
//   logic scl_drv;        scl level driven by the controller
//   logic sda_drv;        0 = controller pulls sda low
//   logic sda_line;       the wired-AND bus level
//   int   I2C_Q;          clk cycles per quarter scl period
// Bits change while scl is low and are sampled while it is high.

task automatic i2c_wait_q();
  repeat (I2C_Q) @(posedge clk);
endtask

task automatic i2c_start();
  sda_drv = 1; i2c_wait_q();
  scl_drv = 1; i2c_wait_q();
  sda_drv = 0; i2c_wait_q();
  scl_drv = 0; i2c_wait_q();
endtask

task automatic i2c_stop();
  sda_drv = 0; i2c_wait_q();
  scl_drv = 1; i2c_wait_q();
  sda_drv = 1; i2c_wait_q();
endtask

task automatic i2c_bit_out(input logic b);
  sda_drv = b; i2c_wait_q();
  scl_drv = 1; i2c_wait_q(); i2c_wait_q();
  scl_drv = 0; i2c_wait_q();
endtask

task automatic i2c_bit_in(output logic b);
  sda_drv = 1; i2c_wait_q();
  scl_drv = 1; i2c_wait_q();
  b = sda_line;
  i2c_wait_q();
  scl_drv = 0; i2c_wait_q();
endtask

// Send a byte; ack = 1 when the target pulled sda low in the ninth slot
task automatic i2c_write_byte(input logic [7:0] data, output logic ack);
  logic b;
  for (int i = 7; i >= 0; i--) i2c_bit_out(data[i]);
  i2c_bit_in(b);
  ack = !b;
endtask

// Receive a byte and answer with ACK (last = 0) or NACK (last = 1)
task automatic i2c_read_byte(input logic last, output logic [7:0] data);
  logic b;
  for (int i = 7; i >= 0; i--) begin
    i2c_bit_in(b);
    data[i] = b;
  end
  i2c_bit_out(last);
endtask
