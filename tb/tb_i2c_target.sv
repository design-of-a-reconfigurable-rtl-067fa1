// Test of i2c_target against a register file model: burst writes with
// auto-increment, burst reads with repeated START, ACK and NACK behaviour,
// and that a transfer for another device address is ignored.
module tb_i2c_target;

  localparam logic [6:0] DEV = 7'h50;
  logic clk = 0, rst_n = 0;
  logic scl_drv = 1, sda_drv = 1, sda_line;
  logic sda_oe;
  logic reg_we;
  logic [11:0] reg_addr;
  logic [7:0]  reg_wdata, reg_rdata;
  logic [7:0]  regs [4096];
  int I2C_Q = 4;
  int checks = 0, failures = 0, writes = 0;

  `include "i2c_ctrl_tasks.svh"

  assign sda_line  = sda_drv && !sda_oe;
  assign reg_rdata = regs[reg_addr];

  i2c_target #(.DEV_ADDR(DEV), .AW(12)) dut (
    .clk, .rst_n, .scl(scl_drv), .sda_in(sda_line), .sda_oe,
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata);

  always #5 clk = ~clk;

  always @(posedge clk) if (reg_we) begin
    regs[reg_addr] <= reg_wdata;
    writes++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic burst_write(input logic [6:0] dev, input int addr, input logic [7:0] data [],
                             input logic expect_ack);
    logic ack;
    i2c_start();
    i2c_write_byte({dev, 1'b0}, ack);
    checks++; if (ack != expect_ack) begin failures++; $display("address ack %0b", ack); end
    if (ack) begin
      i2c_write_byte(8'(addr >> 8), ack); checks++; if (!ack) failures++;
      i2c_write_byte(8'(addr), ack);      checks++; if (!ack) failures++;
      foreach (data[i]) begin
        i2c_write_byte(data[i], ack); checks++; if (!ack) failures++;
      end
    end
    i2c_stop();
  endtask

  task automatic burst_read(input int addr, input int n, output logic [7:0] data []);
    logic ack;
    data = new[n];
    i2c_start();
    i2c_write_byte({DEV, 1'b0}, ack);   checks++; if (!ack) failures++;
    i2c_write_byte(8'(addr >> 8), ack); checks++; if (!ack) failures++;
    i2c_write_byte(8'(addr), ack);      checks++; if (!ack) failures++;
    i2c_start();
    i2c_write_byte({DEV, 1'b1}, ack);   checks++; if (!ack) failures++;
    for (int i = 0; i < n; i++) i2c_read_byte(i == n - 1, data[i]);
    i2c_stop();
  endtask

  initial begin
    logic [7:0] wd [], rd [];
    foreach (regs[i]) regs[i] = 8'(i * 7 + 3);
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    checks++; if (sda_oe) failures++;
    // Burst write of 6 bytes at 0x123
    wd = new[6];
    foreach (wd[i]) wd[i] = 8'($urandom);
    burst_write(DEV, 12'h123, wd, 1'b1);
    foreach (wd[i]) begin
      checks++;
      if (regs[12'h123 + i] != wd[i]) begin
        failures++;
        $display("reg %h = %h expected %h", 12'h123 + i, regs[12'h123 + i], wd[i]);
      end
    end
    checks++; if (writes != 6) begin failures++; $display("%0d writes", writes); end
    // Read them back, plus one untouched neighbour
    burst_read(12'h123, 7, rd);
    foreach (wd[i]) begin
      checks++;
      if (rd[i] != wd[i]) begin failures++; $display("read %0d: %h expected %h", i, rd[i], wd[i]); end
    end
    checks++; if (rd[6] != 8'((12'h129) * 7 + 3)) failures++;
    // Another device address: no ACK, no write
    burst_write(7'h22, 12'h010, wd, 1'b0);
    checks++; if (writes != 6) failures++;
    // Single-byte read at a high address
    burst_read(12'hFFE, 1, rd);
    checks++; if (rd[0] != 8'((12'hFFE) * 7 + 3)) failures++;
    // The bus is released at the end
    repeat (10) @(posedge clk);
    checks++; if (sda_oe) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
