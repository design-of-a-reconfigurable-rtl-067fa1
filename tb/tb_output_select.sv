// Test of output_select: the 16 x 3 (top three bits of each output) and
// 16 x 9 (all bits) configurations, an empty mask and random masks, against
// a reference packer.
module tb_output_select;

  logic [8:0]   y [16];
  logic [143:0] mask;
  logic [143:0] packed_bits;
  logic [7:0]   n_sel;
  int checks = 0, failures = 0;

  output_select dut (.y, .mask, .packed_bits, .n_sel);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    logic [143:0] exp_bits = '0;
    int n = 0;
    #1;
    for (int o = 0; o < 16; o++)
      for (int bt = 0; bt < 9; bt++)
        if (mask[o*9 + bt]) begin
          exp_bits[n] = y[o][bt];
          n++;
        end
    checks++;
    if (int'(n_sel) != n || packed_bits != exp_bits) begin
      failures++;
      $display("mask %h: n %0d/%0d bits %h expected %h", mask, n_sel, n, packed_bits, exp_bits);
    end
  endtask

  initial begin
    foreach (y[o]) y[o] = 9'($urandom);
    mask = '0;
    check_all();
    checks++; if (n_sel != 0 || packed_bits != 0) failures++;
    mask = '1;
    check_all();
    checks++; if (n_sel != 8'd144) failures++;
    // 16 x 3: bits 8:6 of every output
    mask = '0;
    for (int o = 0; o < 16; o++) mask[o*9 + 6 +: 3] = 3'b111;
    check_all();
    checks++; if (n_sel != 8'd48) failures++;
    for (int o = 0; o < 16; o++) begin
      checks++;
      if (packed_bits[o*3 +: 3] != y[o][8:6]) failures++;
    end
    for (int n = 0; n < 500; n++) begin
      foreach (y[o]) y[o] = 9'($urandom);
      mask = {$urandom, $urandom, $urandom, $urandom, $urandom};
      if (n % 3 == 0) mask &= {$urandom, $urandom, $urandom, $urandom, $urandom};
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
