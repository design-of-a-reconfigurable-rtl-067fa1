// Test of dense_relu: random features and weights, plus hand-worked cases,
// against an integer reference. Counts negative sums clamped by ReLU and
// outputs saturated at 511; both must happen.
module tb_dense_relu;
  import ae_ref_pkg::*;

  logic [11:0]       feat [128];
  logic signed [5:0] w    [2048];
  logic signed [5:0] b    [16];
  logic [8:0]        y    [16];
  int checks = 0, failures = 0, clamped = 0, saturated = 0;

  dense_relu dut (.feat, .w, .b, .y);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    #1;
    for (int o = 0; o < 16; o++) begin
      longint acc = longint'(b[o]) * 256;
      int exp_v;
      for (int k = 0; k < 128; k++) acc += longint'(feat[k]) * longint'(w[o*128 + k]);
      if (acc < 0) clamped++;
      if (acc / 32 > 511) saturated++;
      exp_v = ref_relu_q(acc, 511);
      checks++;
      if (int'(y[o]) != exp_v) begin
        failures++;
        if (failures < 10) $display("y[%0d] = %0d expected %0d", o, y[o], exp_v);
      end
    end
  endtask

  initial begin
    // One feature of 1.0 (256) times weight 0.5 (16), bias 0: output 0.5 = 128
    foreach (feat[k]) feat[k] = '0;
    foreach (w[k]) w[k] = '0;
    foreach (b[k]) b[k] = '0;
    feat[5] = 12'd256;
    w[3*128 + 5] = 6'sd16;
    b[7] = 6'sd8;            // 0.25 -> 64
    b[9] = -6'sd8;           // negative -> 0
    check_all();
    checks++; if (y[3] != 9'd128) failures++;
    checks++; if (y[7] != 9'd64)  failures++;
    checks++; if (y[9] != 9'd0)   failures++;
    // Sparse small features: mostly in range
    for (int n = 0; n < 150; n++) begin
      foreach (feat[k]) feat[k] = ($urandom_range(0, 7) == 0) ? 12'($urandom_range(0, 300)) : 12'd0;
      foreach (w[k]) w[k] = 6'($urandom);
      foreach (b[k]) b[k] = 6'($urandom);
      check_all();
    end
    // Large features: saturation
    for (int n = 0; n < 50; n++) begin
      foreach (feat[k]) feat[k] = 12'($urandom);
      foreach (w[k]) w[k] = 6'($urandom);
      foreach (b[k]) b[k] = 6'($urandom);
      check_all();
    end
    checks++; if (clamped == 0)   begin failures++; $display("ReLU never clamped"); end
    checks++; if (saturated == 0) begin failures++; $display("never saturated"); end
    $display("clamped %0d, saturated %0d", clamped, saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
