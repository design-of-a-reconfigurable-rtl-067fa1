// Test of conv2d_relu: random cell values and weights, plus hand-worked
// cases, against a reference that places the 48 cells on an explicitly
// zero-padded 9x9 image and convolves it. Hand cases check the empty upper-
// right quadrant and the edge padding. Counts how often ReLU clamped a
// negative sum, which must happen.
module tb_conv2d_relu;
  import ae_ref_pkg::*;

  logic [7:0]        tc   [48];
  logic signed [5:0] w    [72];
  logic signed [5:0] b    [8];
  logic [11:0]       feat [128];
  int checks = 0, failures = 0, clamped = 0;

  conv2d_relu dut (.tc, .w, .b, .feat);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    int pad [9][9];
    #1;
    foreach (pad[r, c]) pad[r][c] = 0;
    for (int t = 0; t < 48; t++) pad[ref_row(t)][ref_col(t)] = int'(tc[t]);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        for (int f = 0; f < 8; f++) begin
          longint acc = longint'(b[f]) * 256;
          int exp_v;
          for (int kr = 0; kr < 3; kr++)
            for (int kc = 0; kc < 3; kc++)
              acc += longint'(pad[2*i + kr][2*j + kc]) * longint'(w[f*9 + kr*3 + kc]);
          if (acc < 0) clamped++;
          exp_v = ref_relu_q(acc, 4095);
          checks++;
          if (int'(feat[(i*4 + j)*8 + f]) != exp_v) begin
            failures++;
            if (failures < 10)
              $display("feat (%0d,%0d,%0d) = %0d expected %0d", i, j, f, feat[(i*4+j)*8+f], exp_v);
          end
        end
  endtask

  initial begin
    // Largest sum: full image, all weights and biases at +31/32
    foreach (tc[t]) tc[t] = 8'd255;
    foreach (w[k]) w[k] = 6'sd31;
    foreach (b[k]) b[k] = 6'sd31;
    check_all();
    checks++; if (feat[0] != 12'd2471) failures++;            // 79081 >> 5
    checks++; if (feat[(3*4 + 3)*8] != 12'd1236) failures++;  // 4 taps: 39556 >> 5
    checks++; if (feat[(0*4 + 3)*8] != 12'd248)  failures++;  // empty quadrant: bias only
    checks++; if (feat[(1*4 + 2)*8] != 12'd989)  failures++;  // 3 taps: 31651 >> 5
    checks++; if (feat[(2*4 + 0)*8] != 12'd2471) failures++;  // lower-left, 9 taps
    // All weights and biases at -1: everything clamps to zero
    foreach (w[k]) w[k] = -6'sd32;
    foreach (b[k]) b[k] = -6'sd32;
    check_all();
    foreach (feat[k]) begin checks++; if (feat[k] != 0) failures++; end
    // Random
    for (int n = 0; n < 300; n++) begin
      foreach (tc[t]) tc[t] = ($urandom_range(0, 2) == 0) ? 8'($urandom) : 8'd0;
      foreach (w[k]) w[k] = 6'($urandom);
      foreach (b[k]) b[k] = 6'($urandom);
      check_all();
    end
    checks++;
    if (clamped == 0) begin failures++; $display("ReLU never clamped"); end
    $display("ReLU clamped %0d sums", clamped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
