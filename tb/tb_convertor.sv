// Test of convertor: random, sparse and extreme sets of 48 charges. The sum
// and every normalized output are compared with the reference model; a single
// charge must give 255 (also when the quotient reaches exactly 256) and an
// empty module all zeros.
module tb_convertor;
  import ae_ref_pkg::*;

  logic [21:0] charge [48];
  logic [27:0] sum;
  logic [7:0]  norm   [48];
  int checks = 0, failures = 0;

  convertor dut (.charge, .sum, .norm);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(string what);
    longint s = 0;
    #1;
    foreach (charge[i]) s += longint'(charge[i]);
    checks++;
    if (longint'(sum) != s) begin
      failures++;
      $display("%s: sum %0d expected %0d", what, sum, s);
    end
    foreach (charge[i]) begin
      checks++;
      if (int'(norm[i]) != ref_norm(longint'(charge[i]), s)) begin
        failures++;
        $display("%s: norm[%0d]=%0d expected %0d", what, i, norm[i], ref_norm(charge[i], s));
      end
    end
  endtask

  initial begin
    // Empty module
    foreach (charge[i]) charge[i] = '0;
    check_all("empty");
    foreach (norm[i]) begin checks++; if (norm[i] != 0) failures++; end
    // One hit carries everything
    charge[17] = 22'd5000;
    check_all("single");
    checks++; if (norm[17] != 8'd255) failures++;
    // A single power-of-two charge reaches exactly 256 and must saturate
    charge[17] = 22'd4096;
    check_all("single 2^12");
    checks++; if (norm[17] != 8'd255) failures++;
    charge[17] = 22'd5000;
    // Two equal hits: each half of the sum
    charge[3] = 22'd5000;
    check_all("pair");
    checks++; if (norm[3] != 8'd127 && norm[3] != 8'd128) failures++;
    // All at the maximum decoded value
    foreach (charge[i]) charge[i] = 22'd245760;
    check_all("full");
    // Full-range 22-bit values
    foreach (charge[i]) charge[i] = 22'h3FFFFF;
    check_all("max22");
    // Random dense and sparse
    for (int n = 0; n < 200; n++) begin
      foreach (charge[i]) begin
        if ((n % 2) == 0) charge[i] = 22'($urandom);
        else              charge[i] = ($urandom_range(0, 3) == 0) ? 22'($urandom_range(0, 245760)) : '0;
      end
      check_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
