// Exhaustive test of tc_decompress: all 128 codes against the reference
// value (8 + M) * 2^(E-1), or M for E = 0.
module tb_tc_decompress;
  import ae_ref_pkg::*;

  logic [6:0]  code;
  logic [21:0] value;
  int checks = 0, failures = 0;

  tc_decompress dut (.code, .value);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 128; c++) begin
      code = 7'(c);
      #1;
      checks++;
      if (longint'(value) != ref_decompress(c)) begin
        failures++;
        $display("code %0h: got %0d expected %0d", c, value, ref_decompress(c));
      end
    end
    // Spot values worked out by hand
    code = 7'h00; #1; checks++; if (value != 22'd0)      failures++;
    code = 7'h08; #1; checks++; if (value != 22'd8)      failures++;
    code = 7'h7F; #1; checks++; if (value != 22'd245760) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
