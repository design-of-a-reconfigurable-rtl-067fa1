// Test of tmr_datapath_reg: one-cycle latency, hold when not enabled, reset,
// and masking of an upset in any single copy. An upset is made by
// overwriting one copy between clock edges; the voted output must not move,
// and the next load must overwrite the upset copy.
module tb_tmr_datapath_reg;

  localparam int W = 16;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] d = '0, q;
  int checks = 0, failures = 0, masked = 0;

  tmr_datapath_reg #(.W(W)) dut (.clk, .rst_n, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    checks++; if (q != 0) failures++;
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [W-1:0] v = W'($urandom);
      @(negedge clk);
      d = v; en = 1;
      @(posedge clk); #1;
      checks++; if (q != v) begin failures++; $display("load %h got %h", v, q); end
      // Hold
      @(negedge clk);
      en = 0; d = ~v;
      @(posedge clk); #1;
      checks++; if (q != v) failures++;
      // Upset one copy
      case (n % 3)
        0: dut.q_a = ~dut.q_a;
        1: dut.q_b = ~dut.q_b;
        default: dut.q_c = ~dut.q_c;
      endcase
      #1;
      checks++; if (q != v) failures++; else masked++;
      @(posedge clk); #1;
      checks++; if (q != v) failures++;
    end
    // The next load clears the upset copy: a second upset in another copy
    // is then masked too
    @(negedge clk); d = 16'h1234; en = 1;
    @(posedge clk); #1; en = 0;
    dut.q_b = 16'hFFFF;
    #1; checks++; if (q != 16'h1234) failures++;
    checks++; if (masked == 0) failures++;
    $display("masked %0d upsets", masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
