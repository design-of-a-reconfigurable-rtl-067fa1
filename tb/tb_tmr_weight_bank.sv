// Test of tmr_weight_bank at a reduced depth: writes and read-back, the
// voted contents, reset to zero, and auto-correction: an upset written into
// one copy must be outvoted at once and repaired by the next clock edge of
// that copy. The three clocks run with small phase offsets.
module tb_tmr_weight_bank;

  localparam int DEPTH = 40, WIDTH = 6, AW = 6;
  logic clk_a = 0, clk_b = 0, clk_c = 0, rst_n = 0;
  logic we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] q [DEPTH];
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0, repaired = 0;

  tmr_weight_bank #(.DEPTH(DEPTH), .WIDTH(WIDTH), .AW(AW)) dut (
    .clk_a, .clk_b, .clk_c, .rst_n, .we, .waddr, .wdata, .raddr, .rdata, .q);

  always #5 clk_a = ~clk_a;
  initial begin #1; forever #5 clk_b = ~clk_b; end
  initial begin #2; forever #5 clk_c = ~clk_c; end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_contents();
    for (int i = 0; i < DEPTH; i++) begin
      raddr = AW'(i);
      #0.1;
      checks++;
      if (q[i] != model[i] || rdata != model[i]) begin
        failures++;
        $display("word %0d: q %0d rdata %0d expected %0d", i, q[i], rdata, model[i]);
      end
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    #12 rst_n = 1;
    check_contents();
    // Write every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk_a);
      we = 1; waddr = AW'(i); wdata = WIDTH'($urandom);
      model[i] = wdata;
    end
    @(negedge clk_a); we = 0;
    @(negedge clk_a);
    check_contents();
    // Out-of-range read gives zero
    raddr = AW'(DEPTH + 3); #0.1; checks++; if (rdata != 0) failures++;
    // Upsets
    for (int n = 0; n < 60; n++) begin
      int i = $urandom_range(0, DEPTH - 1);
      logic [WIDTH-1:0] bad = ~model[i];
      @(negedge clk_a);
      case (n % 3)
        0: dut.mem_a[i] = bad;
        1: dut.mem_b[i] = bad;
        default: dut.mem_c[i] = bad;
      endcase
      #0.1;
      checks++; if (q[i] != model[i]) failures++;
      repeat (2) @(posedge clk_a);
      #3;
      checks++;
      if (dut.mem_a[i] == model[i] && dut.mem_b[i] == model[i] && dut.mem_c[i] == model[i])
        repaired++;
      else begin
        failures++;
        $display("upset in word %0d not repaired", i);
      end
    end
    // A write during normal operation updates all copies
    @(negedge clk_a); we = 1; waddr = 6'd7; wdata = 6'h2A; model[7] = 6'h2A;
    @(negedge clk_a); we = 0;
    check_contents();
    checks++; if (repaired == 0) failures++;
    $display("repaired %0d upsets", repaired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
