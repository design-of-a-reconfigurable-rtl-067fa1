// End-to-end test of ae_encoder_top at its default size.
//
// All 2162 configuration bytes (random weights and biases, then an output
// mask) are written over I2C in one burst and a sample is read back. Random
// events (empty, single-hit, sparse and dense modules) are then streamed, one
// per clock with occasional gaps, and every output is compared with the
// reference model two clocks after its input, which checks the 50 ns
// latency at 40 MHz. The output mask is reprogrammed between the 16 x 9 and
// 16 x 3 bit modes, one copy of a data-path register and one copy of a
// stored weight are upset, and the number of times each mechanism occurred
// is counted; a mechanism that never occurred counts as a failure.
module tb_ae_encoder_top;
  import ae_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic valid_in = 0;
  logic [6:0]   tc_code [48];
  logic         valid_out;
  logic [143:0] out_bits;
  logic [7:0]   out_nbits;
  logic [27:0]  out_sum;
  logic scl_drv = 1, sda_drv = 1, sda_line, sda_oe;
  int I2C_Q = 2;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_events = 0, n_empty = 0, n_norm_sat = 0, n_conv_clamp = 0, n_dense_clamp = 0;
  int n_dense_sat = 0, n_mode9 = 0, n_mode3 = 0, n_bubble = 0, n_seu_dp = 0, n_seu_w = 0;
  int n_readback = 0;

  `include "i2c_ctrl_tasks.svh"

  assign sda_line = sda_drv && !sda_oe;

  ae_encoder_top dut (
    .clk, .rst_n, .valid_in, .tc_code, .valid_out, .out_bits, .out_nbits, .out_sum,
    .scl(scl_drv), .sda_in(sda_line), .sda_oe);

  always #12.5 clk = ~clk;  // 40 MHz

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ model
  logic [7:0]   cfg [2162];
  logic [143:0] mask;

  function automatic int sw(input logic [7:0] v);  // 6-bit signed weight
    return int'($signed(v[5:0]));
  endfunction

  task automatic model(input logic [6:0] code [48], output logic [143:0] bits,
                       output int nbits, output longint sum);
    longint ch [48];
    int nrm [48];
    int img [9][9];
    int feat [128];
    int y [16];
    sum = 0;
    for (int t = 0; t < 48; t++) begin ch[t] = ref_decompress(int'(code[t])); sum += ch[t]; end
    foreach (img[r, c]) img[r][c] = 0;
    for (int t = 0; t < 48; t++) begin
      nrm[t] = ref_norm(ch[t], sum);
      if (nrm[t] == 255) n_norm_sat++;
      img[ref_row(t)][ref_col(t)] = nrm[t];
    end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        for (int f = 0; f < 8; f++) begin
          longint acc = longint'(sw(cfg[72 + f])) * 256;
          for (int kr = 0; kr < 3; kr++)
            for (int kc = 0; kc < 3; kc++)
              acc += longint'(img[2*i + kr][2*j + kc]) * sw(cfg[f*9 + kr*3 + kc]);
          if (acc < 0) n_conv_clamp++;
          feat[(i*4 + j)*8 + f] = ref_relu_q(acc, 4095);
        end
    for (int o = 0; o < 16; o++) begin
      longint acc = longint'(sw(cfg[2128 + o])) * 256;
      for (int k = 0; k < 128; k++) acc += longint'(feat[k]) * sw(cfg[80 + o*128 + k]);
      if (acc < 0) n_dense_clamp++;
      if (acc / 32 > 511) n_dense_sat++;
      y[o] = ref_relu_q(acc, 511);
    end
    bits = '0;
    nbits = 0;
    for (int k = 0; k < 144; k++)
      if (mask[k]) begin
        bits[nbits] = 1'((y[k / 9] >> (k % 9)) & 1);
        nbits++;
      end
  endtask

  // ------------------------------------------------------------ I2C
  task automatic cfg_write(input int addr, input int n);
    logic ack;
    i2c_start();
    i2c_write_byte(8'hA0, ack);          checks++; if (!ack) failures++;
    i2c_write_byte(8'(addr >> 8), ack);  checks++; if (!ack) failures++;
    i2c_write_byte(8'(addr), ack);       checks++; if (!ack) failures++;
    for (int i = 0; i < n; i++) begin
      i2c_write_byte(cfg[addr + i], ack);
      checks++; if (!ack) failures++;
    end
    i2c_stop();
  endtask

  task automatic cfg_readback(input int addr, input int n, input logic [7:0] wmask);
    logic ack;
    logic [7:0] d;
    i2c_start();
    i2c_write_byte(8'hA0, ack);          checks++; if (!ack) failures++;
    i2c_write_byte(8'(addr >> 8), ack);  checks++; if (!ack) failures++;
    i2c_write_byte(8'(addr), ack);       checks++; if (!ack) failures++;
    i2c_start();
    i2c_write_byte(8'hA1, ack);          checks++; if (!ack) failures++;
    for (int i = 0; i < n; i++) begin
      i2c_read_byte(i == n - 1, d);
      checks++;
      if (d != (cfg[addr + i] & wmask)) begin
        failures++;
        $display("readback %0d: %h expected %h", addr + i, d, cfg[addr + i] & wmask);
      end else n_readback++;
    end
    i2c_stop();
  endtask

  task automatic set_mask(input logic [143:0] m);
    mask = m;
    for (int i = 0; i < 18; i++) cfg[2144 + i] = m[i*8 +: 8];
    cfg_write(2144, 18);
  endtask

  // ------------------------------------------------------------ events
  logic [143:0] exp_bits [$];
  int           exp_n    [$];
  longint       exp_sum  [$];
  logic         exp_v    [$];

  task automatic random_event(output logic [6:0] code [48]);
    int kind = $urandom_range(0, 9);
    foreach (code[t]) begin
      case (kind)
        0:       code[t] = '0;                                             // empty
        1:       code[t] = (t == 20) ? 7'($urandom_range(1, 127)) : 7'd0;  // one hit
        2, 3, 4: code[t] = ($urandom_range(0, 5) == 0) ? 7'($urandom) : 7'd0;
        default: code[t] = 7'($urandom);
      endcase
    end
    if (kind == 0) n_empty++;
  endtask

  // Drive one cycle (at negedge) and check the output due in this cycle
  task automatic cycle(input logic v, input logic [6:0] code [48]);
    logic [143:0] b;
    int n;
    longint s;
    @(negedge clk);
    // Driven at negedge N, captured at posedge N+1, out after posedge N+3:
    // the output now belongs to the input driven three negedges ago
    if (exp_v.size() == 3) begin
      logic ev = exp_v.pop_front();
      logic [143:0] eb = exp_bits.pop_front();
      int en = exp_n.pop_front();
      longint es = exp_sum.pop_front();
      checks++;
      if (valid_out != ev) begin failures++; $display("valid_out %0b expected %0b", valid_out, ev); end
      if (ev) begin
        checks++;
        if (out_bits != eb || int'(out_nbits) != en || longint'(out_sum) != es) begin
          failures++;
          if (failures < 10)
            $display("event mismatch: n %0d/%0d sum %0d/%0d bits %h expected %h",
                     out_nbits, en, out_sum, es, out_bits, eb);
        end
      end
    end
    valid_in = v;
    tc_code  = code;
    if (v) begin
      model(code, b, n, s);
      n_events++;
      if (mask == '1) n_mode9++;
      if (n == 48)    n_mode3++;
    end else begin
      b = '0; n = 0; s = 0;
      n_bubble++;
    end
    exp_v.push_back(v);
    exp_bits.push_back(b);
    exp_n.push_back(n);
    exp_sum.push_back(s);
  endtask

  task automatic stream(input int n);
    logic [6:0] code [48];
    for (int i = 0; i < n; i++) begin
      random_event(code);
      cycle($urandom_range(0, 7) != 0, code);
    end
    // drain
    foreach (code[t]) code[t] = '0;
    repeat (4) cycle(1'b0, code);
    exp_v.delete(); exp_bits.delete(); exp_n.delete(); exp_sum.delete();
  endtask

  // ------------------------------------------------------------ main
  initial begin
    logic [6:0] code [48];
    logic [143:0] m3;
    foreach (tc_code[t]) tc_code[t] = '0;
    foreach (cfg[i]) cfg[i] = (i < 2144) ? {2'b00, 6'($urandom)} : 8'hFF;
    // Smaller dense weights keep most outputs inside the 9-bit range
    for (int i = 80; i < 2128; i++) if ($urandom_range(0, 3) != 0) cfg[i] = {2'b00, 6'($urandom_range(0, 5) - 2)};
    mask = '1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);

    // Before programming, all weights are zero: every output is zero
    foreach (code[t]) code[t] = 7'($urandom);
    begin
      logic [7:0] save [2162];
      save = cfg;
      foreach (cfg[i]) cfg[i] = '0;
      mask = '0;
      cycle(1'b1, code); cycle(1'b0, code); cycle(1'b0, code); cycle(1'b0, code);
      exp_v.delete(); exp_bits.delete(); exp_n.delete(); exp_sum.delete();
      cfg = save;
      mask = '1;
    end

    // Program everything in one burst, then read a sample back
    cfg_write(0, 2162);
    cfg_readback(0, 10, 8'h3F);
    cfg_readback(2120, 30, 8'hFF);
    // high mask: weights read back as 6 bits, mask bytes as 8
    stream(300);

    // Mode switch: 16 outputs x 3 bits (bits 8:6)
    m3 = '0;
    for (int o = 0; o < 16; o++) m3[o*9 + 6 +: 3] = 3'b111;
    set_mask(m3);
    stream(200);

    // Upset one copy of a data-path register while events flow
    for (int i = 0; i < 20; i++) begin
      random_event(code);
      cycle(1'b1, code);
      dut.u_s1.q_b = ~dut.u_s1.q_b;
      n_seu_dp++;
    end
    repeat (4) cycle(1'b0, code);
    exp_v.delete(); exp_bits.delete(); exp_n.delete(); exp_sum.delete();

    // Upset one copy of stored weights: outputs unaffected, copy repaired
    for (int i = 0; i < 20; i++) begin
      int a = $urandom_range(0, 2143);
      dut.u_params.mem_c[a] = ~dut.u_params.mem_c[a];
      random_event(code);
      cycle(1'b1, code);
      checks++;
      if (dut.u_params.mem_c[a] != cfg[a][5:0]) begin failures++; $display("weight %0d not repaired", a); end
      else n_seu_w++;
    end
    repeat (4) cycle(1'b0, code);
    exp_v.delete(); exp_bits.delete(); exp_n.delete(); exp_sum.delete();

    // Back to all 144 bits
    set_mask('1);
    stream(200);

    $display("events %0d bubbles %0d empty %0d norm_sat %0d conv_clamp %0d dense_clamp %0d dense_sat %0d",
             n_events, n_bubble, n_empty, n_norm_sat, n_conv_clamp, n_dense_clamp, n_dense_sat);
    $display("mode9 %0d mode3 %0d seu_dp %0d seu_w %0d readback %0d",
             n_mode9, n_mode3, n_seu_dp, n_seu_w, n_readback);
    checks++; if (n_empty == 0)       begin failures++; $display("no empty module"); end
    checks++; if (n_norm_sat == 0)    begin failures++; $display("convertor never saturated"); end
    checks++; if (n_conv_clamp == 0)  begin failures++; $display("conv ReLU never clamped"); end
    checks++; if (n_dense_clamp == 0) begin failures++; $display("dense ReLU never clamped"); end
    checks++; if (n_dense_sat == 0)   begin failures++; $display("dense never saturated"); end
    checks++; if (n_mode9 == 0)       begin failures++; $display("no 144-bit events"); end
    checks++; if (n_mode3 == 0)       begin failures++; $display("no 48-bit events"); end
    checks++; if (n_bubble == 0)      begin failures++; $display("no gap in the stream"); end
    checks++; if (n_seu_dp == 0)      begin failures++; $display("no data-path upset"); end
    checks++; if (n_seu_w == 0)       begin failures++; $display("no weight upset repaired"); end
    checks++; if (n_readback == 0)    begin failures++; $display("no readback"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
