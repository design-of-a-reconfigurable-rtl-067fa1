// Reconfigurable autoencoder encoder for a calorimeter trigger front end.
//
// Every 25 ns bunch crossing the block takes the 48 trigger-cell charges of
// one detector module, each as a 7-bit floating-point code, and compresses
// them into 48 to 144 bits for transmission off the detector, where a
// decoder network rebuilds the image. The chain is:
//   tc_decompress (x48)  7-bit float -> 22-bit fixed point
//   convertor            22-bit charges -> 8-bit fractions of the module sum
//   conv2d_relu          48 cells -> 8x8 image; 8 filters, 3x3, stride 2
//                        -> 128 features
//   dense_relu           128 -> 16 outputs of 9 bits (1.8)
//   output_select        any subset of the 16 x 9 bits, packed
// All 2144 weights and biases (6 bits each) and the 144-bit output select
// mask are programmable, held in triplicated self-correcting registers
// (tmr_weight_bank) and written through the cfg_* port, which an I2C target
// drives (i2c_target).
//
// Timing: a new event can enter on every clock. The data path has three
// triplicated register stages without auto-correction (tmr_datapath_reg):
// at the input, after the convertor and at the output. Event data sampled
// with valid_in at edge k appear on the outputs, with valid_out, after edge
// k+2: two clocks, 50 ns at 40 MHz.
//
// The network shape, formats, register triplication and the programmable
// output bits follow the design. The register placement, the float format,
// the configuration address map and the extra sum output are this
// implementation's choice. The three clock trees of the weight storage are
// fed from the one clock input.
//
// Configuration map (byte addresses over I2C, one address per word):
//   0..71      conv weights w[f*9 + kr*3 + kc]     (bits 5:0, two's complement)
//   72..79     conv biases b[f]
//   80..2127   dense weights w[o*128 + feature]
//   2128..2143 dense biases b[o]
//   2144..2161 output select mask, byte n holds mask bits 8n+7..8n
module ae_encoder_top
  import ae_pkg::*;
#(
  parameter logic [6:0] I2C_ADDR = 7'h50
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // Event input
  input  logic                  valid_in,
  input  logic [TC_FLT_W-1:0]   tc_code [N_TC],
  // Compressed output
  output logic                  valid_out,
  output logic [N_OBITS-1:0]    out_bits,
  output logic [SEL_CNT_W-1:0]  out_nbits,
  output logic [SUM_W-1:0]      out_sum,
  // I2C configuration bus (open drain: drive low when sda_oe = 1)
  input  logic                  scl,
  input  logic                  sda_in,
  output logic                  sda_oe
);

  // ---------------------------------------------------------------- config
  logic              cfg_we;
  logic [CFG_AW-1:0] cfg_addr;
  logic [7:0]        cfg_wdata;
  logic [7:0]        cfg_rdata;

  i2c_target #(.DEV_ADDR(I2C_ADDR), .AW(CFG_AW)) u_i2c (
    .clk, .rst_n, .scl, .sda_in, .sda_oe,
    .reg_we(cfg_we), .reg_addr(cfg_addr), .reg_wdata(cfg_wdata), .reg_rdata(cfg_rdata)
  );

  localparam int unsigned SEL_AW = $clog2(N_SEL_B);

  logic [W_W-1:0]    prm_q    [N_PARAM];
  logic [W_W-1:0]    prm_rdata;
  logic [7:0]        sel_q    [N_SEL_B];
  logic [7:0]        sel_rdata;
  logic              prm_hit, sel_hit;
  logic [SEL_AW-1:0] sel_addr;

  assign prm_hit  = cfg_addr < CFG_AW'(N_PARAM);
  assign sel_hit  = !prm_hit && cfg_addr < CFG_AW'(N_CFG);
  assign sel_addr = SEL_AW'(cfg_addr - CFG_AW'(A_SEL));

  tmr_weight_bank #(.DEPTH(N_PARAM), .WIDTH(W_W), .AW(CFG_AW)) u_params (
    .clk_a(clk), .clk_b(clk), .clk_c(clk), .rst_n,
    .we(cfg_we && prm_hit), .waddr(cfg_addr), .wdata(cfg_wdata[W_W-1:0]),
    .raddr(cfg_addr), .rdata(prm_rdata), .q(prm_q)
  );

  tmr_weight_bank #(.DEPTH(N_SEL_B), .WIDTH(8), .AW(SEL_AW)) u_select (
    .clk_a(clk), .clk_b(clk), .clk_c(clk), .rst_n,
    .we(cfg_we && sel_hit), .waddr(sel_addr), .wdata(cfg_wdata),
    .raddr(sel_addr), .rdata(sel_rdata), .q(sel_q)
  );

  assign cfg_rdata = prm_hit ? 8'(prm_rdata) : sel_hit ? sel_rdata : 8'h00;

  logic signed [W_W-1:0] conv_w  [N_CONV_W];
  logic signed [W_W-1:0] conv_b  [N_FILT];
  logic signed [W_W-1:0] dense_w [N_DENSE_W];
  logic signed [W_W-1:0] dense_b [N_OUT];
  logic [N_OBITS-1:0]    sel_mask;

  always_comb begin
    for (int i = 0; i < N_CONV_W; i++)  conv_w[i]  = prm_q[A_CONV_W + i];
    for (int i = 0; i < N_FILT; i++)    conv_b[i]  = prm_q[A_CONV_B + i];
    for (int i = 0; i < N_DENSE_W; i++) dense_w[i] = prm_q[A_DENSE_W + i];
    for (int i = 0; i < N_OUT; i++)     dense_b[i] = prm_q[A_DENSE_B + i];
    for (int i = 0; i < N_OBITS; i++)   sel_mask[i] = sel_q[i / 8][i % 8];
  end

  // ------------------------------------------------------- stage 0: input
  localparam int unsigned S0_W = 1 + N_TC * TC_FLT_W;

  logic [S0_W-1:0]     s0_d, s0_q;
  logic                s0_valid;
  logic [TC_FLT_W-1:0] s0_code [N_TC];

  always_comb begin
    s0_d[0] = valid_in;
    for (int i = 0; i < N_TC; i++) s0_d[1 + i*TC_FLT_W +: TC_FLT_W] = tc_code[i];
  end

  tmr_datapath_reg #(.W(S0_W)) u_s0 (.clk, .rst_n, .en(1'b1), .d(s0_d), .q(s0_q));

  always_comb begin
    s0_valid = s0_q[0];
    for (int i = 0; i < N_TC; i++) s0_code[i] = s0_q[1 + i*TC_FLT_W +: TC_FLT_W];
  end

  // ------------------------------------ ECON decode and convertor (comb)
  logic [TC_FIX_W-1:0] charge [N_TC];
  logic [NORM_W-1:0]   norm   [N_TC];
  logic [SUM_W-1:0]    sum;

  for (genvar g = 0; g < N_TC; g++) begin : g_dec
    tc_decompress u_dec (.code(s0_code[g]), .value(charge[g]));
  end

  convertor u_conv (.charge, .sum, .norm);

  // ------------------------------------------- stage 1: normalized image
  localparam int unsigned S1_W = 1 + SUM_W + N_TC * NORM_W;

  logic [S1_W-1:0]   s1_d, s1_q;
  logic              s1_valid;
  logic [SUM_W-1:0]  s1_sum;
  logic [NORM_W-1:0] s1_norm [N_TC];

  always_comb begin
    s1_d[0] = s0_valid;
    s1_d[1 +: SUM_W] = sum;
    for (int i = 0; i < N_TC; i++) s1_d[1 + SUM_W + i*NORM_W +: NORM_W] = norm[i];
  end

  tmr_datapath_reg #(.W(S1_W)) u_s1 (.clk, .rst_n, .en(1'b1), .d(s1_d), .q(s1_q));

  always_comb begin
    s1_valid = s1_q[0];
    s1_sum   = s1_q[1 +: SUM_W];
    for (int i = 0; i < N_TC; i++) s1_norm[i] = s1_q[1 + SUM_W + i*NORM_W +: NORM_W];
  end

  // ------------------------------------------------- encoder NN (comb)
  logic [HID_W-1:0]     feat [N_FEAT];
  logic [OUT_W-1:0]     y    [N_OUT];
  logic [N_OBITS-1:0]   packed_bits;
  logic [SEL_CNT_W-1:0] n_sel;

  conv2d_relu   u_conv2 (.tc(s1_norm), .w(conv_w), .b(conv_b), .feat);
  dense_relu    u_dense (.feat, .w(dense_w), .b(dense_b), .y);
  output_select u_osel  (.y, .mask(sel_mask), .packed_bits, .n_sel);

  // --------------------------------------------------- stage 2: output
  localparam int unsigned S2_W = 1 + SUM_W + SEL_CNT_W + N_OBITS;

  logic [S2_W-1:0] s2_q;

  tmr_datapath_reg #(.W(S2_W)) u_s2 (
    .clk, .rst_n, .en(1'b1),
    .d({packed_bits, n_sel, s1_sum, s1_valid}), .q(s2_q)
  );

  assign {out_bits, out_nbits, out_sum, valid_out} = s2_q;

endmodule
