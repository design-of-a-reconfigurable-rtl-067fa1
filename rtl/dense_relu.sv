// Dense layer of the encoder: 128 features to 16 outputs, followed by ReLU.
//
// Features are unsigned with 8 fraction bits (12 bits wide). Weights and
// biases are 6-bit two's complement with 5 fraction bits. For output o
//   acc = bias[o] * 2^8 + sum over k of feat[k] * w[o*128 + k]
// is formed exactly with 13 fraction bits. ReLU clamps negative sums to zero,
// the 5 lowest bits are dropped (truncation), and the result saturates to the
// 9-bit output format: 1 integer and 8 fraction bits, so outputs cover
// [0, 2) in steps of 1/256.
//
// The 128 x 16 shape, 6-bit weights and the 9-bit 1.8 output format follow the
// design; the weight scale, truncation and saturation are this
// implementation's choice.
//
// Purely combinational.
module dense_relu
  import ae_pkg::*;
(
  input  logic [HID_W-1:0]        feat [N_FEAT],
  input  logic signed [W_W-1:0]   w    [N_DENSE_W],
  input  logic signed [W_W-1:0]   b    [N_OUT],
  output logic [OUT_W-1:0]        y    [N_OUT]
);

  localparam int unsigned ACC_W = 28;
  localparam int unsigned PFRAC = HID_FRAC + W_FRAC;  // 13

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      logic signed [ACC_W-1:0] acc;
      logic        [ACC_W-1:0] sh;
      acc = ACC_W'(b[o]) <<< HID_FRAC;
      for (int k = 0; k < N_FEAT; k++)
        acc += $signed({1'b0, feat[k]}) * ACC_W'(w[o*N_FEAT + k]);
      sh = ACC_W'(acc >>> (PFRAC - HID_FRAC));
      if (acc < 0)                   y[o] = '0;
      else if (sh > (2**OUT_W - 1))  y[o] = '1;
      else                           y[o] = sh[OUT_W-1:0];
    end
  end

endmodule
