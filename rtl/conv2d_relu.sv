// Convolutional layer of the encoder: places the 48 trigger cells of a
// module on an 8x8 image, then applies 8 filters of 3x3 with stride 2,
// followed by ReLU. Produces 4x4x8 = 128 features.
//
// Geometry mapping: the module's cells come in three groups of 16, each a
// 4x4 patch. Cells 0-15 fill the upper-left quadrant of the image, 16-31
// the lower-left and 32-47 the lower-right; the upper-right quadrant is
// zero. Inside a group, cell p goes to row p/4, column p%4 of its quadrant.
// The 8x8 image with one empty quadrant follows the design; which group goes
// where and the order inside a group are this implementation's choice.
//
// Inputs are unsigned 0.8 fractions. Weights and biases are 6-bit two's
// complement with 5 fraction bits (value = code / 32). For output position
// (i, j) and filter f the layer forms
//   acc = bias[f] * 2^8 + sum over kr, kc of img[2i+kr][2j+kc] * w[f][kr][kc]
// with 13 fraction bits, exact. Rows and columns past the image edge (index 8)
// read as zero: with stride 2 this is "same" padding, all of it on the bottom
// and right. ReLU clamps negative sums to zero, and the 5 lowest bits are
// dropped (truncation) to keep 8 fraction bits; 4 integer bits cover the
// largest possible sum, so no saturation is ever needed.
//
// Feature order is channel-last: feat[(i*4 + j)*8 + f]. Weight order is
// w[f*9 + kr*3 + kc]. Filter count, kernel, stride, 6-bit weights and 8-bit
// hidden fractions follow the design; the weight scale, the padding side,
// truncation and the orders are this implementation's choice.
//
// Purely combinational.
module conv2d_relu
  import ae_pkg::*;
(
  input  logic [NORM_W-1:0]       tc   [N_TC],
  input  logic signed [W_W-1:0]   w    [N_CONV_W],
  input  logic signed [W_W-1:0]   b    [N_FILT],
  output logic [HID_W-1:0]        feat [N_FEAT]
);

  localparam int unsigned ACC_W = 20;
  localparam int unsigned PFRAC = NORM_W + W_FRAC;  // 13 fraction bits
  localparam int unsigned QE    = IMG / 2;           // quadrant edge, 4

  logic [NORM_W-1:0] img [IMG][IMG];  // img[r][c]: row r, column c

  always_comb begin
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++)
        img[r][c] = '0;
    for (int t = 0; t < N_TC; t++) begin
      int unsigned g, p, r0, c0;
      g  = t / (QE * QE);
      p  = t % (QE * QE);
      r0 = (g == 0) ? 0 : QE;
      c0 = (g == 2) ? QE : 0;
      img[r0 + p / QE][c0 + p % QE] = tc[t];
    end
  end

  always_comb begin
    for (int i = 0; i < OUT_SZ; i++) begin
      for (int j = 0; j < OUT_SZ; j++) begin
        for (int f = 0; f < N_FILT; f++) begin
          logic signed [ACC_W-1:0] acc;
          logic        [ACC_W-1:0] sh;
          acc = ACC_W'(b[f]) <<< NORM_W;
          for (int kr = 0; kr < KSZ; kr++) begin
            for (int kc = 0; kc < KSZ; kc++) begin
              int unsigned r, c;
              r = STRIDE * i + kr;
              c = STRIDE * j + kc;
              if (r < IMG && c < IMG)
                acc += $signed({1'b0, img[r][c]}) * ACC_W'(w[f*KSZ*KSZ + kr*KSZ + kc]);
            end
          end
          sh = ACC_W'(acc >>> (PFRAC - HID_FRAC));
          if (acc < 0)                     feat[(i*OUT_SZ + j)*N_FILT + f] = '0;
          else if (sh > (2**HID_W - 1))    feat[(i*OUT_SZ + j)*N_FILT + f] = '1;
          else                             feat[(i*OUT_SZ + j)*N_FILT + f] = sh[HID_W-1:0];
        end
      end
    end
  end

endmodule
