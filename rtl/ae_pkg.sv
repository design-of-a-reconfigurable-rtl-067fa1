// Shared sizes, fixed-point formats and the configuration address map of the
// reconfigurable autoencoder encoder.
//
// The network shape (48 trigger cells mapped onto an 8x8 image, a 3x3
// convolution with 8 filters and stride 2, 128 flattened features, a dense
// layer with 16 outputs of 9 bits, 6-bit weights, 8 fractional bits in the
// hidden layer) follows the final network of the design. The float format of
// the inputs, the scale of the weights and biases, the flatten order and the
// address map are choices of this implementation.
package ae_pkg;

  // Input side
  localparam int unsigned N_TC      = 48;  // trigger cells per module
  localparam int unsigned TC_FLT_W  = 7;   // floating-point input code
  localparam int unsigned TC_EXP_W  = 4;   // exponent bits of that code
  localparam int unsigned TC_MAN_W  = 3;   // mantissa bits of that code
  localparam int unsigned TC_FIX_W  = 22;  // decoded fixed-point charge
  localparam int unsigned SUM_W     = TC_FIX_W + $clog2(N_TC); // sum of 48 charges
  localparam int unsigned NORM_W    = 8;   // normalized network input (0.8 unsigned)

  // Image and convolution
  localparam int unsigned IMG       = 8;   // image is IMG x IMG
  localparam int unsigned KSZ       = 3;   // kernel size
  localparam int unsigned STRIDE    = 2;
  localparam int unsigned N_FILT    = 8;
  localparam int unsigned OUT_SZ    = (IMG + STRIDE - 1) / STRIDE; // 4 ("same" padding)
  localparam int unsigned N_FEAT    = OUT_SZ * OUT_SZ * N_FILT;     // 128

  // Dense layer and outputs
  localparam int unsigned N_OUT     = 16;
  localparam int unsigned OUT_W     = 9;   // 1 integer + 8 fraction bits
  localparam int unsigned N_OBITS   = N_OUT * OUT_W; // 144 selectable bits
  localparam int unsigned SEL_CNT_W = $clog2(N_OBITS + 1);

  // Weights and biases: 6-bit two's complement, value = code / 2^W_FRAC
  localparam int unsigned W_W       = 6;
  localparam int unsigned W_FRAC    = 5;
  localparam int unsigned HID_FRAC  = 8;   // fraction bits of hidden neurons
  localparam int unsigned HID_W     = 12;  // 4 integer + 8 fraction, covers the maximum

  // Configuration map: one address per weight or bias, then the select mask bytes
  localparam int unsigned N_CONV_W  = N_FILT * KSZ * KSZ;    // 72
  localparam int unsigned N_DENSE_W = N_FEAT * N_OUT;        // 2048
  localparam int unsigned A_CONV_W  = 0;
  localparam int unsigned A_CONV_B  = A_CONV_W + N_CONV_W;   // 72
  localparam int unsigned A_DENSE_W = A_CONV_B + N_FILT;     // 80
  localparam int unsigned A_DENSE_B = A_DENSE_W + N_DENSE_W; // 2128
  localparam int unsigned N_PARAM   = A_DENSE_B + N_OUT;     // 2144 six-bit words
  localparam int unsigned A_SEL     = N_PARAM;               // 2144
  localparam int unsigned N_SEL_B   = (N_OBITS + 7) / 8;     // 18 mask bytes
  localparam int unsigned N_CFG     = A_SEL + N_SEL_B;       // 2162 addresses
  localparam int unsigned CFG_AW    = 12;

  typedef logic signed [W_W-1:0]    weight_t;
  typedef logic [NORM_W-1:0]        norm_t;
  typedef logic [HID_W-1:0]         hidden_t;
  typedef logic [OUT_W-1:0]         nnout_t;
  typedef logic [TC_FIX_W-1:0]      tcfix_t;
  typedef logic [TC_FLT_W-1:0]      tcflt_t;

endpackage
