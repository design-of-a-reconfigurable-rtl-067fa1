// Reference model of the encoder arithmetic for the testbenches, written with
// plain integer arithmetic independently of the RTL. It follows the formats
// described in the RTL headers: 4-bit exponent / 3-bit mantissa inputs,
// normalization by a shared reciprocal of the module sum, 8x8 geometry with
// an empty upper-right quadrant, "same" padded 3x3 stride-2 convolution,
// dense 128 -> 16, ReLU with truncation, and bit selection by mask.
package ae_ref_pkg;

  function automatic longint ref_decompress(input int code);
    int e, m;
    e = (code >> 3) & 15;
    m = code & 7;
    if (e == 0) return longint'(m);
    return longint'(8 + m) * (longint'(1) << (e - 1));
  endfunction

  // norm = min(255, floor(x * floor(2^36 / s) / 2^28))
  function automatic int ref_norm(input longint x, input longint s);
    longint r, p;
    if (s == 0) return 0;
    r = (longint'(1) << 36) / s;
    // x < 2^22 and r <= 2^36, so the product fits in 64 bits
    p = (x * r) >> 28;
    if (p > 255) return 255;
    return int'(p);
  endfunction

  // Row and column of trigger cell t in the 8x8 image
  function automatic int ref_row(input int t);
    return (t < 16) ? (t % 16) / 4 : 4 + (t % 16) / 4;
  endfunction
  function automatic int ref_col(input int t);
    return (t < 32) ? (t % 16) % 4 : 4 + (t % 16) % 4;
  endfunction

  // Quantize a 13-fraction-bit sum: ReLU, drop 5 bits, saturate
  function automatic int ref_relu_q(input longint acc, input int maxv);
    longint v;
    if (acc < 0) return 0;
    v = acc / 32;
    if (v > maxv) return maxv;
    return int'(v);
  endfunction

endpackage
