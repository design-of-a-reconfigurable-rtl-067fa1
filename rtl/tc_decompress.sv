// Decoder of one trigger-cell charge from its 7-bit floating-point code to a
// 22-bit unsigned fixed-point value (the "ECON block" in front of the encoder).
//
// The code is split into a 4-bit exponent E (bits 6:3) and a 3-bit mantissa M
// (bits 2:0). E = 0 holds M as a plain value; otherwise the value is the
// mantissa with its hidden leading one, shifted up by E-1: {1,M} << (E-1).
// The largest code, 7'h7F, decodes to 15 << 14 = 245760. The 7-bit input and
// 22-bit output widths are those of the design; the split into exponent and
// mantissa and the shift rule are this implementation's choice.
//
// Purely combinational; no clock.
module tc_decompress
  import ae_pkg::*;
#(
  parameter int unsigned EXP_W = TC_EXP_W,
  parameter int unsigned MAN_W = TC_MAN_W,
  parameter int unsigned FIX_W = TC_FIX_W
) (
  input  logic [EXP_W+MAN_W-1:0] code,   // floating-point code {E, M}
  output logic [FIX_W-1:0]       value   // decoded charge
);

  logic [EXP_W-1:0] e;
  logic [MAN_W-1:0] m;

  assign e = code[EXP_W+MAN_W-1 -: EXP_W];
  assign m = code[MAN_W-1:0];

  always_comb begin
    if (e == '0) value = FIX_W'(m);
    else         value = FIX_W'({1'b1, m}) << (e - 1'b1);
  end

endmodule
