// Output bit selection: the user picks any subset of the 16 x 9 = 144 network
// output bits for transmission, which sets the output's dimensionality and
// precision (for example the top 3 bits of all 16 outputs, 48 bits, for
// low-occupancy modules, or all 144 bits for high occupancy).
//
// The 144 output bits are numbered k = o*9 + bit, bit 0 being the LSB of
// output o. A 1 in mask[k] selects bit k. Selected bits are packed into
// packed[] from bit 0 upward in increasing k; the unused upper part of packed
// is zero and n_sel tells how many bits are valid. Choosing bits through a
// 144-bit mask follows the design; the numbering and packing are this
// implementation's choice.
//
// Purely combinational.
module output_select
  import ae_pkg::*;
(
  input  logic [OUT_W-1:0]     y [N_OUT],
  input  logic [N_OBITS-1:0]   mask,
  output logic [N_OBITS-1:0]   packed_bits,
  output logic [SEL_CNT_W-1:0] n_sel
);

  logic [N_OBITS-1:0] flat;

  always_comb begin
    for (int o = 0; o < N_OUT; o++) flat[o*OUT_W +: OUT_W] = y[o];
  end

  // Each selected bit goes to the position given by the number of selected
  // bits below it.
  always_comb begin
    logic [SEL_CNT_W-1:0] pos;
    packed_bits = '0;
    pos = '0;
    for (int k = 0; k < N_OBITS; k++) begin
      if (mask[k]) begin
        packed_bits[pos] = flat[k];
        pos = pos + 1'b1;
      end
    end
    n_sel = pos;
  end

endmodule
