// Convertor: turns the 48 decoded 22-bit charges of one bunch crossing into
// 8-bit inputs for the encoder network, normalized to the module's total
// charge.
//
// The 48 charges are summed (28 bits). One reciprocal of the sum is formed,
// R = floor(2^36 / sum), and each charge is scaled by it:
//   norm[i] = min(255, (charge[i] * R) >> 28)
// so norm[i] is close to 256 * charge[i] / sum, an unsigned 0.8 fraction of
// the total. A module with no charge (sum = 0) gives all-zero outputs. The
// 22-bit input and 8-bit normalized output follow the design; normalizing to
// the sum and the single shared reciprocal are this implementation's choice.
// The sum is brought out as well, since the normalized image alone loses the
// module's energy scale.
//
// Purely combinational; the encoder top registers the result.
module convertor
  import ae_pkg::*;
#(
  parameter int unsigned N     = N_TC,
  parameter int unsigned FIX_W = TC_FIX_W,
  parameter int unsigned NB    = NORM_W
) (
  input  logic [FIX_W-1:0]              charge [N],
  output logic [FIX_W+$clog2(N)-1:0]    sum,
  output logic [NB-1:0]              norm   [N]
);

  localparam int unsigned S_W = FIX_W + $clog2(N);
  localparam int unsigned R_W = S_W + NB + 1;

  logic [R_W-1:0] recip;

  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++) sum += S_W'(charge[i]);
  end

  always_comb begin
    if (sum == '0) recip = '0;
    else           recip = (R_W'(1) << (S_W + NB)) / R_W'(sum);
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [FIX_W+R_W-1:0] prod;
      logic [FIX_W+R_W-S_W-1:0] q;
      prod = (FIX_W+R_W)'(charge[i]) * (FIX_W+R_W)'(recip);
      q    = prod[FIX_W+R_W-1:S_W];
      norm[i] = (q > (2**NB - 1)) ? NB'(2**NB - 1) : q[NB-1:0];
    end
  end

endmodule
