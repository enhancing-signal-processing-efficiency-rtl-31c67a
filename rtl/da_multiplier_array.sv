// Multiplier-less multiplication by distributed arithmetic, one output.
//
// Takes the TAPS samples that one filter output needs, x[k] = x(n-k), and
// the DA look-up tables of the coefficients. For every bit plane b of the
// DATA_W-bit two's-complement samples and every coefficient group g, the
// b-th bits of the group's GRP samples form a table address; the entry read,
// sum of h[k]*x_b[n-k] over the group, is weighted by 2^b. The sign bit
// plane (b = DATA_W-1) carries weight -2^b, which makes the sum exact for
// two's-complement samples. The G*DATA_W weighted entries are output as
// partial products pp[b*G+g], sign-extended to PP_W bits; their sum is
// the filter output
//     y(n) = sum_k h[k] x(n-k).
// Combinational: all bit planes are looked up at once (bit-parallel DA), so
// one output is formed per clock instead of one bit per clock. The low b
// bits of a plane-b partial product are zero by construction. The bit-plane
// decomposition and sign handling follow the DA formulation; the
// bit-parallel organisation is this design's choice.
module da_multiplier_array #(
  parameter int unsigned DATA_W = da_fir_pkg::DATA_W,
  parameter int unsigned COEF_W = da_fir_pkg::COEF_W,
  parameter int unsigned TAPS   = da_fir_pkg::TAPS,
  parameter int unsigned GRP    = da_fir_pkg::GRP,
  localparam int unsigned G     = TAPS / GRP,
  localparam int unsigned LUT_W = da_fir_pkg::lut_width(COEF_W, GRP),
  localparam int unsigned PP_W  = LUT_W + DATA_W,
  localparam int unsigned NPP   = G * DATA_W
) (
  input  logic signed [DATA_W-1:0] x   [TAPS],
  input  logic signed [LUT_W-1:0]  lut [G][2**GRP],
  output logic signed [PP_W-1:0]   pp  [NPP]
);
  always_comb begin
    for (int b = 0; b < DATA_W; b++) begin
      for (int g = 0; g < G; g++) begin
        logic [GRP-1:0]        addr;
        logic signed [PP_W-1:0] entry;
        for (int j = 0; j < GRP; j++) addr[j] = x[g*GRP+j][b];
        entry = PP_W'(lut[g][addr]) <<< b;
        pp[b*G+g] = (b == DATA_W - 1) ? -entry : entry;
      end
    end
  end
endmodule
