// Distributed-arithmetic look-up tables, one per group of coefficients.
//
// The TAPS coefficients are cut into G = TAPS/GRP groups of GRP consecutive
// taps. For group g the table holds, for every GRP-bit address a,
//     lut[g][a] = sum over j with a[j]=1 of coef[g*GRP + j],
// i.e. the inner product of the coefficient group with a vector of input
// bits. Splitting the coefficients keeps each table at 2^GRP entries instead
// of 2^TAPS. The tables are registers, refreshed from coef on every clock,
// so a coefficient change shows in the tables one clock later; this lets an
// adaptive filter change its coefficients while running. Reset clears them.
// Entry 0 of every table (no bit set) is the constant zero; it is kept so
// the address decodes directly.
//
// The table contents (the partial sums of coefficients addressed by input
// bits) follow the DA formulation; the group size and the refresh-every-
// clock policy are this design's choices.
module da_lut_bank #(
  parameter int unsigned COEF_W = da_fir_pkg::COEF_W,
  parameter int unsigned TAPS   = da_fir_pkg::TAPS,
  parameter int unsigned GRP    = da_fir_pkg::GRP,
  localparam int unsigned G     = TAPS / GRP,
  localparam int unsigned LUT_W = da_fir_pkg::lut_width(COEF_W, GRP)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [COEF_W-1:0] coef [TAPS],
  output logic signed [LUT_W-1:0]  lut  [G][2**GRP]
);
  logic signed [LUT_W-1:0] lut_d [G][2**GRP];

  always_comb begin
    for (int g = 0; g < G; g++) begin
      for (int a = 0; a < 2**GRP; a++) begin
        lut_d[g][a] = '0;
        for (int j = 0; j < GRP; j++) begin
          if (a[j]) lut_d[g][a] = lut_d[g][a] + LUT_W'(coef[g*GRP+j]);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < G; g++)
        for (int a = 0; a < 2**GRP; a++) lut[g][a] <= '0;
    end else begin
      lut <= lut_d;
    end
  end

  initial begin
    assert (TAPS % GRP == 0) else $fatal(1, "TAPS must be a multiple of GRP");
  end
endmodule
