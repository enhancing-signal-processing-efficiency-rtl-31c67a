// Adaptive DA-LUT channel equalizer (block sign-error LMS).
//
// An adaptive FIR filter built on the same block DA-LUT filter as the
// channel path: its TAPS coefficients are registers, and the DA look-up
// tables are rebuilt from them every clock, so the filter can adapt while
// it runs. For each output block:
//     o(n)  = sat(y(n) >>> FRAC_W)               equalized sample
//     e(n)  = d(n) - o(n)                        error against the reference
//     w[k] += (sum_p sgn(e(n0+p)) x(n0+p-k)) >>> mu_shift   (if adapt_en)
// i.e. one block-LMS step per block of BLOCK samples, using the sign of the
// error so that the update needs no multiplier (each term is +x, -x or 0).
// The weights are kept with WFRAC extra fraction bits below the COEF_W-bit
// coefficient the filter uses (coef = w >>> WFRAC), and saturate.
// Timing: r with in_valid at clock t gives o, e with out_valid at t+2; d
// must arrive with that out_valid. The weights are updated at the end of
// that clock; as the filter pipeline holds two blocks, the update is a
// delayed LMS, seen by blocks entering one clock later. Reset clears all
// weights. The equalizer's place, its reference input and the least-mean-
// square adaptation follow the reference architecture; the sign-error
// block update, the step-size shift and the weight format are this design's
// choices.
module channel_equalizer #(
  parameter int unsigned DATA_W = da_fir_pkg::DATA_W,
  parameter int unsigned COEF_W = da_fir_pkg::COEF_W,
  parameter int unsigned FRAC_W = da_fir_pkg::FRAC_W,
  parameter int unsigned TAPS   = da_fir_pkg::TAPS,
  parameter int unsigned BLOCK  = da_fir_pkg::BLOCK,
  parameter int unsigned GRP    = da_fir_pkg::GRP,
  parameter int unsigned WFRAC  = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] r     [BLOCK],
  input  logic signed [DATA_W-1:0] d     [BLOCK],
  input  logic                     adapt_en,
  input  logic        [3:0]        mu_shift,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] o     [BLOCK],
  output logic signed [DATA_W:0]   e     [BLOCK],
  output logic signed [COEF_W-1:0] coef  [TAPS]
);
  localparam int unsigned DEPTH  = TAPS + BLOCK - 1;
  localparam int unsigned ACC_W  = da_fir_pkg::acc_width(DATA_W, COEF_W, TAPS);
  localparam int unsigned WACC_W = COEF_W + WFRAC;
  localparam int unsigned GRAD_W = DATA_W + $clog2(BLOCK) + 1;
  localparam logic signed [WACC_W-1:0] WMAX = {1'b0, {(WACC_W-1){1'b1}}};
  localparam logic signed [WACC_W-1:0] WMIN = {1'b1, {(WACC_W-1){1'b0}}};
  localparam logic signed [ACC_W-1:0]  OMAX = ACC_W'((1 <<< (DATA_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0]  OMIN = -ACC_W'(1 <<< (DATA_W - 1));

  logic signed [WACC_W-1:0] w   [TAPS];
  logic signed [ACC_W-1:0]  y   [BLOCK];
  logic signed [DATA_W-1:0] win [DEPTH];

  for (genvar k = 0; k < TAPS; k++) begin : g_coef
    assign coef[k] = w[k][WACC_W-1 -: COEF_W];
  end

  da_fir_block #(.DATA_W(DATA_W), .COEF_W(COEF_W), .TAPS(TAPS), .BLOCK(BLOCK), .GRP(GRP)) u_fir (
    .clk, .rst_n, .coef, .in_valid, .x_in(r), .out_valid, .y, .y_win(win)
  );

  // Equalized output and error.
  always_comb begin
    for (int p = 0; p < BLOCK; p++) begin
      logic signed [ACC_W-1:0] scaled;
      scaled = y[p] >>> FRAC_W;
      if (scaled > OMAX)      o[p] = OMAX[DATA_W-1:0];
      else if (scaled < OMIN) o[p] = OMIN[DATA_W-1:0];
      else                    o[p] = scaled[DATA_W-1:0];
      e[p] = (DATA_W+1)'(d[p]) - (DATA_W+1)'(o[p]);
    end
  end

  // Sign-error block LMS update.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) w[k] <= '0;
    end else if (out_valid && adapt_en) begin
      for (int k = 0; k < TAPS; k++) begin
        logic signed [GRAD_W-1:0]   grad;
        logic signed [WACC_W:0]     nw;
        grad = '0;
        for (int p = 0; p < BLOCK; p++) begin
          if (e[p] > 0)      grad = grad + GRAD_W'(win[BLOCK-1-p+k]);
          else if (e[p] < 0) grad = grad - GRAD_W'(win[BLOCK-1-p+k]);
        end
        nw = (WACC_W+1)'(w[k]) + (WACC_W+1)'(grad >>> mu_shift);
        if (nw > (WACC_W+1)'(WMAX))      w[k] <= WMAX;
        else if (nw < (WACC_W+1)'(WMIN)) w[k] <= WMIN;
        else                             w[k] <= nw[WACC_W-1:0];
      end
    end
  end
endmodule
