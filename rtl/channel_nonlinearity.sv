// Channel model back end: nonlinear function and additive noise.
//
// Each of the BLOCK lanes takes a full-precision filter output y, scales it
// back to sample precision (arithmetic shift right by SHIFT, the coefficient
// fraction bits, then saturation to DATA_W bits), passes it through a
// symmetric hard limiter at +/-clip_level (the nonlinear function), adds the
// noise sample e(n) of its lane and saturates again:
//     r = sat(clip(sat(y >>> SHIFT), clip_level) + noise).
// A clip_level at or above the largest sample value makes the limiter
// transparent. Registered: inputs with in_valid at clock t give r with
// out_valid at t+1. The place of the nonlinearity and of the noise adder in
// the channel follows the system diagram; the kind of nonlinearity (a hard
// limiter) and all saturation rules are this design's choices.
module channel_nonlinearity #(
  parameter int unsigned DATA_W = da_fir_pkg::DATA_W,
  parameter int unsigned IN_W   = da_fir_pkg::acc_width(da_fir_pkg::DATA_W,
                                                        da_fir_pkg::COEF_W,
                                                        da_fir_pkg::TAPS),
  parameter int unsigned SHIFT  = da_fir_pkg::FRAC_W,
  parameter int unsigned BLOCK  = da_fir_pkg::BLOCK
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   y     [BLOCK],
  input  logic signed [DATA_W-1:0] noise [BLOCK],
  input  logic        [DATA_W-2:0] clip_level,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] r     [BLOCK]
);
  localparam logic signed [IN_W-1:0] MAXV = IN_W'((1 <<< (DATA_W - 1)) - 1);
  localparam logic signed [IN_W-1:0] MINV = -IN_W'(1 <<< (DATA_W - 1));

  logic signed [DATA_W-1:0] r_d [BLOCK];

  always_comb begin
    for (int p = 0; p < BLOCK; p++) begin
      logic signed [IN_W-1:0]   scaled;
      logic signed [DATA_W-1:0] s16;
      logic signed [DATA_W-1:0] lim;
      logic signed [DATA_W:0]   sum;
      scaled = y[p] >>> SHIFT;
      if (scaled > MAXV)      s16 = MAXV[DATA_W-1:0];
      else if (scaled < MINV) s16 = MINV[DATA_W-1:0];
      else                    s16 = scaled[DATA_W-1:0];
      lim = signed'({1'b0, clip_level});
      if (s16 > lim)       s16 = lim;
      else if (s16 < -lim) s16 = -lim;
      sum = (DATA_W+1)'(s16) + (DATA_W+1)'(noise[p]);
      if (sum[DATA_W] != sum[DATA_W-1])
        r_d[p] = sum[DATA_W] ? {1'b1, {(DATA_W-1){1'b0}}} : {1'b0, {(DATA_W-1){1'b1}}};
      else
        r_d[p] = sum[DATA_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int p = 0; p < BLOCK; p++) r[p] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) r <= r_d;
    end
  end
endmodule
