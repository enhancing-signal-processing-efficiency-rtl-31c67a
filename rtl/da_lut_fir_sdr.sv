// SDR channel and adaptive equalizer built from block DA-LUT FIR filters.
//
// Source blocks s(n) (BLOCK samples per clock) pass through a
// reconfigurable DA-LUT FIR filter with parallel prefix accumulation (the
// channel filter, coefficients loaded serially into its register chain),
// then a nonlinear function (hard limiter) and an additive noise input e(n).
// The received samples r(n) enter the adaptive DA-LUT channel equalizer.
// Its output O(n) is compared with the source delayed by DELAY samples,
// s(n-DELAY), and the error drives a block sign-error LMS update of the
// equalizer coefficients. O(n) finally passes a decimator whose factor can
// be changed at run time.
//
// Interface:
//   coef_load/coef_in  serial load of the channel filter, h[TAPS-1] first
//   s_valid, s_in      source block, s_in[i] = s(n0+i)
//   noise_in           noise block e(n), added to the channel filter output
//                      of the block taken two clocks earlier
//   clip_level         limiter threshold of the nonlinear function
//   adapt_en, mu_shift equalizer adaptation on/off and step size 2^-mu_shift
//   dec_factor         decimation factor M (0 or 1: no decimation)
//   out_*              decimated O(n): out_count samples in the low lanes
//   eq_valid, eq_out, eq_err   full-rate O(n) and error e(n) = s(n-DELAY)-O(n)
//   eq_coef            current equalizer coefficients
// Timing: a source block taken at clock t gives eq_out/eq_err at t+PIPE
// (channel filter 2, nonlinearity 1, equalizer 2 clocks) and the decimated
// samples at t+PIPE+1. One block of BLOCK samples is accepted every clock.
// The chain of blocks follows the system diagram of the design; where the
// decimator sits (on the equalizer output, outside the adaptation loop) is
// this design's choice.
module da_lut_fir_sdr #(
  parameter int unsigned DATA_W = da_fir_pkg::DATA_W,
  parameter int unsigned COEF_W = da_fir_pkg::COEF_W,
  parameter int unsigned TAPS   = da_fir_pkg::TAPS,
  parameter int unsigned BLOCK  = da_fir_pkg::BLOCK,
  parameter int unsigned GRP    = da_fir_pkg::GRP,
  parameter int unsigned DELAY  = da_fir_pkg::TAPS / 2,
  parameter int unsigned MAX_M  = 8,
  localparam int unsigned MW    = $clog2(MAX_M + 1),
  localparam int unsigned CW    = $clog2(BLOCK + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     coef_load,
  input  logic signed [COEF_W-1:0] coef_in,
  input  logic                     s_valid,
  input  logic signed [DATA_W-1:0] s_in     [BLOCK],
  input  logic signed [DATA_W-1:0] noise_in [BLOCK],
  input  logic        [DATA_W-2:0] clip_level,
  input  logic                     adapt_en,
  input  logic        [3:0]        mu_shift,
  input  logic        [MW-1:0]     dec_factor,
  output logic                     out_valid,
  output logic        [CW-1:0]     out_count,
  output logic signed [DATA_W-1:0] out_data [BLOCK],
  output logic                     eq_valid,
  output logic signed [DATA_W-1:0] eq_out   [BLOCK],
  output logic signed [DATA_W:0]   eq_err   [BLOCK],
  output logic signed [COEF_W-1:0] eq_coef  [TAPS]
);
  localparam int unsigned ACC_W = da_fir_pkg::acc_width(DATA_W, COEF_W, TAPS);
  localparam int unsigned DEPTH = TAPS + BLOCK - 1;
  localparam int unsigned PIPE  = 5;

  logic signed [COEF_W-1:0] ch_coef [TAPS];
  logic                     ch_valid, rx_valid, d_valid;
  logic signed [ACC_W-1:0]  ch_y    [BLOCK];
  logic signed [DATA_W-1:0] ch_win  [DEPTH];
  logic signed [DATA_W-1:0] rx      [BLOCK];
  logic signed [DATA_W-1:0] d       [BLOCK];

  coef_reg_chain #(.COEF_W(COEF_W), .TAPS(TAPS)) u_coef (
    .clk, .rst_n, .load(coef_load), .coef_in, .coef(ch_coef)
  );

  da_fir_block #(.DATA_W(DATA_W), .COEF_W(COEF_W), .TAPS(TAPS), .BLOCK(BLOCK), .GRP(GRP)) u_rfir (
    .clk, .rst_n, .coef(ch_coef), .in_valid(s_valid), .x_in(s_in),
    .out_valid(ch_valid), .y(ch_y), .y_win(ch_win)
  );

  channel_nonlinearity #(.DATA_W(DATA_W), .IN_W(ACC_W), .SHIFT(COEF_W - 1), .BLOCK(BLOCK)) u_nl (
    .clk, .rst_n, .in_valid(ch_valid), .y(ch_y), .noise(noise_in), .clip_level,
    .out_valid(rx_valid), .r(rx)
  );

  ref_delay #(.DATA_W(DATA_W), .BLOCK(BLOCK), .DELAY(DELAY), .PIPE(PIPE)) u_ref (
    .clk, .rst_n, .in_valid(s_valid), .s_in, .out_valid(d_valid), .d_out(d)
  );

  channel_equalizer #(.DATA_W(DATA_W), .COEF_W(COEF_W), .FRAC_W(COEF_W - 1), .TAPS(TAPS),
                      .BLOCK(BLOCK), .GRP(GRP)) u_eq (
    .clk, .rst_n, .in_valid(rx_valid), .r(rx), .d, .adapt_en, .mu_shift,
    .out_valid(eq_valid), .o(eq_out), .e(eq_err), .coef(eq_coef)
  );

  decimator #(.DATA_W(DATA_W), .BLOCK(BLOCK), .MAX_M(MAX_M)) u_dec (
    .clk, .rst_n, .factor(dec_factor), .in_valid(eq_valid), .x_in(eq_out),
    .out_valid, .count(out_count), .y_out(out_data)
  );

  // The reference must line up with the equalizer output.
  a_ref_aligned: assert property (@(posedge clk) disable iff (!rst_n) eq_valid == d_valid)
    else $error("reference and equalizer out of step");

  // The assertion samples rst_n synchronously (disable iff) while the
  // registers reset asynchronously; lint notes the mixed use, which is
  // intended.

  // ch_win is only needed by adaptive users of the filter block.
  logic unused_win;
  always_comb begin
    unused_win = 1'b0;
    for (int j = 0; j < DEPTH; j++) unused_win = unused_win ^ (^ch_win[j]);
  end
endmodule
