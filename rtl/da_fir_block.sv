// Block DA-LUT FIR filter with parallel prefix accumulation.
//
// Computes BLOCK consecutive outputs of y(n) = sum_{k<TAPS} h[k] x(n-k) per
// clock. All BLOCK output lanes share one register array of delay units
// (tap_delay_line) and one bank of DA look-up tables (da_lut_bank). Lane p
// (output sample n0+p) reads its TAPS samples from the window, feeds them to
// a DA multiplier array and sums the G*DATA_W partial products with a tree
// of parallel prefix adders (ppa_tree). The full-precision ACC_W-bit result
// is registered.
//
// Interface: x_in[i] is input sample n0+i of the block; coef[k] is h[k].
// Timing: a block taken with in_valid at clock t gives y[p] = y(n0+p) with
// out_valid at clock t+2 (one clock in the delay line, one to look up and
// accumulate). A coefficient change takes effect for blocks entering from
// one clock later (table refresh). Throughput is BLOCK samples per clock.
// y_win is the sample window y was computed from, win[j] = x(n0+BLOCK-1-j),
// for an adaptive caller. Sharing of the tables and delay units between
// parallel outputs and the PPA accumulation follow the filter's block
// diagram; pipeline placement is this design's choice.
module da_fir_block #(
  parameter int unsigned DATA_W = da_fir_pkg::DATA_W,
  parameter int unsigned COEF_W = da_fir_pkg::COEF_W,
  parameter int unsigned TAPS   = da_fir_pkg::TAPS,
  parameter int unsigned BLOCK  = da_fir_pkg::BLOCK,
  parameter int unsigned GRP    = da_fir_pkg::GRP,
  localparam int unsigned DEPTH = TAPS + BLOCK - 1,
  localparam int unsigned ACC_W = da_fir_pkg::acc_width(DATA_W, COEF_W, TAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [COEF_W-1:0] coef  [TAPS],
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_in  [BLOCK],
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  y     [BLOCK],
  output logic signed [DATA_W-1:0] y_win [DEPTH]
);
  localparam int unsigned G     = TAPS / GRP;
  localparam int unsigned LUT_W = da_fir_pkg::lut_width(COEF_W, GRP);
  localparam int unsigned PP_W  = LUT_W + DATA_W;
  localparam int unsigned NPP   = G * DATA_W;

  logic signed [LUT_W-1:0]  lut [G][2**GRP];
  logic                     win_valid;
  logic signed [DATA_W-1:0] win [DEPTH];
  logic signed [ACC_W-1:0]  y_d [BLOCK];

  da_lut_bank #(.COEF_W(COEF_W), .TAPS(TAPS), .GRP(GRP)) u_lut (
    .clk, .rst_n, .coef, .lut
  );

  tap_delay_line #(.DATA_W(DATA_W), .BLOCK(BLOCK), .DEPTH(DEPTH)) u_dly (
    .clk, .rst_n, .in_valid, .x_in, .out_valid(win_valid), .win
  );

  for (genvar p = 0; p < BLOCK; p++) begin : g_lane
    logic signed [DATA_W-1:0] x_lane [TAPS];
    logic signed [PP_W-1:0]   pp     [NPP];
    logic        [ACC_W-1:0]  pp_ext [NPP];
    logic        [ACC_W-1:0]  sum;

    for (genvar k = 0; k < TAPS; k++) begin : g_tap
      assign x_lane[k] = win[BLOCK-1-p+k];
    end

    da_multiplier_array #(.DATA_W(DATA_W), .COEF_W(COEF_W), .TAPS(TAPS), .GRP(GRP)) u_mul (
      .x(x_lane), .lut, .pp
    );

    for (genvar i = 0; i < NPP; i++) begin : g_ext
      assign pp_ext[i] = ACC_W'(pp[i]);
    end

    ppa_tree #(.N(NPP), .W(ACC_W)) u_ppa (.op(pp_ext), .sum);
    assign y_d[p] = signed'(sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int p = 0; p < BLOCK; p++) y[p] <= '0;
      for (int j = 0; j < DEPTH; j++) y_win[j] <= '0;
    end else begin
      out_valid <= win_valid;
      if (win_valid) begin
        y     <= y_d;
        y_win <= win;
      end
    end
  end
endmodule
