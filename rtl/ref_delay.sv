// Reference delay z^-DELAY for the equalizer's desired response.
//
// Delays the block stream of source samples by DELAY samples and then by
// PIPE clocks. The sample delay is counted in samples of the stream (it only
// advances on in_valid): output lane i of a block is s(n0+i-DELAY). The
// PIPE-clock delay lines the result up with the equalizer output, which
// leaves the channel and equalizer pipelines PIPE clocks after its source
// block entered. Timing: a block taken with in_valid at clock t is output
// with out_valid at clock t+PIPE. Samples before the first are taken as
// zero (reset clears the history). The delay element and its place follow
// the system diagram; DELAY's value and the PIPE alignment are this
// design's choices.
module ref_delay #(
  parameter int unsigned DATA_W = da_fir_pkg::DATA_W,
  parameter int unsigned BLOCK  = da_fir_pkg::BLOCK,
  parameter int unsigned DELAY  = da_fir_pkg::TAPS / 2,
  parameter int unsigned PIPE   = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] s_in  [BLOCK],
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] d_out [BLOCK]
);
  localparam int unsigned H = (DELAY > 0) ? DELAY : 1;

  logic signed [DATA_W-1:0] hist [H];        // hist[m] = s(n0-DELAY+m)
  logic signed [DATA_W-1:0] seq  [DELAY+BLOCK];
  logic signed [DATA_W-1:0] pipe_d [PIPE+1][BLOCK];
  logic                     pipe_v [PIPE+1];

  always_comb begin
    for (int i = 0; i < DELAY + BLOCK; i++)
      seq[i] = (i < DELAY) ? hist[i] : s_in[i-DELAY];
    for (int i = 0; i < BLOCK; i++) pipe_d[0][i] = seq[i];
    pipe_v[0] = in_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < H; m++) hist[m] <= '0;
      for (int s = 1; s <= PIPE; s++) begin
        pipe_v[s] <= 1'b0;
        for (int i = 0; i < BLOCK; i++) pipe_d[s][i] <= '0;
      end
    end else begin
      if (in_valid && DELAY > 0)
        for (int m = 0; m < DELAY; m++) hist[m] <= seq[BLOCK+m];
      for (int s = 1; s <= PIPE; s++) begin
        pipe_v[s] <= pipe_v[s-1];
        pipe_d[s] <= pipe_d[s-1];
      end
    end
  end

  assign out_valid = pipe_v[PIPE];
  assign d_out     = pipe_d[PIPE];
endmodule
