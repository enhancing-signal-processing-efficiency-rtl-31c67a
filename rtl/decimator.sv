// Run-time decimator for a block sample stream.
//
// Keeps every M-th sample of the stream and drops the rest, M = factor
// (0 is taken as 1), which lowers the output rate by M without touching the
// filter coefficients. Input blocks carry BLOCK samples; a phase counter
// runs across blocks so M need not divide BLOCK. The kept samples of a block
// are packed into the low lanes of y_out, in order, and count says how many
// there are (0 to BLOCK); out_valid is high when count is non-zero. The
// first sample after reset, or after factor changes, is kept.
// Timing: a block with in_valid at clock t gives its kept samples at t+1.
// Decimation by a run-time factor follows the source; the block packing
// scheme and the restart rule are this design's choices.
module decimator #(
  parameter int unsigned DATA_W = da_fir_pkg::DATA_W,
  parameter int unsigned BLOCK  = da_fir_pkg::BLOCK,
  parameter int unsigned MAX_M  = 8,
  localparam int unsigned MW    = $clog2(MAX_M + 1),
  localparam int unsigned CW    = $clog2(BLOCK + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic        [MW-1:0]     factor,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_in  [BLOCK],
  output logic                     out_valid,
  output logic        [CW-1:0]     count,
  output logic signed [DATA_W-1:0] y_out [BLOCK]
);
  logic [MW-1:0] m_eff, m_q, phase, phase_nxt;
  logic          restart;
  logic [BLOCK-1:0] keep;
  logic signed [DATA_W-1:0] packed_d [BLOCK];
  logic [CW-1:0] cnt_d;

  assign m_eff   = (factor == '0) ? MW'(1) : factor;
  assign restart = (m_eff != m_q);

  always_comb begin
    logic [MW-1:0] ph;
    ph = restart ? '0 : phase;
    cnt_d = '0;
    for (int i = 0; i < BLOCK; i++) packed_d[i] = '0;
    for (int i = 0; i < BLOCK; i++) begin
      keep[i] = (ph == '0);
      if (keep[i]) begin
        packed_d[cnt_d[$clog2(BLOCK)-1:0]] = x_in[i];
        cnt_d = cnt_d + 1'b1;
      end
      ph = (ph == m_eff - 1'b1) ? '0 : ph + 1'b1;
    end
    phase_nxt = ph;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q       <= MW'(1);
      phase     <= '0;
      out_valid <= 1'b0;
      count     <= '0;
      for (int i = 0; i < BLOCK; i++) y_out[i] <= '0;
    end else begin
      m_q <= m_eff;
      if (in_valid) begin
        phase     <= phase_nxt;
        out_valid <= (cnt_d != '0);
        count     <= cnt_d;
        y_out     <= packed_d;
      end else begin
        if (restart) phase <= '0;
        out_valid <= 1'b0;
        count     <= '0;
      end
    end
  end
endmodule
