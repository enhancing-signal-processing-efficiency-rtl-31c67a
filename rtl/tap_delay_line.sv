// Block-input tapped delay line (register array of delay units).
//
// Every clock with in_valid, BLOCK new samples enter: x_in[i] is sample
// n0+i, so x_in[BLOCK-1] is the newest. The register window win holds the
// latest DEPTH samples newest first: after the block is taken,
// win[j] = x(n0+BLOCK-1-j). The older contents move BLOCK places along, so
// the window is a z^-1 chain advanced BLOCK steps per clock. out_valid is
// in_valid delayed one clock, marking a window that has just been updated.
// Reset clears the window (the filter starts from zero history). The delay
// chain follows the filter's block diagram; the block ordering and reset are
// this design's choices.
module tap_delay_line #(
  parameter int unsigned DATA_W = da_fir_pkg::DATA_W,
  parameter int unsigned BLOCK  = da_fir_pkg::BLOCK,
  parameter int unsigned DEPTH  = da_fir_pkg::TAPS + da_fir_pkg::BLOCK - 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_in [BLOCK],
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] win  [DEPTH]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < DEPTH; j++) win[j] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int j = 0; j < DEPTH; j++) begin
          if (j < BLOCK) win[j] <= x_in[BLOCK-1-j];
          else           win[j] <= win[j-BLOCK];
        end
      end
    end
  end

  initial begin
    assert (DEPTH >= BLOCK) else $fatal(1, "DEPTH must be at least BLOCK");
  end
endmodule
