// Coefficient register chain of the reconfigurable FIR filter.
//
// A chain of TAPS registers, one coefficient each. While load is high, every
// clock shifts coef_in into register 0 and moves each register one step
// along the chain, so TAPS clocks of load reprogram the whole filter; the
// coefficient entered first ends in register TAPS-1, i.e. enter h[TAPS-1]
// first and h[0] last. All registers are visible in parallel on coef, the
// values the DA look-up tables are built from. Reset clears every
// coefficient. The chain of registers follows the filter's block diagram;
// the serial load protocol is this design's choice.
module coef_reg_chain #(
  parameter int unsigned COEF_W = da_fir_pkg::COEF_W,
  parameter int unsigned TAPS   = da_fir_pkg::TAPS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic signed [COEF_W-1:0] coef_in,
  output logic signed [COEF_W-1:0] coef [TAPS]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) coef[i] <= '0;
    end else if (load) begin
      coef[0] <= coef_in;
      for (int i = 1; i < TAPS; i++) coef[i] <= coef[i-1];
    end
  end
endmodule
