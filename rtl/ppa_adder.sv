// Kogge-Stone parallel prefix adder.
//
// Adds two W-bit words and a carry in. Bit generate/propagate pairs are
// combined in log2(W) prefix levels, each level merging spans twice as long
// as the one before, so the carry into every bit is ready after log2(W)
// gate levels instead of W. Purely combinational.
//
// The filter accumulates its partial products with parallel prefix adders
// to shorten the critical path; which prefix network to use is not fixed by
// the source, and Kogge-Stone (minimum depth, fan-out of two) is this
// design's choice.
module ppa_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  // g, p: group generate/propagate of the span ending at each bit. Level l
  // merges every span with the one 2^(l-1) bits below it; the whole level is
  // one vector operation. The carry in is folded into bit 0's generate.
  logic [W-1:0] p0, g, p;

  initial begin
    assert (W >= 2) else $fatal(1, "W must be at least 2");
  end

  always_comb begin
    p0 = a ^ b;
    g  = a & b;
    g[0] = g[0] | (p0[0] & cin);
    p  = p0;
    for (int unsigned l = 0; l < LEVELS; l++) begin
      g = g | (p & (g << (1 << l)));
      p = p & ((p << (1 << l)) | ~({W{1'b1}} << (1 << l)));
    end
    // carry into bit i is the group generate of bits [i-1:0] and cin
    sum  = p0 ^ {g[W-2:0], cin};
    cout = g[W-1];
  end
endmodule
